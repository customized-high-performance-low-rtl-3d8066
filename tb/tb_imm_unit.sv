// tb_imm_unit: checks that the immediate unit sign-extends the 31-bit field, updates
// only on an immediate instruction, holds its value otherwise and resets to zero.
module tb_imm_unit;
  import tta_pkg::*;
  logic clk = 0, rst_n = 1, we = 0;
  initial #2 rst_n = 0;
  logic [30:0] imm = '0;
  word_t value, model;
  int checks = 0, failures = 0;

  imm_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    #3 checks++;
    if (value !== 0) failures++;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      imm = 31'($urandom);
      if (n % 7 == 0) imm = 31'h4000_0000;
      if (n % 7 == 1) imm = 31'h3fff_ffff;
      @(posedge clk);
      if (we) model = imm[30] ? {1'b1, imm} : {1'b0, imm};
      #1 checks++;
      if (value !== model) begin failures++; $display("got %h exp %h", value, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
