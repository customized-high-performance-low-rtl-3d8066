// tb_imem: checks the instruction memory at its full size (2048 x 64 bits): every word
// is written through the load port and read back with the one-cycle synchronous read,
// and the output holds while the read enable is low.
module tb_imem;
  logic clk = 0, re = 0, we = 0;
  logic [10:0] raddr = '0, waddr = '0;
  logic [63:0] rdata, wdata = '0, held;
  int checks = 0, failures = 0;

  imem #(.WIDTH(64), .AW(11)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] pattern(int a);
    return {32'(a * 32'h9e37_79b9), 32'(a ^ 32'h5a5a_0000)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      we = 1; waddr = 11'(a); wdata = pattern(a);
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      re = 1; raddr = 11'(2047 - a);
      @(negedge clk);
      checks++;
      if (rdata !== pattern(2047 - a)) begin failures++; $display("addr %0d", 2047 - a); end
      re = 0; held = rdata; raddr = 11'(a);
      @(negedge clk);
      checks++;
      if (rdata !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
