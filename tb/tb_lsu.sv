// tb_lsu: self-checking test of the load-store unit against the behavioural data
// memory. Two units receive the same operations: one on a memory without wait states,
// where the busy time is checked cycle for cycle (a load or a gather element takes 3
// cycles: request, grant-to-data, capture; a store 1), and one on a memory with random
// grant and read delays. Loads, stores and gathers with random offsets are checked
// against a shadow copy of the memory.
module tb_lsu;
  import tta_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int unsigned WORDS = 4096;

  logic    d_we = 0, t_we = 0;
  vec_t    d_in = '0;
  lsu_op_e t_op = LSU_LD;
  word_t   t_in = '0;

  vec_t  result [2];
  logic  busy [2];
  logic  req [2], we [2], gnt [2], rvalid [2];
  logic [DMEM_AW-1:0] addr [2];
  word_t wdata [2], rdata [2];

  lsu u0 (.clk, .rst_n, .d_we, .d_in, .t_we, .t_op, .t_in, .result(result[0]), .busy(busy[0]),
          .mem_req(req[0]), .mem_we(we[0]), .mem_addr(addr[0]), .mem_wdata(wdata[0]),
          .mem_gnt(gnt[0]), .mem_rvalid(rvalid[0]), .mem_rdata(rdata[0]));
  lsu u1 (.clk, .rst_n, .d_we, .d_in, .t_we, .t_op, .t_in, .result(result[1]), .busy(busy[1]),
          .mem_req(req[1]), .mem_we(we[1]), .mem_addr(addr[1]), .mem_wdata(wdata[1]),
          .mem_gnt(gnt[1]), .mem_rvalid(rvalid[1]), .mem_rdata(rdata[1]));
  dmem_model #(.WORDS(WORDS), .AW(DMEM_AW), .MAX_GNT_WAIT(0), .MAX_RD_EXTRA(0)) m0 (
    .clk, .rst_n, .req(req[0]), .we(we[0]), .addr(addr[0]), .wdata(wdata[0]),
    .gnt(gnt[0]), .rvalid(rvalid[0]), .rdata(rdata[0]));
  dmem_model #(.WORDS(WORDS), .AW(DMEM_AW), .MAX_GNT_WAIT(3), .MAX_RD_EXTRA(3)) m1 (
    .clk, .rst_n, .req(req[1]), .we(we[1]), .addr(addr[1]), .wdata(wdata[1]),
    .gnt(gnt[1]), .rvalid(rvalid[1]), .rdata(rdata[1]));

  word_t shadow [WORDS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_op(lsu_op_e op, word_t a, vec_t d, int exp_busy);
    int cyc0 = 0;
    vec_t expv = '0;
    @(negedge clk);
    d_we = 1; d_in = d; t_we = 1; t_op = op; t_in = a;
    @(negedge clk);
    d_we = 0; t_we = 0;
    while (busy[0] || busy[1]) begin
      if (busy[0]) cyc0++;
      @(negedge clk);
    end
    checks++;
    if (cyc0 != exp_busy) begin failures++; $display("%s busy %0d cycles, expected %0d", op.name(), cyc0, exp_busy); end
    case (op)
      LSU_ST: shadow[a] = d[31:0];
      LSU_LD: expv[31:0] = shadow[a];
      default: for (int i = 0; i < LANES; i++) expv[i*EW +: EW] = shadow[32'(a + d[i*EW +: EW]) % WORDS];
    endcase
    if (op != LSU_ST)
      for (int u = 0; u < 2; u++) begin
        checks++;
        if (result[u] !== expv) begin failures++; $display("unit %0d %s at %0d mismatch", u, op.name(), a); end
      end
  endtask

  initial begin
    vec_t off;
    for (int i = 0; i < WORDS; i++) begin
      shadow[i] = $urandom;
      m0.mem[i] = shadow[i];
      m1.mem[i] = shadow[i];
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      do_op(LSU_ST, $urandom_range(0, WORDS - 1), {32'd0, 32'($urandom)} , 1);
      do_op(LSU_LD, $urandom_range(0, WORDS - 1), '0, 3);
      for (int i = 0; i < LANES; i++) off[i*EW +: EW] = $urandom_range(0, 511);
      do_op(LSU_GATHER, $urandom_range(0, WORDS - 600), off, 3 * LANES);
    end
    // store then load back the same word
    do_op(LSU_ST, 100, {992'd0, 32'hcafe_f00d}, 1);
    do_op(LSU_LD, 100, '0, 3);
    checks++;
    if (result[1][31:0] !== 32'hcafe_f00d) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
