// tb_tta_core: end-to-end test of the processor at its full size. A program, assembled
// here move by move, runs a reduced version of the front end of speaker localization on
// all 32 channels at once, for one 512-sample frame:
//   1. builds the per-channel alignment offsets (group delays) from a table in memory
//      with load + element insert in a guarded loop;
//   2. for every sample n gathers x[i] = in[n + off[i]] (one word per channel),
//      scales it with multiply-shift, half-wave rectifies it (max with 0) and
//      accumulates it, chaining the SIMD results through the direct ALU_SIMD path;
//   3. normalises with count-leading-zeros, applies one conditional add/subtract
//      step, compares and selects;
//   4. calls a subroutine twice that extracts each lane and stores it to memory.
// The stored words are compared with a model computed here from the same memory
// contents. The test also counts how often each mechanism occurred (lock stalls,
// gathers, bypass moves, guarded moves squashed, long immediates, calls, dual-port
// vector-register reads) and fails if one never did.
module tb_tta_core;
  import tta_pkg::*;

  localparam int unsigned NS     = 512;     // samples per frame
  localparam int unsigned IN     = 4096;    // input queue
  localparam int unsigned OFFTAB = 3840;    // per-channel offsets
  localparam int unsigned OUT    = 8192;    // results
  localparam int unsigned GAIN   = 1443;
  localparam int unsigned SHIFT  = 8;
  localparam int          THR    = 150000;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic imem_we = 0;
  pc_t  imem_waddr = '0;
  instr_t imem_wdata = '0;
  logic dmem_req, dmem_we, dmem_gnt, dmem_rvalid;
  logic [DMEM_AW-1:0] dmem_addr;
  word_t dmem_wdata, dmem_rdata;
  pc_t pc;
  logic lock, exec, prog_err;

  tta_core dut (.*);

  dmem_model #(.MAX_GNT_WAIT(1), .MAX_RD_EXTRA(1)) mem (
    .clk, .rst_n, .req(dmem_req), .we(dmem_we), .addr(dmem_addr), .wdata(dmem_wdata),
    .gnt(dmem_gnt), .rvalid(dmem_rvalid), .rdata(dmem_rdata));

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_lock = 0, n_gather = 0, n_bypass = 0, n_squash = 0, n_limm = 0, n_call = 0, n_dual = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- assembler ----------------
  instr_t prog [$];
  localparam logic [14:0] NOP = {G_NOP, 6'd0, 7'd0};

  function automatic logic [14:0] mv(logic [5:0] s, logic [6:0] d);
    return {G_ALWAYS, s, d};
  endfunction
  function automatic logic [14:0] mvg(guard_e g, logic [5:0] s, logic [6:0] d);
    return {g, s, d};
  endfunction
  function automatic logic [5:0] rf(int r);  return 6'(S_RF + r);  endfunction
  function automatic logic [5:0] va(int r);  return 6'(S_RFA + r); endfunction
  function automatic logic [5:0] vb(int r);  return 6'(S_RFB + r); endfunction
  function automatic logic [6:0] wrf(int r); return 7'(D_RF + r);  endfunction
  function automatic logic [6:0] wva(int r); return 7'(D_RFA + r); endfunction
  function automatic logic [6:0] wvb(int r); return 7'(D_RFB + r); endfunction

  task automatic ins(logic [14:0] s0 = NOP, logic [14:0] s1 = NOP, logic [14:0] s2 = NOP,
                     logic [14:0] s3 = NOP, logic [1:0] byp = 2'd0);
    prog.push_back({1'b0, byp, 1'b0, s3, s2, s1, s0});
  endtask
  // load a 31-bit signed constant into scalar register r (two instructions)
  task automatic li(int r, int value);
    logic [30:0] v = 31'(value);
    prog.push_back({1'b1, 2'd0, v[30], v[29:0], NOP, NOP});
    ins(mv(S_IU, wrf(r)));
  endtask
  task automatic patch_li(int at, int value);
    logic [30:0] v = 31'(value);
    prog[at][60:30] = v;
  endtask

  // ---------------- reference model ----------------
  function automatic int clz(int x);
    int n = 0;
    while (n < 32 && x[31-n] == 1'b0) n++;
    return n;
  endfunction

  int off [LANES];
  int acc [LANES], res [LANES], outv [LANES];

  initial begin
    int p_r6, p_r10, p_r14, l_off, l_main, l_sub, l_s1, l_halt, p_r11, p_r12;
    longint prodv;
    int x, y;

    // ---- memory contents ----
    for (int i = 0; i < LANES; i++) begin
      off[i] = $urandom_range(0, 63);
      mem.mem[OFFTAB + i] = off[i];
    end
    for (int n = 0; n < NS + 64; n++) mem.mem[IN + n] = $urandom_range(0, 40000) - 20000;
    for (int i = 0; i < 64; i++) mem.mem[OUT + i] = 32'hdead_beef;

    // ---- program ----
    li(2, OFFTAB); li(3, 0); li(4, LANES); li(5, 1);
    p_r6 = prog.size(); li(6, 0);
    l_off = prog.size();
    ins(mv(rf(2), 7'(D_LSU_T + LSU_LD)), mv(rf(2), D_ALU_O), mv(S_AUX, D_AUX_V));
    ins(mv(S_LSU, D_AUX_S), mv(rf(3), 7'(D_AUX_T + AUX_INSERT)), mv(rf(5), 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_ALU, wrf(2)), mv(rf(3), D_ALU_O), mv(rf(5), 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_ALU, wrf(3)), mv(S_ALU, D_ALU_O), mv(rf(4), 7'(D_ALU_T + ALU_EQ)));
    ins(mv(S_ALU, D_BOOL));
    ins(mvg(G_FALSE, rf(6), 7'(D_GCU_T + GCU_JUMP)));
    ins();
    patch_li(p_r6, l_off);
    ins(mv(S_AUX, D_LSU_O));
    li(7, GAIN);  ins(mv(rf(7), 7'(D_AUX_T + AUX_BROADCAST)));  ins(mv(S_AUX, wvb(0)));
    li(7, SHIFT); ins(mv(rf(7), 7'(D_AUX_T + AUX_BROADCAST)));  ins(mv(S_AUX, wva(1)));
    li(7, 0);     ins(mv(rf(7), 7'(D_AUX_T + AUX_BROADCAST)));  ins(mv(S_AUX, wva(2)));
    ins(mv(va(2), wva(3)));
    li(7, THR);   ins(mv(rf(7), 7'(D_AUX_T + AUX_BROADCAST)));  ins(mv(S_AUX, wva(4)));
    li(8, IN); li(9, IN + NS);
    p_r10 = prog.size(); li(10, 0);
    ins(mv(rf(5), D_ALU_O));
    l_main = prog.size();
    ins(mv(rf(8), 7'(D_LSU_T + LSU_GATHER)), mv(rf(8), 7'(D_ALU_T + ALU_ADD)), mv(va(1), D_SIMD_C));
    ins(mv(S_LSU, D_SIMD_A), mv(vb(0), 7'(D_SIMD_T + V_MULSH)), mv(S_ALU, wrf(8)), mv(rf(9), D_ALU_O));
    ins(mv(va(2), 7'(D_SIMD_T + V_MAX)), mv(S_ALU, 7'(D_ALU_T + ALU_EQ)), NOP, NOP, 2'd1);
    ins(mv(va(3), 7'(D_SIMD_T + V_ADD)), mv(S_ALU, D_BOOL), mv(rf(5), D_ALU_O), NOP, 2'd1);
    ins(mv(S_SIMD, wva(3)), mvg(G_FALSE, rf(10), 7'(D_GCU_T + GCU_JUMP)));
    ins();
    patch_li(p_r10, l_main);
    // post-processing: clz, conditional add/subtract, compare, select
    ins(mv(va(3), 7'(D_SIMD_T + V_CLZ)), mv(va(3), D_SIMD_A));
    ins(mv(S_SIMD, wvb(1)), mv(va(4), 7'(D_SIMD_T + V_SUB)));
    ins(mv(va(3), D_SIMD_A), mv(vb(1), 7'(D_SIMD_T + V_CAS)), NOP, NOP, 2'd2);
    ins(mv(va(4), 7'(D_SIMD_T + V_GT)), mv(S_SIMD, wva(5)), NOP, NOP, 2'd1);
    ins(mv(va(5), D_SIMD_A), mv(va(2), 7'(D_SIMD_T + V_SEL)), NOP, NOP, 2'd2);
    ins(mv(S_SIMD, D_AUX_V));
    p_r14 = prog.size(); li(14, 0);
    li(13, OUT);
    p_r11 = prog.size(); li(11, 0);
    ins(mv(rf(11), 7'(D_GCU_T + GCU_CALL)));
    ins();
    ins(mv(va(3), D_AUX_V));
    ins(mv(rf(11), 7'(D_GCU_T + GCU_CALL)));
    ins();
    p_r12 = prog.size(); li(12, 0);
    l_halt = prog.size();
    ins(mv(rf(12), 7'(D_GCU_T + GCU_JUMP)));
    ins();
    patch_li(p_r12, l_halt);
    // subroutine: store the 32 lanes of AUX's vector operand at r13, r13 += 32
    l_sub = prog.size();
    li(3, 0);
    l_s1 = prog.size();
    ins(mv(rf(3), 7'(D_AUX_T + AUX_EXTRACT)), mv(rf(13), D_ALU_O));
    ins(mv(S_AUX, D_LSU_O), mv(rf(13), 7'(D_LSU_T + LSU_ST)), mv(rf(5), 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_ALU, wrf(13)), mv(rf(3), D_ALU_O), mv(rf(5), 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_ALU, wrf(3)), mv(S_ALU, D_ALU_O), mv(rf(4), 7'(D_ALU_T + ALU_EQ)));
    ins(mv(S_ALU, D_BOOL));
    ins(mvg(G_FALSE, rf(14), 7'(D_GCU_T + GCU_JUMP)), mvg(G_TRUE, S_RA, 7'(D_GCU_T + GCU_JUMP)));
    ins();
    patch_li(p_r11, l_sub);
    patch_li(p_r14, l_s1);

    // ---- reference results ----
    for (int i = 0; i < LANES; i++) begin
      acc[i] = 0;
      for (int n = 0; n < NS; n++) begin
        x = mem.mem[IN + n + off[i]];
        prodv = longint'(x) * longint'(GAIN);
        y = int'(prodv >>> SHIFT);
        acc[i] += (y > 0) ? y : 0;
      end
      res[i]  = (acc[i] - THR < 0) ? acc[i] - clz(acc[i]) : acc[i] + clz(acc[i]);
      outv[i] = (res[i] > THR) ? res[i] : 0;
    end

    // ---- load program while in reset ----
    repeat (2) @(posedge clk);
    foreach (prog[a]) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = pc_t'(a); imem_wdata = prog[a];
    end
    @(negedge clk);
    imem_we = 0;
    rst_n = 1;
    while (!(pc == pc_t'(l_halt + 1) && exec && !lock) || mem.n_writes < 2 * LANES) begin
      @(negedge clk);
      cycles++;
    end
    repeat (4) @(negedge clk);

    for (int i = 0; i < LANES; i++) begin
      checks += 2;
      if (mem.mem[OUT + i] !== outv[i]) begin
        failures++; $display("out lane %0d: got %0d exp %0d", i, int'(mem.mem[OUT + i]), outv[i]);
      end
      if (mem.mem[OUT + LANES + i] !== acc[i]) begin
        failures++; $display("acc lane %0d: got %0d exp %0d", i, int'(mem.mem[OUT + LANES + i]), acc[i]);
      end
    end
    checks++;
    if (mem.n_writes != 2 * LANES) begin failures++; $display("%0d stores", mem.n_writes); end
    $display("program %0d instructions, %0d cycles for %0d samples", prog.size(), cycles, NS);
    $display("lock cycles %0d gathers %0d bypass moves %0d squashed moves %0d long immediates %0d calls %0d dual vector reads %0d",
             n_lock, n_gather, n_bypass, n_squash, n_limm, n_call, n_dual);
    checks++;
    if (n_lock == 0 || n_gather != NS || n_bypass == 0 || n_squash == 0 || n_limm == 0 ||
        n_call != 2 || n_dual == 0) failures++;
    checks++;
    if (prog_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  always @(posedge clk) if (rst_n) begin
    if (lock) n_lock++;
    if (prog_err) begin failures++; $display("invalid instruction at pc %0d", pc); end
    if (exec) begin
      if (dut.ins[63]) n_limm++;
      if (dut.ins[62:61] != 2'd0) n_bypass++;
      if (dut.wr[P_LSU_T].v && dut.wr[P_LSU_T].sub[1:0] == LSU_GATHER) n_gather++;
      if (dut.wr[P_GCU_T].v && dut.wr[P_GCU_T].sub[1:0] == GCU_CALL) n_call++;
      if (dut.u_ic.na == 2) n_dual++;
      for (int k = 0; k < NBUS; k++) begin
        move_t m;
        m = slot_of(dut.ins, k);
        if (!dut.ins[63] && ((m.guard == G_TRUE && !dut.guard) || (m.guard == G_FALSE && dut.guard)))
          n_squash++;
      end
    end
  end
endmodule
