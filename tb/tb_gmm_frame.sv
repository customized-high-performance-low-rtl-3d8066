// tb_gmm_frame: workload test of the processor at full size on the classification
// stage of speaker localization: scoring one frame's features against a Gaussian
// mixture table of the full size (37 azimuths x 15 components x 5 parameters x 32
// channels = 88,800 words, 355,200 bytes) held in the data memory, and picking the
// azimuth with the best score.
//
// The program (assembled here) streams the table in storage order with contiguous
// gathers (offset vector 0..31), one 32-channel vector per parameter:
//   per component:  s = logw - ((x_itd - mu_itd)^2 * ivar_itd + (x_ild - mu_ild)^2 * ivar_ild)
//                   with each product a multiply-shift by 8, and M = max(M, s);
//   per azimuth:    score = sum over the 32 channels of M (unrolled extract + add);
//   at the end:     the first azimuth with the largest score and that score are stored.
// Taking the maximum over components in place of a log-sum-exp is a simplification of
// the classifier made for this test. A model written here computes the same
// arithmetic; the test compares the stored azimuth and score, and checks that every
// table word was read exactly once.
module tb_gmm_frame;
  import tta_pkg::*;

  localparam int unsigned NAZ = 37, NCOMP = 15, NPAR = 5;
  localparam int unsigned GBASE = 8192;     // table base (words)
  localparam int unsigned FEAT  = 1024;     // x_itd at FEAT, x_ild at FEAT + 32
  localparam int unsigned OUTA  = 2000;     // best azimuth, best score
  localparam int          NEG   = -1073741824;
  localparam int unsigned TRUE_AZ = 23;

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

  int checks = 0, failures = 0, cycles = 0, n_table_reads = 0, n_lock = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- assembler ----------------
  instr_t prog [$];
  localparam logic [14:0] NOP = {G_NOP, 6'd0, 7'd0};
  function automatic logic [14:0] mv(logic [5:0] s, logic [6:0] d);  return {G_ALWAYS, s, d}; endfunction
  function automatic logic [14:0] mvg(guard_e g, logic [5:0] s, logic [6:0] d); return {g, s, d}; endfunction
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
  // long immediate into the IU, with up to two moves executing alongside
  task automatic limm(int value, logic [14:0] s0 = NOP, logic [14:0] s1 = NOP);
    logic [30:0] v = 31'(value);
    prog.push_back({1'b1, 2'd0, v[30], v[29:0], s1, s0});
  endtask
  task automatic li(int r, int value);
    limm(value);
    ins(mv(S_IU, wrf(r)));
  endtask

  // ---------------- reference model ----------------
  function automatic int mulsh8(int a, int b);
    longint p = longint'(a) * longint'(b);
    return int'(p >>> 8);
  endfunction

  int x_itd [32], x_ild [32];
  int best_az, best_score;

  function automatic int tab(int a, int c, int v, int i);
    return mem.mem[GBASE + ((a * NCOMP + c) * NPAR + v) * 32 + i];
  endfunction

  initial begin
    int l_off, l_az, l_comp, l_halt;
    int m [32];
    int s, score, t1, t2;

    // ---- features and table ----
    for (int i = 0; i < 32; i++) begin
      x_itd[i] = $urandom_range(0, 4000) - 2000;
      x_ild[i] = $urandom_range(0, 4000) - 2000;
      mem.mem[FEAT + i]      = x_itd[i];
      mem.mem[FEAT + 32 + i] = x_ild[i];
    end
    for (int a = 0; a < NAZ; a++)
      for (int c = 0; c < NCOMP; c++)
        for (int i = 0; i < 32; i++) begin
          int base;
          base = GBASE + ((a * NCOMP + c) * NPAR) * 32 + i;
          // the true azimuth's means lie close to the features
          mem.mem[base]       = (a == TRUE_AZ) ? x_itd[i] + $urandom_range(0, 40) - 20 : $urandom_range(0, 4000) - 2000;
          mem.mem[base + 32]  = (a == TRUE_AZ) ? x_ild[i] + $urandom_range(0, 40) - 20 : $urandom_range(0, 4000) - 2000;
          mem.mem[base + 64]  = $urandom_range(1, 512);
          mem.mem[base + 96]  = $urandom_range(1, 512);
          mem.mem[base + 128] = $urandom_range(0, 2000) - 1000;
        end
    for (int i = 0; i < 2; i++) mem.mem[OUTA + i] = 32'hdead_beef;

    // ---- program ----
    // r0 = 0 (never written), r4 = 32, r5 = 1, r8 = table pointer, r9 = azimuth,
    // r10 = component, r11 = best score, r12 = best azimuth, r13 = NEG, r14 = 15, r15 = l_comp
    li(4, 32); li(5, 1); li(13, NEG); li(11, NEG); li(14, NCOMP); li(8, GBASE);
    // identity offsets 0..31 for contiguous gathers, built with insert
    li(3, 0);
    li(6, 0);                      // patched: l_off
    l_off = prog.size();
    ins(mv(S_AUX, D_AUX_V), mv(rf(3), D_AUX_S), mv(rf(3), 7'(D_AUX_T + AUX_INSERT)));
    ins(mv(rf(3), D_ALU_O), mv(rf(5), 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_ALU, wrf(3)), mv(S_ALU, D_ALU_O), mv(rf(4), 7'(D_ALU_T + ALU_EQ)));
    ins(mv(S_ALU, D_BOOL));
    ins(mvg(G_FALSE, rf(6), 7'(D_GCU_T + GCU_JUMP)));
    ins();
    prog[l_off - 2][60:30] = 31'(l_off);
    ins(mv(S_AUX, D_LSU_O));
    limm(FEAT);
    ins(mv(S_IU, 7'(D_LSU_T + LSU_GATHER)));
    limm(FEAT + 32, mv(S_LSU, wva(0)));
    ins(mv(S_IU, 7'(D_LSU_T + LSU_GATHER)));
    limm(8, mv(S_LSU, wva(1)));
    ins(mv(S_IU, 7'(D_AUX_T + AUX_BROADCAST)));
    ins(mv(S_AUX, D_SIMD_C));      // multiply-shift amount, kept for the whole run
    li(15, 0);                     // patched: l_comp
    // ---- azimuth loop ----
    l_az = prog.size();
    ins(mv(rf(13), 7'(D_AUX_T + AUX_BROADCAST)), mv(rf(4), D_ALU_O));
    ins(mv(S_AUX, wva(2)), mv(rf(0), wrf(10)));
    // ---- component loop ----
    l_comp = prog.size();
    prog[l_az - 2][60:30] = 31'(l_comp);
    ins(mv(rf(8), 7'(D_LSU_T + LSU_GATHER)), mv(rf(8), 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_LSU, wva(3)), mv(S_ALU, 7'(D_LSU_T + LSU_GATHER)), mv(S_ALU, 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_LSU, wva(4)), mv(S_ALU, 7'(D_LSU_T + LSU_GATHER)), mv(S_ALU, 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_LSU, wva(5)), mv(S_ALU, 7'(D_LSU_T + LSU_GATHER)), mv(S_ALU, 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_LSU, wva(6)), mv(S_ALU, 7'(D_LSU_T + LSU_GATHER)), mv(S_ALU, 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_LSU, wva(7)), mv(S_ALU, wrf(8)));
    ins(mv(va(0), D_SIMD_A), mv(va(3), 7'(D_SIMD_T + V_SUB)));
    ins(mv(S_SIMD, 7'(D_SIMD_T + V_MULSH)), NOP, NOP, NOP, 2'd1);
    ins(mv(va(5), 7'(D_SIMD_T + V_MULSH)), NOP, NOP, NOP, 2'd1);
    ins(mv(S_SIMD, wvb(1)), mv(va(1), D_SIMD_A), mv(va(4), 7'(D_SIMD_T + V_SUB)));
    ins(mv(S_SIMD, 7'(D_SIMD_T + V_MULSH)), NOP, NOP, NOP, 2'd1);
    ins(mv(va(6), 7'(D_SIMD_T + V_MULSH)), NOP, NOP, NOP, 2'd1);
    ins(mv(vb(1), 7'(D_SIMD_T + V_ADD)), NOP, NOP, NOP, 2'd1);
    ins(mv(va(7), D_SIMD_A), mv(S_SIMD, 7'(D_SIMD_T + V_SUB)));
    ins(mv(va(2), 7'(D_SIMD_T + V_MAX)), NOP, NOP, NOP, 2'd1);
    ins(mv(S_SIMD, wva(2)), mv(rf(10), D_ALU_O), mv(rf(5), 7'(D_ALU_T + ALU_ADD)));
    ins(mv(S_ALU, wrf(10)), mv(S_ALU, D_ALU_O), mv(rf(14), 7'(D_ALU_T + ALU_EQ)));
    ins(mv(S_ALU, D_BOOL), mv(rf(4), D_ALU_O));
    ins(mvg(G_FALSE, rf(15), 7'(D_GCU_T + GCU_JUMP)));
    ins();
    // ---- channel sum of M, unrolled ----
    ins(mv(va(2), D_AUX_V), mv(rf(0), D_ALU_O));
    for (int k = 0; k < 32; k++) begin
      if (k == 0) limm(k);
      else        limm(k, mv(S_AUX, 7'(D_ALU_T + ALU_ADD)));
      if (k == 0) ins(mv(S_IU, 7'(D_AUX_T + AUX_EXTRACT)));
      else        ins(mv(S_IU, 7'(D_AUX_T + AUX_EXTRACT)), mv(S_ALU, D_ALU_O));
    end
    ins(mv(S_AUX, 7'(D_ALU_T + ALU_ADD)));
    // ---- keep the best azimuth ----
    ins(mv(S_ALU, D_ALU_O), mv(S_ALU, wrf(1)), mv(rf(11), 7'(D_ALU_T + ALU_GT)));
    ins(mv(S_ALU, D_BOOL));
    ins(mvg(G_TRUE, rf(1), wrf(11)));
    ins(mvg(G_TRUE, rf(9), wrf(12)));
    ins(mv(rf(9), D_ALU_O), mv(rf(5), 7'(D_ALU_T + ALU_ADD)));
    limm(NAZ, mv(S_ALU, wrf(9)), mv(S_ALU, D_ALU_O));
    ins(mv(S_IU, 7'(D_ALU_T + ALU_EQ)));
    ins(mv(S_ALU, D_BOOL));
    limm(l_az);
    ins(mvg(G_FALSE, S_IU, 7'(D_GCU_T + GCU_JUMP)));
    ins();
    // ---- store result and stop ----
    limm(OUTA, mv(rf(12), D_LSU_O));
    ins(mv(S_IU, 7'(D_LSU_T + LSU_ST)));
    limm(OUTA + 1, mv(rf(11), D_LSU_O));
    ins(mv(S_IU, 7'(D_LSU_T + LSU_ST)));
    l_halt = prog.size();
    limm(l_halt + 1);
    ins(mv(S_IU, 7'(D_GCU_T + GCU_JUMP)));
    ins();

    // ---- reference ----
    best_az = 0; best_score = NEG;
    for (int a = 0; a < NAZ; a++) begin
      for (int i = 0; i < 32; i++) m[i] = NEG;
      for (int c = 0; c < NCOMP; c++)
        for (int i = 0; i < 32; i++) begin
          t1 = mulsh8(mulsh8(x_itd[i] - tab(a, c, 0, i), x_itd[i] - tab(a, c, 0, i)), tab(a, c, 2, i));
          t2 = mulsh8(mulsh8(x_ild[i] - tab(a, c, 1, i), x_ild[i] - tab(a, c, 1, i)), tab(a, c, 3, i));
          s = tab(a, c, 4, i) - (t1 + t2);
          if (s > m[i]) m[i] = s;
        end
      score = 0;
      for (int i = 0; i < 32; i++) score += m[i];
      if (score > best_score) begin best_score = score; best_az = a; end
    end

    // ---- run ----
    repeat (2) @(posedge clk);
    foreach (prog[a]) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = pc_t'(a); imem_wdata = prog[a];
    end
    @(negedge clk);
    imem_we = 0;
    rst_n = 1;
    while (mem.n_writes < 2) begin
      @(negedge clk);
      cycles++;
    end
    repeat (4) @(negedge clk);
    checks += 3;
    if (mem.mem[OUTA] !== best_az) begin failures++; $display("azimuth got %0d exp %0d", mem.mem[OUTA], best_az); end
    if (mem.mem[OUTA + 1] !== best_score) begin failures++; $display("score got %0d exp %0d", int'(mem.mem[OUTA + 1]), best_score); end
    if (best_az != TRUE_AZ) begin failures++; $display("model picked azimuth %0d", best_az); end
    checks++;
    if (n_table_reads != NAZ * NCOMP * NPAR * 32) begin failures++; $display("%0d table reads", n_table_reads); end
    checks++;
    if (prog_err) failures++;
    $display("program %0d instructions; %0d cycles for the frame, %0d of them locked by the LSU; azimuth %0d",
             prog.size(), cycles, n_lock, mem.mem[OUTA]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (lock) n_lock++;
    if (dmem_req && dmem_gnt && !dmem_we && dmem_addr >= GBASE &&
        dmem_addr < GBASE + NAZ * NCOMP * NPAR * 32) n_table_reads++;
    if (prog_err) begin failures++; $display("invalid instruction at pc %0d", pc); end
  end
endmodule
