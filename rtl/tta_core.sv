// tta_core: a transport-triggered (TTA) application-specific processor for binaural
// speaker localization in hearing aids. Its datapath is built around 32-lane x 32-bit
// SIMD vectors (one lane per gammatone channel), so each gammatone, neural-transduction,
// ITD/ILD and Gaussian-mixture step processes all 32 channels with one operation.
//
// Units: LSU (load, store and gather to the external data memory), ALU (scalar), ALU_SIMD
// (vector arithmetic incl. CORDIC conditional add/subtract, multiply-shift, count
// leading zeros, select), AUX (element extract, insert, broadcast), RF_SIMDA (16 x 1024,
// one write, two reads), RF_SIMDB (16 x 1024, one write, one read), RF (16 x 32, one
// write, two reads), IU (long immediate) and GCU (fetch, jump, call, guard, lock). Four
// transport buses connect them, plus a direct path from the ALU_SIMD result to its
// operands. Each 64-bit instruction (see tta_pkg) moves up to four values; moves read
// and write in the same cycle and function-unit results appear one cycle after the
// trigger, except the LSU's, which locks the whole processor until memory answers.
//
// Interface: the 2048 x 64-bit instruction memory is loaded through imem_* while the
// core is held in reset; execution starts at address 0 when rst_n rises. The data
// memory port is word addressed (17 bits, 400 kB) with a request/grant handshake and a
// read-valid strobe. `lock` and `pc` are brought out for observation.
// The unit set, vector and register-file sizes, bus count, instruction width and memory
// sizes follow the document; the encoding, the unit-level timing and the memory
// handshake are this design's choices.
module tta_core
  import tta_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // instruction memory load port
  input  logic               imem_we,
  input  pc_t                imem_waddr,
  input  instr_t             imem_wdata,
  // data memory (on-package eDRAM)
  output logic               dmem_req,
  output logic               dmem_we,
  output logic [DMEM_AW-1:0] dmem_addr,
  output word_t              dmem_wdata,
  input  logic               dmem_gnt,
  input  logic               dmem_rvalid,
  input  word_t              dmem_rdata,
  // status
  output pc_t                pc,
  output logic               lock,
  output logic               exec,
  output logic               prog_err
);

  instr_t   ins;
  logic     imem_re, guard;
  word_t    ra;
  port_wr_t wr [NPORT];
  logic        limm_we;
  logic [30:0] limm;
  vec_t     bus [NBUS];

  logic [1:0][3:0] rfa_raddr, rf_raddr;
  logic [0:0][3:0] rfb_raddr;
  vec_t [1:0]      rfa_rdata;
  vec_t [0:0]      rfb_rdata;
  logic [1:0][EW-1:0] rf_rdata;

  vec_t  lsu_res, simd_res, aux_res;
  word_t alu_res, iu_val;
  logic  lsu_busy;

  assign lock = lsu_busy;

  gcu u_gcu (
    .clk, .rst_n, .lock,
    .t_we (wr[P_GCU_T].v), .t_op (gcu_op_e'(wr[P_GCU_T].sub[1:0])),
    .t_in (wr[P_GCU_T].data[EW-1:0]),
    .b_we (wr[P_BOOL].v), .b_in (wr[P_BOOL].data[0]),
    .imem_re, .pc, .exec, .ra, .guard
  );

  imem #(.WIDTH(IW), .AW(IMEM_AW)) u_imem (
    .clk, .re (imem_re), .raddr (pc), .rdata (ins),
    .we (imem_we), .waddr (imem_waddr), .wdata (imem_wdata)
  );

  tta_ic u_ic (
    .ins, .exec, .guard,
    .rfa_raddr, .rfa_rdata, .rfb_raddr, .rfb_rdata, .rf_raddr, .rf_rdata,
    .lsu_res, .alu_res, .simd_res, .aux_res, .iu_val, .ra_val (ra),
    .wr, .limm_we, .limm, .bus, .err (prog_err)
  );

  regfile #(.WIDTH(VW), .DEPTH(NVREG), .NR(2)) u_rf_simda (
    .clk, .rst_n, .we (wr[P_RFA].v), .waddr (wr[P_RFA].sub[3:0]), .wdata (wr[P_RFA].data),
    .raddr (rfa_raddr), .rdata (rfa_rdata)
  );

  regfile #(.WIDTH(VW), .DEPTH(NVREG), .NR(1)) u_rf_simdb (
    .clk, .rst_n, .we (wr[P_RFB].v), .waddr (wr[P_RFB].sub[3:0]), .wdata (wr[P_RFB].data),
    .raddr (rfb_raddr), .rdata (rfb_rdata)
  );

  regfile #(.WIDTH(EW), .DEPTH(NSREG), .NR(2)) u_rf (
    .clk, .rst_n, .we (wr[P_RF].v), .waddr (wr[P_RF].sub[3:0]), .wdata (wr[P_RF].data[EW-1:0]),
    .raddr (rf_raddr), .rdata (rf_rdata)
  );

  imm_unit u_iu (.clk, .rst_n, .we (limm_we), .imm (limm), .value (iu_val));

  scalar_alu u_alu (
    .clk, .rst_n,
    .a_we (wr[P_ALU_O].v), .a_in (wr[P_ALU_O].data[EW-1:0]),
    .t_we (wr[P_ALU_T].v), .t_op (alu_op_e'(wr[P_ALU_T].sub[3:0])),
    .t_in (wr[P_ALU_T].data[EW-1:0]),
    .result (alu_res)
  );

  simd_alu u_simd (
    .clk, .rst_n,
    .a_we (wr[P_SIMD_A].v), .a_in (wr[P_SIMD_A].data),
    .c_we (wr[P_SIMD_C].v), .c_in (wr[P_SIMD_C].data),
    .t_we (wr[P_SIMD_T].v), .t_op (simd_op_e'(wr[P_SIMD_T].sub)),
    .t_in (wr[P_SIMD_T].data),
    .result (simd_res)
  );

  aux_unit u_aux (
    .clk, .rst_n,
    .v_we (wr[P_AUX_V].v), .v_in (wr[P_AUX_V].data),
    .s_we (wr[P_AUX_S].v), .s_in (wr[P_AUX_S].data[EW-1:0]),
    .t_we (wr[P_AUX_T].v), .t_op (aux_op_e'(wr[P_AUX_T].sub[1:0])),
    .t_in (wr[P_AUX_T].data[EW-1:0]),
    .result (aux_res)
  );

  lsu u_lsu (
    .clk, .rst_n,
    .d_we (wr[P_LSU_O].v), .d_in (wr[P_LSU_O].data),
    .t_we (wr[P_LSU_T].v), .t_op (lsu_op_e'(wr[P_LSU_T].sub[1:0])),
    .t_in (wr[P_LSU_T].data[EW-1:0]),
    .result (lsu_res), .busy (lsu_busy),
    .mem_req (dmem_req), .mem_we (dmem_we), .mem_addr (dmem_addr), .mem_wdata (dmem_wdata),
    .mem_gnt (dmem_gnt), .mem_rvalid (dmem_rvalid), .mem_rdata (dmem_rdata)
  );

  a_valid_program: assert property (@(posedge clk) disable iff (!rst_n) !prog_err);

endmodule
