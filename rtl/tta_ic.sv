// tta_ic: the transport network of the TTA processor: four general transport buses
// plus the direct connection from the SIMD ALU result to its own operand inputs.
//
// It decodes one instruction word (see tta_pkg for the encoding). For every move slot
// whose guard passes, it selects the source onto the slot's bus and routes the bus to
// the destination port. Register-file sources get a read port each, allocated in slot
// order (RF_SIMDA has two read ports, RF_SIMDB one, the scalar RF two); scalar sources
// are zero-extended onto the 1024-bit buses and scalar destinations use bits [31:0].
// The decoding is combinational: sources are read and destinations written in the
// same cycle. In a long-immediate instruction only slots 0 and 1 move and the
// immediate is handed to the immediate unit. Nothing moves while `exec` is low.
// A program that over-subscribes a read port or writes one port twice in a cycle is
// invalid; `err` flags it (the core asserts that it never rises).
// Every bus reaches every socket here; the document's buses were pruned by hand to a
// subset of connections, a pattern this design does not restrict programs to.
module tta_ic
  import tta_pkg::*;
#(
  parameter int unsigned NR_RFA = 2,
  parameter int unsigned NR_RFB = 1,
  parameter int unsigned NR_RF  = 2
) (
  input  instr_t   ins,
  input  logic     exec,
  input  logic     guard,
  // register-file read ports
  output logic [NR_RFA-1:0][3:0] rfa_raddr,
  input  vec_t [NR_RFA-1:0]      rfa_rdata,
  output logic [NR_RFB-1:0][3:0] rfb_raddr,
  input  vec_t [NR_RFB-1:0]      rfb_rdata,
  output logic [NR_RF-1:0][3:0]  rf_raddr,
  input  logic [NR_RF-1:0][EW-1:0] rf_rdata,
  // function-unit result registers
  input  vec_t     lsu_res,
  input  word_t    alu_res,
  input  vec_t     simd_res,
  input  vec_t     aux_res,
  input  word_t    iu_val,
  input  word_t    ra_val,
  // moves into unit ports
  output port_wr_t wr [NPORT],
  output logic        limm_we,
  output logic [30:0] limm,
  output vec_t     bus [NBUS],
  output logic     err
);

  function automatic port_e dst_port(logic [6:0] d);
    if (d < 7'd16)                   return P_RFA;
    if (d < 7'd32)                   return P_RFB;
    if (d < 7'd48)                   return P_RF;
    unique case (d)
      D_BOOL:   return P_BOOL;
      D_LSU_O:  return P_LSU_O;
      D_ALU_O:  return P_ALU_O;
      D_SIMD_A: return P_SIMD_A;
      D_SIMD_C: return P_SIMD_C;
      D_AUX_V:  return P_AUX_V;
      D_AUX_S:  return P_AUX_S;
      default: ;
    endcase
    if (d >= 7'd64 && d < 7'd68)     return P_LSU_T;
    if (d >= 7'd68 && d < 7'd72)     return P_AUX_T;
    if (d >= 7'd72 && d < 7'd74)     return P_GCU_T;
    if (d >= 7'd80 && d < 7'd96)     return P_ALU_T;
    if (d >= 7'd96)                  return P_SIMD_T;
    return P_NONE;
  endfunction

  logic  limm_ins;
  move_t mv   [NBUS];
  logic  act  [NBUS];
  int unsigned na, nb, ns;
  logic [1:0] rport [NBUS];
  port_e pdst [NBUS];
  logic  rd_err, dst_err;

  assign err = rd_err || dst_err;

  always_comb begin
    limm_ins = ins[63];
    limm_we  = exec && limm_ins;
    limm     = {ins[60], ins[59:30]};
    rd_err   = 1'b0;
    rfa_raddr = '0;
    rfb_raddr = '0;
    rf_raddr  = '0;
    na = 0; nb = 0; ns = 0;

    // slot decode, guards and read-port allocation
    for (int k = 0; k < NBUS; k++) begin
      mv[k]    = slot_of(ins, k);
      rport[k] = '0;
      if (mv[k].guard == G_NOP || (limm_ins && k >= 2)) act[k] = 1'b0;
      else if (mv[k].guard == G_TRUE)                    act[k] = exec && guard;
      else if (mv[k].guard == G_FALSE)                   act[k] = exec && !guard;
      else                                               act[k] = exec;
      if (act[k]) begin
        if (mv[k].src < S_RFB) begin
          if (na < NR_RFA) begin rport[k] = 2'(na); rfa_raddr[na] = mv[k].src[3:0]; end
          else rd_err = 1'b1;
          na++;
        end else if (mv[k].src < S_RF) begin
          if (nb < NR_RFB) begin rport[k] = 2'(nb); rfb_raddr[nb] = mv[k].src[3:0]; end
          else rd_err = 1'b1;
          nb++;
        end else if (mv[k].src < S_LSU) begin
          if (ns < NR_RF) begin rport[k] = 2'(ns); rf_raddr[ns] = mv[k].src[3:0]; end
          else rd_err = 1'b1;
          ns++;
        end
      end
    end

  end

  // bus values (register-file read data arrives from the addresses chosen above)
  always_comb begin
    for (int k = 0; k < NBUS; k++) begin
      bus[k] = '0;
      if (mv[k].src < S_RFB)      bus[k] = rfa_rdata[rport[k]];
      else if (mv[k].src < S_RF)  bus[k] = rfb_rdata[rport[k]];
      else if (mv[k].src < S_LSU) bus[k] = VW'(rf_rdata[rport[k]]);
      else begin
        unique case (mv[k].src)
          S_LSU:   bus[k] = lsu_res;
          S_ALU:   bus[k] = VW'(alu_res);
          S_SIMD:  bus[k] = simd_res;
          S_AUX:   bus[k] = aux_res;
          S_IU:    bus[k] = VW'(iu_val);
          S_RA:    bus[k] = VW'(ra_val);
          S_BOOL:  bus[k] = VW'(guard);
          default: bus[k] = '0;
        endcase
      end
    end

  end

  // destination routing
  always_comb begin
    dst_err = 1'b0;
    for (int p = 0; p < NPORT; p++) wr[p] = '0;
    for (int k = 0; k < NBUS; k++) begin
      pdst[k] = dst_port(mv[k].dst);
      if (act[k] && pdst[k] != P_NONE) begin
        if (wr[pdst[k]].v) dst_err = 1'b1;
        wr[pdst[k]].v    = 1'b1;
        wr[pdst[k]].sub  = mv[k].dst[4:0];
        wr[pdst[k]].data = bus[k];
      end
    end

    // direct SIMD-ALU result connection
    if (exec && ins[62:61] == 2'd1) begin
      if (wr[P_SIMD_A].v) dst_err = 1'b1;
      wr[P_SIMD_A].v    = 1'b1;
      wr[P_SIMD_A].data = simd_res;
    end else if (exec && ins[62:61] == 2'd2) begin
      if (wr[P_SIMD_C].v) dst_err = 1'b1;
      wr[P_SIMD_C].v    = 1'b1;
      wr[P_SIMD_C].data = simd_res;
    end
  end

endmodule
