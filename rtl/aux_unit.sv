// aux_unit: the vector-scalar unit (AUX) of the TTA processor. It moves single
// elements between the 1024-bit vector domain and the 32-bit scalar domain.
//
// Two operand registers, a vector V and a scalar S, are written by moves into their
// ports; a move into the trigger port carries the third operand and the opcode:
//   extract    trigger = index k    result lane 0 = V[k], other lanes 0
//   insert     trigger = index k    result = V with lane k replaced by S
//   broadcast  trigger = scalar x   every result lane = x
// The result register is readable in the cycle after the trigger (latency 1); an
// operand moved in the trigger's cycle is used by it. The document lists element
// extract, insert and broadcast among the processor's operations; placing them in the
// unit labelled AUX, and the port assignment, are this design's choices.
module aux_unit
  import tta_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    v_we,
  input  vec_t    v_in,
  input  logic    s_we,
  input  word_t   s_in,
  input  logic    t_we,
  input  aux_op_e t_op,
  input  word_t   t_in,
  output vec_t    result
);

  localparam int unsigned IDX_W = $clog2(LANES);

  vec_t  v_q, v_eff, res_d;
  word_t s_q, s_eff;
  logic [IDX_W-1:0] k;

  always_comb begin
    v_eff = v_we ? v_in : v_q;
    s_eff = s_we ? s_in : s_q;
    k     = t_in[IDX_W-1:0];
    res_d = '0;
    unique case (t_op)
      AUX_EXTRACT:   res_d[EW-1:0] = v_eff[k*EW +: EW];
      AUX_INSERT: begin
        res_d = v_eff;
        res_d[k*EW +: EW] = s_eff;
      end
      AUX_BROADCAST: res_d = {LANES{t_in}};
      default:       res_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= '0;
      s_q    <= '0;
      result <= '0;
    end else begin
      if (v_we) v_q <= v_in;
      if (s_we) s_q <= s_in;
      if (t_we) result <= res_d;
    end
  end

endmodule
