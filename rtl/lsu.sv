// lsu: the load-store unit of the TTA processor, which reaches the large on-package
// data memory (eDRAM holding the Gaussian-mixture parameters and the audio input
// queue) and provides the gather load.
//
// A move into the data port sets the operand register D (store data in lane 0, or one
// offset per lane for a gather). A move into the trigger port carries the word address
// and the opcode:
//   ld      result lane 0 = mem[addr], other lanes 0
//   st      mem[addr] = D lane 0
//   gather  result lane i = mem[addr + D lane i], i = 0..31, one word per access in
//           lane order (a constant base plus a per-gammatone-channel offset)
// The memory port is a request/grant handshake with a read-data valid strobe, so the
// memory latency is free: `req` (with `we`, `addr`, `wdata`) is held until `gnt`; a
// read's data arrives with `rvalid` on a later cycle. One access is outstanding at a
// time. While an operation is in progress `busy` is high and the processor is locked
// (stalled); the result register is valid when `busy` falls. A gather takes at least
// 32 accesses.
// The gather's function follows the document; that offsets come from a vector operand,
// the word addressing and the memory handshake are this design's choices.
module lsu
  import tta_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                d_we,
  input  vec_t                d_in,
  input  logic                t_we,
  input  lsu_op_e             t_op,
  input  word_t               t_in,
  output vec_t                result,
  output logic                busy,
  // data memory port
  output logic                mem_req,
  output logic                mem_we,
  output logic [DMEM_AW-1:0]  mem_addr,
  output word_t               mem_wdata,
  input  logic                mem_gnt,
  input  logic                mem_rvalid,
  input  word_t               mem_rdata
);

  localparam int unsigned IDX_W = $clog2(LANES);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;

  state_e           state;
  lsu_op_e          op_q;
  vec_t             d_q, d_eff;
  word_t            base_q;
  logic [IDX_W-1:0] lane_q;

  assign d_eff = d_we ? d_in : d_q;
  assign busy  = (state != S_IDLE);

  always_comb begin
    mem_req   = (state == S_REQ);
    mem_we    = (op_q == LSU_ST);
    mem_wdata = d_q[EW-1:0];
    if (op_q == LSU_GATHER) mem_addr = DMEM_AW'(base_q + d_q[lane_q*EW +: EW]);
    else                    mem_addr = DMEM_AW'(base_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= LSU_LD;
      d_q    <= '0;
      base_q <= '0;
      lane_q <= '0;
      result <= '0;
    end else begin
      if (d_we) d_q <= d_in;
      unique case (state)
        S_IDLE: if (t_we) begin
          op_q   <= t_op;
          base_q <= t_in;
          lane_q <= '0;
          d_q    <= d_eff;
          state  <= S_REQ;
          if (t_op != LSU_ST) result <= '0;
        end
        S_REQ: if (mem_gnt) state <= (op_q == LSU_ST) ? S_IDLE : S_WAIT;
        S_WAIT: if (mem_rvalid) begin
          if (op_q == LSU_GATHER) begin
            result[lane_q*EW +: EW] <= mem_rdata;
            lane_q <= lane_q + 1'b1;
            state  <= (lane_q == IDX_W'(LANES - 1)) ? S_IDLE : S_REQ;
          end else begin
            result[EW-1:0] <= mem_rdata;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The processor is locked while the unit is busy, so no new operation may arrive.
  a_no_trigger_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !t_we);
  a_rvalid_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                               mem_rvalid |-> state == S_WAIT);

endmodule
