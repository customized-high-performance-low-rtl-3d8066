// gcu: the global control unit of the TTA processor. It fetches instructions,
// executes jumps and calls, holds the boolean guard register and applies the global
// lock.
//
// Fetch is a two-stage pipeline: `pc` addresses the instruction memory, whose
// registered output is the instruction being executed. A move into the trigger port
// (jump or call, target in the data) redirects `pc`, so the one instruction after a
// jump (its delay slot) is still executed, and the target executes two cycles after
// the jump. A call also saves the address after the delay slot in `ra`. While `lock`
// is high (a function unit with a data-dependent latency is busy) the pc and the
// fetched instruction hold and no move executes. The boolean register, written by a
// move (bit 0 of the bus), guards later moves.
// The document names this unit only; the one delay slot, the call/return scheme and
// the single boolean register are this design's choices.
module gcu
  import tta_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    lock,        // stall request from a busy unit
  input  logic    t_we,        // jump / call trigger (already gated by `exec`)
  input  gcu_op_e t_op,
  input  word_t   t_in,        // target address
  input  logic    b_we,        // boolean register write
  input  logic    b_in,
  output logic    imem_re,
  output pc_t     pc,          // address being fetched
  output logic    exec,        // the fetched instruction executes this cycle
  output word_t   ra,          // return address of the last call
  output logic    guard        // boolean register
);

  logic ir_valid;

  assign imem_re = !lock;
  assign exec    = ir_valid && !lock;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      ir_valid <= 1'b0;
      ra       <= '0;
      guard    <= 1'b0;
    end else if (!lock) begin
      ir_valid <= 1'b1;
      if (t_we) begin
        pc <= pc_t'(t_in);
        if (t_op == GCU_CALL) ra <= word_t'(pc) + 1;
      end else begin
        pc <= pc + 1'b1;
      end
      if (b_we) guard <= b_in;
    end
  end

  a_no_move_when_locked: assert property (@(posedge clk) disable iff (!rst_n)
                                          lock |-> !(t_we || b_we));

endmodule
