// imm_unit: the immediate unit (IU) of the TTA processor. A long-immediate instruction
// (template bit set) carries a 31-bit constant, which this unit sign-extends to 32 bits
// and holds in its register; moves read it as a source from the next cycle on, as many
// times as needed, until the next long-immediate instruction overwrites it.
// The document shows the unit only by name; the single register and the 31-bit field
// are this design's choices.
module imm_unit
  import tta_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,     // long-immediate instruction executes this cycle
  input  logic [30:0] imm,    // immediate field of the instruction
  output word_t       value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  value <= '0;
    else if (we) value <= word_t'($signed(imm));
  end

endmodule
