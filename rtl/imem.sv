// imem: the on-chip instruction memory, 2048 words of 64 bits (11-bit address), as in
// the document. Reads are synchronous: with `re` high, the word at `raddr` appears on
// `rdata` after the clock edge and is held while `re` is low (so a stalled processor
// keeps its current instruction). A separate write port loads the program.
module imem #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = 11
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
