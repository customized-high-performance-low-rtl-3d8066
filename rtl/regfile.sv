// regfile: a register file with one write port and NR asynchronous read ports. The
// processor uses three of them: RF_SIMDA (16 x 1024 bits, two read ports), RF_SIMDB
// (16 x 1024 bits, one read port) and the scalar RF (16 x 32 bits, two read ports).
//
// Reads are combinational and return the value stored before the current clock edge;
// a write takes effect at the edge, so a value moved into a register in cycle t can be
// read from cycle t+1. All entries reset to zero.
// The vector sizes and port counts of RF_SIMDA and RF_SIMDB follow the document; the
// scalar RF's depth and port count and the reset are this design's choices.
module regfile #(
  parameter int unsigned WIDTH = 1024,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NR    = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [NR-1:0][AW-1:0]    raddr,
  output logic [NR-1:0][WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb
    for (int p = 0; p < NR; p++) rdata[p] = mem[raddr[p]];

endmodule
