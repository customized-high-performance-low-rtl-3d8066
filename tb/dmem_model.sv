// dmem_model: behavioural model of the processor's on-package data memory (an eDRAM of
// 400 kB, 102400 words of 32 bits), for simulation only. It answers the request/grant
// handshake with a random number (0..MAX_GNT_WAIT) of wait cycles before the grant and
// returns read data with `rvalid` 1 + (0..MAX_RD_EXTRA) cycles after the grant. It
// keeps counts of reads and writes for the testbenches.
module dmem_model #(
  parameter int unsigned WORDS        = 102400,
  parameter int unsigned AW           = 17,
  parameter int unsigned MAX_GNT_WAIT = 2,
  parameter int unsigned MAX_RD_EXTRA = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic          gnt,
  output logic          rvalid,
  output logic [31:0]   rdata
);

  logic [31:0] mem [WORDS];
  int unsigned wait_cnt, rd_cnt;
  logic        rd_pending;
  logic [31:0] rd_data_q;
  int unsigned n_reads, n_writes;

  assign gnt = req && (wait_cnt == 0) && !rd_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_cnt   <= 0;
      rd_cnt     <= 0;
      rd_pending <= 1'b0;
      rvalid     <= 1'b0;
      rdata      <= '0;
      rd_data_q  <= '0;
      n_reads    <= 0;
      n_writes   <= 0;
    end else begin
      rvalid <= 1'b0;
      if (gnt) begin
        wait_cnt <= $urandom_range(0, MAX_GNT_WAIT);
        if (we) begin
          mem[addr] <= wdata;
          n_writes  <= n_writes + 1;
        end else begin
          rd_pending <= 1'b1;
          rd_cnt     <= $urandom_range(0, MAX_RD_EXTRA);
          rd_data_q  <= mem[addr];
          n_reads    <= n_reads + 1;
        end
      end else if (req && wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1;
      end
      if (rd_pending) begin
        if (rd_cnt == 0) begin
          rvalid     <= 1'b1;
          rdata      <= rd_data_q;
          rd_pending <= 1'b0;
        end else begin
          rd_cnt <= rd_cnt - 1;
        end
      end
    end
  end

endmodule
