// Embedded mask memory.
//
// A 2^K x n single-read, single-write memory storing the masks selected by
// the mask code register. It stands in for an on-chip SRAM, possibly one the
// chip already has for functional use, and is reprogrammed between
// diagnosis sessions when the masks of the whole test set do not fit.
//
// Interface: writes take effect at the rising clk edge when we is high.
// The read is synchronous: rdata <= mem[raddr] at every edge (old data on a
// same-address write). Like an SRAM macro it has no reset: the array must be
// written before use. While the mask code register is held in reset it
// addresses word 0, so right after reset rdata already shows mem[0]. The
// synchronous read and the write port are this design's choice.
module mask_memory #(
  parameter int unsigned N = ced_pkg::N_CHAINS_DEF,
  parameter int unsigned K = ced_pkg::CODE_W_DEF
) (
  input  logic         clk,
  input  logic         we,
  input  logic [K-1:0] waddr,
  input  logic [N-1:0] wdata,
  input  logic [K-1:0] raddr,
  output logic [N-1:0] rdata
);

  logic [N-1:0] mem [2**K];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) rdata <= mem[raddr];

endmodule
