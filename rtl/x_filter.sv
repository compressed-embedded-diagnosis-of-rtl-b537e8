// X filter.
//
// Two AND gates per scan chain: one masks the chain's scan output, the other
// the decompressed expected value for it. A 0 in the mask removes a scan
// cell that does not capture the targeted fault effect (an X in the
// fault-free response) from both sides, so the comparator sees only care
// bits. Purely combinational; follows the architecture as drawn.
module x_filter #(
  parameter int unsigned N = ced_pkg::N_CHAINS_DEF
) (
  input  logic [N-1:0] mask,
  input  logic [N-1:0] scan_out,
  input  logic [N-1:0] expected,
  output logic [N-1:0] t_filt,
  output logic [N-1:0] d_filt
);

  assign t_filt = scan_out & mask;
  assign d_filt = expected & mask;

endmodule
