// Double XOR decorrelation network (extended phase shifter).
//
// Expands the R-bit input shift register into 2n channels: n scan-in values
// for the pattern being loaded and n expected-response values for the
// response being unloaded at the same time. Each output is the XOR of three
// register bits chosen by ced_pkg::ps_tap(). The tester-side encoder solves
// linear equations over GF(2) through exactly these taps.
//
// Interface: purely combinational. scan_in[i] drives scan chain i, expected[i]
// is the fault-free value expected at the output of chain i. The doubling of
// the channel count follows the architecture; the particular XOR taps are
// this design's choice.
module phase_shifter #(
  parameter int unsigned N = ced_pkg::N_CHAINS_DEF,
  parameter int unsigned R = ced_pkg::SR_LEN_DEF
) (
  input  logic [R-1:0] sr,
  output logic [N-1:0] scan_in,
  output logic [N-1:0] expected
);

  logic [2*N-1:0] ch;

  for (genvar j = 0; j < 2 * N; j++) begin : g_ch
    localparam int unsigned T0 = ced_pkg::ps_tap(j, 0, R);
    localparam int unsigned T1 = ced_pkg::ps_tap(j, 1, R);
    localparam int unsigned T2 = ced_pkg::ps_tap(j, 2, R);
    assign ch[j] = sr[T0] ^ sr[T1] ^ sr[T2];
  end

  assign scan_in  = ch[N-1:0];
  assign expected = ch[2*N-1:N];

endmodule
