// Integrated comparator / MISR.
//
// One flip-flop per scan chain, each fed by a 2:1 multiplexer and an XOR
// with the filtered scan output T[i]:
//   BIST mode (bist_mode = 1): q[i] <= q[i+1] ^ T[i], q[n-1] <= fb ^ T[n-1],
//     a multiple-input signature register whose feedback fb is the XOR of the
//     taps given by ced_pkg::misr_tap() (tap t reads q[n-t]).
//   Diagnosis mode (bist_mode = 0): q[i] <= D[i] ^ T[i], i.e. the register
//     holds the mismatch between the filtered expected and computed
//     responses of the last compared shift.
// failure_detect is the OR of the register in diagnosis mode (held low in
// BIST mode) and result is q[0], the serial output. The register is clocked
// only when en is high (no stall), like the scan chains.
//
// Interface: T and D are sampled at the rising edge; failure_detect and
// result refer to the compare of the previous enabled edge. q is brought out
// for a fail-data streaming engine. Synchronous active-low reset clears the
// register (the MISR seed). The multiplexer/XOR structure and the serial
// result follow the architecture; the feedback taps, the reset and the
// suppression of failure_detect in BIST mode are this design's choices.
module comp_misr #(
  parameter int unsigned N = ced_pkg::N_CHAINS_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         bist_mode,
  input  logic [N-1:0] d,
  input  logic [N-1:0] t,
  output logic [N-1:0] q,
  output logic         failure_detect,
  output logic         result
);

  function automatic logic [N-1:0] fb_mask();
    logic [N-1:0] m;
    m = '0;
    for (int k = 0; k < 4; k++) begin
      int unsigned tp;
      tp = ced_pkg::misr_tap(N, k);
      if (tp != 0 && tp <= N) m[N-tp] = 1'b1;
    end
    return m;
  endfunction

  localparam logic [N-1:0] FB = fb_mask();

  logic         fb;
  logic [N-1:0] mux;

  always_comb begin
    fb  = ^(q & FB);
    mux = bist_mode ? {fb, q[N-1:1]} : d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= mux ^ t;
  end

  assign failure_detect = !bist_mode && (|q);
  assign result         = q[0];

endmodule
