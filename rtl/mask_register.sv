// Serial mask register (uncoded X filtering).
//
// Holds one mask bit per scan chain: bit i = 1 lets chain i and its expected
// value through the X filter. It is loaded from the Mask tester line(s) on
// every clock, stall or not; new bits enter at bit n-1 and move one position
// per clock towards bit 0 (the top scan chain). A mask that differs from the
// shifted previous one therefore costs stall cycles: placing a lone 1 in
// bit 0 after an all-0 mask takes n-1 stalls plus the shift cycle itself.
//
// Interface: with LINES tester lines, LINES bits enter per clock
// (mask_in[LINES-1] ends up highest). mask_q is the mask applied in the
// current cycle. Synchronous active-low reset clears it (everything masked).
// Shift direction and the one-bit-per-clock loading follow the architecture;
// LINES defaults to its single mask line.
module mask_register #(
  parameter int unsigned N     = ced_pkg::N_CHAINS_DEF,
  parameter int unsigned LINES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LINES-1:0] mask_in,
  output logic [N-1:0]     mask_q
);

  always_ff @(posedge clk) begin
    if (!rst_n) mask_q <= '0;
    else        mask_q <= {mask_in, mask_q[N-1:LINES]};
  end

endmodule
