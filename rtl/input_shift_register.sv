// Input shift register of the decompressor.
//
// Assembles the low-bandwidth serial Data stream from the tester into an
// R-bit word that the phase shifter expands onto the scan chains. It is
// clocked by the ungated test clock, so it keeps taking one new bit (one new
// equation variable) per clock also while the scan chains are stalled; that is
// how a stall overcomes a decompression lockout.
//
// Interface: data_in is sampled on every rising clk edge while en is high
// (en is tied high in the top). Bit 0 holds the most recent bit, bit R-1 the
// oldest. Synchronous active-low reset clears the register.
// A plain shift register, as the architecture names it; its length is this
// design's choice.
module input_shift_register #(
  parameter int unsigned R = ced_pkg::SR_LEN_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         data_in,
  output logic [R-1:0] sr_q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  sr_q <= '0;
    else if (en) sr_q <= {sr_q[R-2:0], data_in};
  end

endmodule
