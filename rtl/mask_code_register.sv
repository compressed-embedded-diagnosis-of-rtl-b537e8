// Mask code register (encoded X filtering).
//
// Replaces the n-bit mask register by a K-bit register, K = ceil(log2 m) for
// m distinct masks, whose contents address the mask memory. Its length does
// not depend on the number of scan chains. It is loaded from the Mask tester
// line(s) on every clock exactly like the uncoded mask register: new bits
// enter at bit K-1 and move towards bit 0, so a new code costs between 0 and
// K-1 stall cycles depending on how well it overlaps the shifted previous
// code.
//
// Interface: code_q is the current code; code_next is the value code_q will
// take at the next clock edge, used as the read address of a memory with a
// registered output so that the memory output always equals mem[code_q].
// Synchronous active-low reset clears the code.
module mask_code_register #(
  parameter int unsigned K     = ced_pkg::CODE_W_DEF,
  parameter int unsigned LINES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LINES-1:0] mask_in,
  output logic [K-1:0]     code_q,
  output logic [K-1:0]     code_next
);

  always_comb begin
    if (!rst_n) code_next = '0;
    else        code_next = {mask_in, code_q[K-1:LINES]};
  end

  always_ff @(posedge clk) code_q <= code_next;

endmodule
