// Self-checking testbench for mask_register. First replays the 4-chain worked
// example: the response X0XX X10X XXXX 1XXX (chain 0 .. chain 3, rightmost
// character of each chain leaves first) needs mask 0000 at the first shift and
// mask 0010 (written chain 3 .. chain 0) at the second. The testbench derives
// both masks from the response string and the smallest number of clocks
// between them from the shift rule, which must be 3 (two stall cycles,
// through 1000 and 0100). Then checks that a lone 1 for the top chain (bit 0)
// after an all-0 mask takes n-1 stall cycles, and random loading against a
// reference model, with one and with two mask lines.
module tb_mask_register;
  localparam int N = 4;
  localparam int N8 = 8;
  logic clk = 0, rst_n = 0;
  logic [0:0] mask_in = '0;
  logic [1:0] mask_in2 = '0;
  logic [N-1:0] mask_q;
  logic [N8-1:0] mask_q2, ref2;
  int checks = 0, failures = 0;

  mask_register #(.N(N), .LINES(1)) dut (.clk, .rst_n, .mask_in, .mask_q);
  mask_register #(.N(N8), .LINES(2)) dut2 (.clk, .rst_n, .mask_in(mask_in2), .mask_q(mask_q2));

  always #5 clk = ~clk;

  task automatic step(input logic b, input logic [N-1:0] want);
    mask_in = b;
    @(posedge clk); #1;
    checks++;
    if (mask_q !== want) begin
      failures++;
      $display("mask %b want %b", mask_q, want);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int clocks;
    string resp;
    logic [N-1:0] m0, m1;
    int cmin;
    // masks of the worked example, derived from the response
    resp = "X0XXX10XXXXX1XXX";
    for (int c = 0; c < N; c++) begin
      m0[c] = resp[4 * c + 3] != "X";
      m1[c] = resp[4 * c + 2] != "X";
    end
    checks++; if (m0 !== 4'b0000) failures++;
    checks++; if (m1 !== 4'b0010) failures++;
    cmin = 0;
    for (int c = N; c >= 1; c--) if ((m0 >> c) == (m1 & ((1 << (N - c)) - 1))) cmin = c;
    checks++;
    if (cmin != 3) begin failures++; $display("clocks between masks %0d, want 3", cmin); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (mask_q !== '0) failures++;
    // worked example: 0000 -> 1000 (stall) -> 0100 (stall) -> 0010 (shift)
    step(1'b1, 4'b1000);
    step(1'b0, 4'b0100);
    step(1'b0, 4'b0010);
    // all-0 mask, then a lone 1 in bit 0: n clocks, n-1 of them stalls
    step(1'b0, 4'b0001);
    step(1'b0, 4'b0000);
    clocks = 0;
    mask_in = 1'b1;
    do begin
      @(posedge clk); #1; clocks++;
      mask_in = 1'b0;
    end while (mask_q !== 4'b0001 && clocks < 10);
    checks++;
    if (clocks - 1 != N - 1) begin
      failures++;
      $display("stalls %0d, want %0d", clocks - 1, N - 1);
    end
    // random loading, two mask lines
    ref2 = mask_q2;
    for (int c = 0; c < 300; c++) begin
      mask_in2 = 2'($urandom);
      @(posedge clk);
      ref2 = {mask_in2, ref2[N8-1:2]};
      #1;
      checks++;
      if (mask_q2 !== ref2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
