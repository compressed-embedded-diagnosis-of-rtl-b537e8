// Self-checking testbench for mask_code_register: random code bits against a
// reference, checking code_q after every clock and that code_next always
// shows the value code_q takes at the next edge.
module tb_mask_code_register;
  localparam int K = 5;
  logic clk = 0, rst_n = 0;
  logic [0:0] mask_in = '0;
  logic [K-1:0] code_q, code_next, ref_q;
  int checks = 0, failures = 0;

  mask_code_register #(.K(K), .LINES(1)) dut (.clk, .rst_n, .mask_in, .code_q, .code_next);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] predicted;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_q = '0;
    checks++; if (code_q !== '0) failures++;
    for (int c = 0; c < 400; c++) begin
      mask_in = 1'($urandom);
      #1;
      predicted = {mask_in, ref_q[K-1:1]};
      checks++;
      if (code_next !== predicted) failures++;
      @(posedge clk);
      ref_q = predicted;
      #1;
      checks++;
      if (code_q !== ref_q) begin
        failures++;
        $display("code %b want %b", code_q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
