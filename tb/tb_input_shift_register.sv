// Self-checking testbench for input_shift_register: random serial data with
// random enable, compared against a reference bit queue, and a check that the
// register takes exactly one bit per enabled clock.
module tb_input_shift_register;
  localparam int R = 8;
  logic clk = 0, rst_n = 0, en = 0, data_in = 0;
  logic [R-1:0] sr_q;
  logic [R-1:0] ref_q;
  int checks = 0, failures = 0;

  input_shift_register #(.R(R)) dut (.clk, .rst_n, .en, .data_in, .sr_q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (sr_q !== '0) failures++;
    for (int c = 0; c < 400; c++) begin
      en = ($urandom_range(0, 3) != 0);
      data_in = $urandom_range(0, 1);
      @(posedge clk);
      if (en) ref_q = {ref_q[R-2:0], data_in};
      #1;
      checks++;
      if (sr_q !== ref_q) begin
        failures++;
        $display("mismatch cycle %0d: got %b want %b", c, sr_q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
