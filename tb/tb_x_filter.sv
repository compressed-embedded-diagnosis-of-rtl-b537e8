// Self-checking testbench for x_filter: random masks, scan outputs and
// expected values; a masked position must read 0 on both sides and an
// unmasked one must pass its value unchanged.
module tb_x_filter;
  localparam int N = 16;
  logic [N-1:0] mask, scan_out, expected, t_filt, d_filt;
  int checks = 0, failures = 0;

  x_filter #(.N(N)) dut (.mask, .scan_out, .expected, .t_filt, .d_filt);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 300; c++) begin
      mask = N'($urandom); scan_out = N'($urandom); expected = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (t_filt[i] !== (mask[i] ? scan_out[i] : 1'b0)) failures++;
        checks++;
        if (d_filt[i] !== (mask[i] ? expected[i] : 1'b0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
