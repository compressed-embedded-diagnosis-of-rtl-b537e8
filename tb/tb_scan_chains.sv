// Self-checking testbench for scan_chains: random shift, capture and stall
// (clk_en low) cycles against a reference model of n chains of L cells.
module tb_scan_chains;
  localparam int N = 3, L = 5;
  logic clk = 0, rst_n = 0, clk_en = 0, scan_en = 0;
  logic [N-1:0] scan_in = '0, scan_out;
  logic [N-1:0][L-1:0] capture_d = '0, cells, ref_c;
  int checks = 0, failures = 0, n_shift = 0, n_cap = 0, n_stall = 0;

  scan_chains #(.N(N), .L(L)) dut (.clk, .rst_n, .clk_en, .scan_en, .scan_in,
                                   .capture_d, .cells, .scan_out);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_c = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      clk_en  = ($urandom_range(0, 4) != 0);
      scan_en = ($urandom_range(0, 5) != 0);
      scan_in = N'($urandom);
      for (int i = 0; i < N; i++) capture_d[i] = L'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (scan_out[i] !== ref_c[i][L-1]) failures++;
      end
      @(posedge clk);
      if (clk_en && scan_en) begin
        n_shift++;
        for (int i = 0; i < N; i++) ref_c[i] = {ref_c[i][L-2:0], scan_in[i]};
      end else if (clk_en) begin
        n_cap++;
        ref_c = capture_d;
      end else n_stall++;
      #1;
      checks++;
      if (cells !== ref_c) begin
        failures++;
        $display("cycle %0d: cells %h want %h", c, cells, ref_c);
      end
    end
    if (n_shift == 0 || n_cap == 0 || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
