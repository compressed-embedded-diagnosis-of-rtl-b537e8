// Self-checking testbench for comp_misr with four chains, as in the
// architecture's drawing. Diagnosis mode: the register must hold D ^ T of
// the last enabled edge, failure_detect must flag any mismatch and result
// must be bit 0. BIST mode: the register must follow a 4-bit MISR with
// feedback q[0] ^ q[1] into bit 3 (taps 4 and 3), computed here by hand.
module tb_comp_misr;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, en = 0, bist_mode = 0;
  logic [N-1:0] d = '0, t = '0, q, ref_q;
  logic failure_detect, result;
  int checks = 0, failures = 0, n_fail = 0, n_pass = 0;

  comp_misr #(.N(N)) dut (.clk, .rst_n, .en, .bist_mode, .d, .t, .q,
                          .failure_detect, .result);

  always #5 clk = ~clk;

  task automatic check_out();
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("q %b want %b (bist %0d)", q, ref_q, bist_mode);
    end
    checks++;
    if (result !== ref_q[0]) failures++;
    checks++;
    if (failure_detect !== (!bist_mode && ref_q != 0)) failures++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mode = 0; mode < 2; mode++) begin
      rst_n = 0; bist_mode = mode[0];
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      ref_q = '0;
      check_out();
      for (int c = 0; c < 400; c++) begin
        en = ($urandom_range(0, 3) != 0);
        d  = N'($urandom);
        // mostly matching responses in diagnosis mode
        t  = ($urandom_range(0, 3) == 0) ? N'($urandom) : d;
        @(posedge clk);
        if (en) begin
          if (bist_mode)
            ref_q = {ref_q[0] ^ ref_q[1], ref_q[3:1]} ^ t;
          else
            ref_q = d ^ t;
          if (!bist_mode && ref_q != 0) n_fail++;
          if (!bist_mode && ref_q == 0) n_pass++;
        end
        #1;
        check_out();
      end
    end
    if (n_fail == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
