// Self-checking testbench for phase_shifter at its default size. The expected
// channel values are recomputed here from the tap rule: output j of 2n uses
// q = j / R, t0 = j mod R and XORs bits t0, (t0+1+q) mod R, (t0+4+3q) mod R.
// Also checks single-bit inputs (linearity of the network) and random words.
module tb_phase_shifter;
  localparam int N = ced_pkg::N_CHAINS_DEF;
  localparam int R = ced_pkg::SR_LEN_DEF;
  logic [R-1:0] sr;
  logic [N-1:0] scan_in, expected;
  int checks = 0, failures = 0;

  phase_shifter #(.N(N), .R(R)) dut (.sr, .scan_in, .expected);

  function automatic logic ref_out(int j, logic [R-1:0] v);
    int q, a, b, c;
    q = j / R;
    a = j % R;
    b = (a + 1 + q) % R;
    c = (a + 4 + 3 * q) % R;
    return v[a] ^ v[b] ^ v[c];
  endfunction

  task automatic check_all();
    logic [2*N-1:0] got;
    #1;
    got = {expected, scan_in};
    for (int j = 0; j < 2 * N; j++) begin
      checks++;
      if (got[j] !== ref_out(j, sr)) begin
        failures++;
        if (failures < 10) $display("channel %0d wrong for sr=%h", j, sr);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sr = '0; check_all();
    for (int b = 0; b < R; b++) begin
      sr = '0; sr[b] = 1'b1; check_all();
    end
    for (int k = 0; k < 200; k++) begin
      for (int w = 0; w < R; w += 32) sr[w +: 32] = $urandom;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
