// End-to-end testbench of ced_top at its default size (64 scan chains of 27
// cells, 32-bit input shift register, 12-bit mask code, 4096-word mask
// memory): one diagnosis session of ten patterns followed by a BIST-mode
// run. The default memory holds every mask of this test set, so a single
// session is expected, lockout stalls are counted but not required, and
// spare memory words must serve as extra codes for masks already coded.
module tb_ced_top_full;
  logic done;
  int   checks, failures;

  ced_bench #(.N(ced_pkg::N_CHAINS_DEF), .L(ced_pkg::CHAIN_LEN_DEF),
              .R(ced_pkg::SR_LEN_DEF), .K(ced_pkg::CODE_W_DEF),
              .CODED(1'b1), .FULL(1'b1), .PATTERNS(10),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(4096),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .NEED_MCM(1'b1))
    b (.done, .checks, .failures, .clocks());

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;  // let every bench clear done first
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
