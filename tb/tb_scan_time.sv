// Scan-time workload: the same synthetic diagnosis test set applied with the
// uncoded mask register and with coded masks, at 64 chains of 27 cells (the
// default size) and at 16 chains of 103 cells (both about 1650 scan cells,
// the size of the benchmark cores evaluated for this architecture), plus a
// memory-constrained run with 64 words at 64 chains. Coded masks must need
// fewer clocks than uncoded masks at both chain counts. The ratios of
// single-chain time to multiple-chain time are printed for comparison.
module tb_scan_time;
  logic d [5];
  int   ck [5], fl [5], cl [5];
  int   checks, failures;

  ced_bench #(.N(64), .L(27), .R(32), .K(12), .CODED(1'b1), .PATTERNS(8),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b1), .SEED(11))
    b64c (.done(d[0]), .checks(ck[0]), .failures(fl[0]), .clocks(cl[0]));
  ced_bench #(.N(64), .L(27), .R(32), .K(12), .CODED(1'b0), .PATTERNS(8),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b0), .SEED(11))
    b64u (.done(d[1]), .checks(ck[1]), .failures(fl[1]), .clocks(cl[1]));
  ced_bench #(.N(64), .L(27), .R(32), .K(6), .CODED(1'b1), .PATTERNS(8),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b1), .SEED(11))
    b64m (.done(d[2]), .checks(ck[2]), .failures(fl[2]), .clocks(cl[2]));
  ced_bench #(.N(16), .L(103), .R(32), .K(12), .CODED(1'b1), .PATTERNS(6),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b1), .SEED(13))
    b16c (.done(d[3]), .checks(ck[3]), .failures(fl[3]), .clocks(cl[3]));
  ced_bench #(.N(16), .L(103), .R(32), .K(12), .CODED(1'b0), .PATTERNS(6),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b0), .SEED(13))
    b16u (.done(d[4]), .checks(ck[4]), .failures(fl[4]), .clocks(cl[4]));

  initial begin
    #500000000;
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1;  // let every bench clear done first
    wait (d[0] === 1'b1 && d[1] === 1'b1 && d[2] === 1'b1 && d[3] === 1'b1 && d[4] === 1'b1);
    checks = 0; failures = 0;
    for (int k = 0; k < 5; k++) begin checks += ck[k]; failures += fl[k]; end
    checks += 2;
    if (!(cl[0] < cl[1])) begin failures++; $display("FAIL 64 chains: coded %0d, uncoded %0d", cl[0], cl[1]); end
    if (!(cl[3] < cl[4])) begin failures++; $display("FAIL 16 chains: coded %0d, uncoded %0d", cl[3], cl[4]); end
    $display("scan time, 64 chains: coded %0d, 64-word memory %0d, uncoded %0d clocks", cl[0], cl[2], cl[1]);
    $display("scan time, 16 chains: coded %0d, uncoded %0d clocks", cl[3], cl[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
