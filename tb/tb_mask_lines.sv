// Mask-lines workload: the synthetic diagnosis test set of the scan-time
// workload at 64 chains of 27 cells, applied with the uncoded mask register
// driven by 1, 2 and 4 Mask tester lines (each line adds one mask bit per
// clock, so loading a mask costs fewer stall cycles), and once with coded
// masks on 2 lines. More mask lines must give a shorter scan time; the price
// is more tester input channels. Scan times and their ratios to the time of
// a single scan chain are printed.
module tb_mask_lines;
  logic d [4];
  int   ck [4], fl [4], cl [4];
  int   checks, failures;

  ced_bench #(.N(64), .L(27), .R(32), .K(12), .CODED(1'b0), .PATTERNS(8),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b0), .SEED(11), .LINES(1))
    b1 (.done(d[0]), .checks(ck[0]), .failures(fl[0]), .clocks(cl[0]));
  ced_bench #(.N(64), .L(27), .R(32), .K(12), .CODED(1'b0), .PATTERNS(8),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b0), .SEED(11), .LINES(2))
    b2 (.done(d[1]), .checks(ck[1]), .failures(fl[1]), .clocks(cl[1]));
  ced_bench #(.N(64), .L(27), .R(32), .K(12), .CODED(1'b0), .PATTERNS(8),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b0), .SEED(11), .LINES(4))
    b4 (.done(d[2]), .checks(ck[2]), .failures(fl[2]), .clocks(cl[2]));
  ced_bench #(.N(64), .L(27), .R(32), .K(12), .CODED(1'b1), .PATTERNS(8),
              .RESP_CARE(8), .EXTRA_CARE(12), .MAXV(8192),
              .NEED_LOCKOUT(1'b0), .NEED_SESSIONS(1'b0), .MCM(1'b1), .SEED(11), .LINES(2))
    bc2 (.done(d[3]), .checks(ck[3]), .failures(fl[3]), .clocks(cl[3]));

  initial begin
    #500000000;
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1;  // let every bench clear done first
    wait (d[0] === 1'b1 && d[1] === 1'b1 && d[2] === 1'b1 && d[3] === 1'b1);
    checks = 0; failures = 0;
    for (int k = 0; k < 4; k++) begin checks += ck[k]; failures += fl[k]; end
    checks += 2;
    if (!(cl[1] < cl[0])) begin failures++; $display("FAIL 2 lines %0d not below 1 line %0d", cl[1], cl[0]); end
    if (!(cl[2] < cl[1])) begin failures++; $display("FAIL 4 lines %0d not below 2 lines %0d", cl[2], cl[1]); end
    $display("scan time, 64 chains, uncoded: 1 line %0d, 2 lines %0d, 4 lines %0d clocks; coded, 2 lines %0d clocks",
             cl[0], cl[1], cl[2], cl[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
