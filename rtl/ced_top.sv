// Compressed embedded diagnosis architecture for a scan-based logic core.
//
// The tester drives three input channels: Data (decompressor variables),
// Mask (mask bits or mask code bits) and Stall. One output channel, Result,
// together with failure_detect, reports failing scan cells.
//
//   data_in -> input_shift_register -> phase_shifter -> scan_in  (pattern i+1)
//                                                    \-> expected (response i)
//   scan_chains.scan_out (response i) --+
//   expected ---------------------------+-> x_filter (AND with mask) -> comp_misr
//   mask_in -> mask_register              (MASK_CODED = 0), or
//   mask_in -> mask_code_register -> mask_memory (MASK_CODED = 1, default)
//
// Timing. The input shift register and the mask (code) register shift on
// every clock. Stall = 1 freezes the scan chains and the comparator/MISR
// (the gated scan clock, written here as a clock enable), so stall cycles
// feed new decompressor variables and new mask bits without moving the
// chains. In a cycle with stall = 0 and scan_en = 1 the chains shift once;
// the bits leaving the chains are filtered by the mask held in that cycle
// and compared (diagnosis) or compacted (BIST) at the same edge. In a cycle
// with stall = 0 and scan_en = 0 the chains capture core_resp; the tester
// then holds an all-0 mask so that nothing is compared. failure_detect and
// result describe the compare of the last enabled edge.
//
// In coded mode the mask applied in a cycle is mem[code_q]; the memory is
// written through mem_we/mem_waddr/mem_wdata, between diagnosis sessions.
// bist_mode is static and may change only during reset. The core logic
// itself is outside: cells go to it, core_resp comes back for capture.
//
// The data path follows the architecture; the clock enable in place of a
// gated clock, the memory write port and the reset are this design's choices.
module ced_top #(
  parameter int unsigned N          = ced_pkg::N_CHAINS_DEF,
  parameter int unsigned L          = ced_pkg::CHAIN_LEN_DEF,
  parameter int unsigned R          = ced_pkg::SR_LEN_DEF,
  parameter int unsigned K          = ced_pkg::CODE_W_DEF,
  parameter int unsigned MASK_LINES = 1,
  parameter bit          MASK_CODED = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // tester channels
  input  logic                  data_in,
  input  logic [MASK_LINES-1:0] mask_in,
  input  logic                  stall,
  // test controller
  input  logic                  scan_en,
  input  logic                  bist_mode,
  // mask memory programming (coded mode)
  input  logic                  mem_we,
  input  logic [K-1:0]          mem_waddr,
  input  logic [N-1:0]          mem_wdata,
  // core under diagnosis
  input  logic [N-1:0][L-1:0]   core_resp,
  output logic [N-1:0][L-1:0]   cells,
  // diagnosis outputs
  output logic                  result,
  output logic                  failure_detect,
  output logic [N-1:0]          cmp_q,
  output logic [N-1:0]          mask
);

  logic          clk_en;
  logic [R-1:0]  sr;
  logic [N-1:0]  scan_in, expected, scan_out, t_filt, d_filt;

  assign clk_en = !stall;

  input_shift_register #(.R(R)) u_sr (
    .clk, .rst_n, .en(1'b1), .data_in, .sr_q(sr)
  );

  phase_shifter #(.N(N), .R(R)) u_ps (
    .sr, .scan_in, .expected
  );

  scan_chains #(.N(N), .L(L)) u_sc (
    .clk, .rst_n, .clk_en, .scan_en, .scan_in,
    .capture_d(core_resp), .cells, .scan_out
  );

  if (MASK_CODED) begin : g_coded
    logic [K-1:0] code_next;
    mask_code_register #(.K(K), .LINES(MASK_LINES)) u_mcr (
      .clk, .rst_n, .mask_in, .code_q(), .code_next
    );
    mask_memory #(.N(N), .K(K)) u_mem (
      .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
      .raddr(code_next), .rdata(mask)
    );
  end else begin : g_plain
    mask_register #(.N(N), .LINES(MASK_LINES)) u_mr (
      .clk, .rst_n, .mask_in, .mask_q(mask)
    );
  end

  x_filter #(.N(N)) u_xf (
    .mask, .scan_out, .expected, .t_filt, .d_filt
  );

  comp_misr #(.N(N)) u_cm (
    .clk, .rst_n, .en(clk_en), .bist_mode, .d(d_filt), .t(t_filt),
    .q(cmp_q), .failure_detect, .result
  );

  // bist_mode is a static configuration signal
  a_bist_static: assert property (@(posedge clk) rst_n && $past(rst_n) |-> $stable(bist_mode))
    else $error("bist_mode changed outside reset");

endmodule
