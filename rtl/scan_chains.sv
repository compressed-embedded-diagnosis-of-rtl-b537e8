// Internal scan chains of the core under diagnosis.
//
// n chains of L mux-D scan cells. While scan_en is high the chains shift:
// cell 0 of chain i takes scan_in[i] and scan_out[i] is cell L-1. While
// scan_en is low every cell captures the core's functional response from
// capture_d. Nothing happens in a cycle where clk_en is low: this is the
// stall-gated scan clock of the architecture, written as a clock enable.
//
// Interface: cells exposes the scan cell contents to the core logic (the
// applied pattern). Synchronous active-low reset clears all cells. The
// chains belong to the core; their organisation here is this design's
// choice, the architecture only names them.
module scan_chains #(
  parameter int unsigned N = ced_pkg::N_CHAINS_DEF,
  parameter int unsigned L = ced_pkg::CHAIN_LEN_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clk_en,
  input  logic                scan_en,
  input  logic [N-1:0]        scan_in,
  input  logic [N-1:0][L-1:0] capture_d,
  output logic [N-1:0][L-1:0] cells,
  output logic [N-1:0]        scan_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (clk_en) begin
      for (int i = 0; i < N; i++) begin
        if (scan_en) cells[i] <= {cells[i][L-2:0], scan_in[i]};
        else         cells[i] <= capture_d[i];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_so
    assign scan_out[i] = cells[i][L-1];
  end

endmodule
