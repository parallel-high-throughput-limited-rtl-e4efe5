// Register exchange array (REA) with per-state enables.
//
// Row s holds the information bits of the survivor path that ends in state s,
// oldest bit in position L-1. When depth advances, a row whose MACS unit
// reports a survivor (en[s] = 1) loads the row of the predecessor chosen by
// dec[s], shifted by one, with the information bit of state s appended. Rows
// with en[s] = 0 keep their contents: their enable is the clock-gating
// condition of the register exchange structure, so a non-survivor row does no
// switching. oldest[s] is the oldest bit of row s, the input of the majority
// vote. Rows are cleared by reset (a choice of this design; stale rows are
// never voted because their en is 0).
module spect_rea #(
  parameter int K = 9,
  parameter int L = 55,
  localparam int N = 1 << (K - 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         adv,
  input  logic [N-1:0] dec,
  input  logic [N-1:0] en,
  output logic [N-1:0] oldest
);
  import spect_pkg::*;

  logic [L-1:0] row [N];

  for (genvar s = 0; s < N; s++) begin : g_row
    localparam int P0 = pred_state(K, s, 0);
    localparam int P1 = pred_state(K, s, 1);
    localparam logic UB = 1'(state_ubit(K, s));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)            row[s] <= '0;
      else if (adv && en[s]) row[s] <= {(dec[s] ? row[P1][L-2:0] : row[P0][L-2:0]), UB};
    end
    assign oldest[s] = row[s][L-1];
  end
endmodule
