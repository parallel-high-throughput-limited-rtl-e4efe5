// Metric normalization unit (MNU).
//
// Subtracts the speculation output w from each of the four distinct branch
// metrics, so that the MACS units receive BM_j - w directly and w need not be
// broadcast to every state. The results are registered: this register is the
// pipeline stage between the branch metric / speculation logic and the MACS
// recursion (a choice of this design), so the normalized metrics of depth n are
// valid one clock after the depth's input symbol was accepted. corr_in is
// carried along so that the MACS stage knows when it computes a correction
// depth.
module spect_mnu #(
  parameter int BM_W = 4,
  parameter int NW   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     corr_in,
  input  logic [3:0][BM_W-1:0]     bm,
  input  logic signed [NW-1:0]     w,
  output logic                     out_valid,
  output logic                     corr_out,
  output logic signed [NW-1:0]     nbm [4]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      corr_out  <= 1'b0;
      for (int j = 0; j < 4; j++) nbm[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        corr_out <= corr_in;
        for (int j = 0; j < 4; j++) nbm[j] <= NW'(signed'({1'b0, bm[j]})) - w;
      end
    end
  end
endmodule
