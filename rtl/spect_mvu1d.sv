// One-dimensional two-stage majority vote unit.
//
// Votes on one decoded bit over the N rows of the register exchange array.
// Each row contributes Val = 0 if it is not a survivor (en = 0), -1 for a
// survivor bit 0 and +1 for a survivor bit 1. Stage 1 sums groups of N1
// consecutive rows; each group sum is clipped to +1 (positive), -1 (negative)
// or 0 (an even split or a group without survivors). Stage 2 sums the N/N1
// clipped values and the output bit is 1 when that sum is positive. Both
// stages are registered, so out_bit follows in_valid by two clocks.
// The two-stage split and N1 follow the decoder; keeping 0 for a group with
// no net vote is this design's reading of the clipper, and the pipeline
// registers are its choice.
module spect_mvu1d #(
  parameter int N  = 256,
  parameter int N1 = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] en,
  input  logic [N-1:0] bits,
  output logic         out_valid,
  output logic         out_bit
);
  localparam int N2  = N / N1;
  localparam int S1W = $clog2(N1 + 1) + 1;
  localparam int S2W = $clog2(N2 + 1) + 1;

  logic [N2-1:0] g_pos, g_neg;      // clipped group votes: +1 / -1
  logic [N2-1:0] c_pos, c_neg;
  logic          v1;
  logic signed [S1W-1:0] gsum [N2];
  logic signed [S2W-1:0] tsum;

  // Stage 1 adders: one N1-input adder per group.
  always_comb begin
    for (int g = 0; g < N2; g++) begin
      gsum[g] = '0;
      for (int i = 0; i < N1; i++)
        if (en[g*N1+i]) gsum[g] = bits[g*N1+i] ? gsum[g] + S1W'(1) : gsum[g] - S1W'(1);
      c_pos[g] = (gsum[g] > 0);
      c_neg[g] = (gsum[g] < 0);
    end
  end

  // Stage 2 adder over the clipped group votes.
  always_comb begin
    tsum = '0;
    for (int g = 0; g < N2; g++) tsum = tsum + S2W'(g_pos[g]) - S2W'(g_neg[g]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_pos     <= '0;
      g_neg     <= '0;
      v1        <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        g_pos <= c_pos;
        g_neg <= c_neg;
      end
      if (v1) out_bit <= (tsum > 0);
    end
  end

  initial assert (N % N1 == 0) else $error("N1 must divide N");
endmodule
