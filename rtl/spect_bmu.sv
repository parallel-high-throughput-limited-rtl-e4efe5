// Branch metric unit (BMU) for a rate-1/2 code with soft inputs.
//
// Each received code bit arrives as an unsigned SOFT_W-bit soft value: 0 is
// a confident '0', 2**SOFT_W-1 a confident '1'. The distance of a soft value
// x to code bit 0 is x and to code bit 1 is (2**SOFT_W-1) - x, the distance
// to the two ideal levels; the metric of a branch symbol {c0, c1} is the sum
// of its two bit distances (a simplified soft-decision metric in place of the
// squared Euclidean distance). The best branch metric bm_best is the metric
// of the branch that matches the hard decision of both inputs, i.e. the sum
// of min(x, MAX-x). The soft-value convention and the metric scale are this
// design's choices; the threshold T is applied on this scale.
//
// Purely combinational: sin[1] is the G0 code bit, sin[0] the G1 code bit;
// bm[sym] is the metric of symbol sym = {c0, c1}.
module spect_bmu #(
  parameter int SOFT_W = 3,
  localparam int BM_W = SOFT_W + 1
) (
  input  logic [1:0][SOFT_W-1:0] sin,
  output logic [3:0][BM_W-1:0]   bm,
  output logic [BM_W-1:0]        bm_best
);
  logic [1:0][SOFT_W-1:0] d0, d1;   // distance to code bit 0 / 1

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      d0[i] = sin[i];
      d1[i] = ~sin[i];     // (2**SOFT_W - 1) - x
    end
    for (int sym = 0; sym < 4; sym++) begin
      bm[sym] = BM_W'(sym[1] ? d1[1] : d0[1]) + BM_W'(sym[0] ? d1[0] : d0[0]);
    end
    bm_best = BM_W'((d0[1] < d1[1]) ? d0[1] : d1[1]) + BM_W'((d0[0] < d1[0]) ? d0[0] : d1[0]);
  end
endmodule
