// Modified add-compare-select (MACS) unit of one trellis state.
//
// Stored path metrics are normalized so that a survivor always has a negative
// metric and a state that leads no survivor holds exactly 0. For each of the
// NIN incoming branches, the normalized branch metric is added to the
// predecessor's metric only if that predecessor is a survivor (sign bit set);
// otherwise 0 is added, so an idle input causes no adder activity. The NIN
// candidates are compared and the smallest wins (the lowest index on a tie);
// its index is the decision dec. If the winner is negative it is a survivor:
// sm_out carries its metric and en = 1. Otherwise sm_out = 0 and en = 0, which
// purges the path and gates the state's register-exchange row.
//
// With GUARD = 1 the unit belongs to the survivor guard ring that rules out a
// dead lock (all states purged): input GUARD_IN (fed by the previous state of
// the ring) is added without gating, the compare-with-0 purge is removed and
// en is tied to 1. That follows the decoder's deadlock-prevention scheme.
//
// Sums saturate to the PM_W-bit signed range; saturation, tie breaking and the
// use of the plain comparator in guard units are this design's choices.
// Purely combinational.
module spect_macs #(
  parameter int PM_W     = 6,
  parameter int NW       = 8,
  parameter int NIN      = 2,
  parameter bit GUARD    = 1'b0,
  parameter int GUARD_IN = 0,
  localparam int DW = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic signed [PM_W-1:0] sm_in  [NIN],
  input  logic signed [NW-1:0]   nbm_in [NIN],
  output logic signed [PM_W-1:0] sm_out,
  output logic [DW-1:0]          dec,
  output logic                   en
);
  localparam int SW = ((NW > PM_W) ? NW : PM_W) + 1;
  localparam logic signed [SW-1:0] PM_MAX = SW'((1 << (PM_W - 1)) - 1);
  localparam logic signed [SW-1:0] PM_MIN = -SW'(1 << (PM_W - 1));

  logic signed [SW-1:0] cand [NIN];
  logic signed [SW-1:0] best;

  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      if ((GUARD && i == GUARD_IN) || sm_in[i][PM_W-1])
        cand[i] = SW'(sm_in[i]) + SW'(nbm_in[i]);
      else
        cand[i] = SW'(sm_in[i]);
    end
    best = cand[0];
    dec  = '0;
    for (int i = 1; i < NIN; i++) begin
      if (cand[i] < best) begin
        best = cand[i];
        dec  = DW'(i);
      end
    end
    if (best > PM_MAX)      best = PM_MAX;
    else if (best < PM_MIN) best = PM_MIN;
    if (GUARD) begin
      en     = 1'b1;
      sm_out = PM_W'(best);
    end else begin
      en     = best[SW-1];
      sm_out = best[SW-1] ? PM_W'(best) : '0;
    end
  end
endmodule
