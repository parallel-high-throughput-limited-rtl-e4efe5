// Metric speculation unit (MSU).
//
// Produces w, the amount by which the speculated best path metric grows at the
// present decoding depth n. At depths with n mod V != 0 the speculation is
// optimistic: w = BM_B, the best branch metric. At every V-th depth the
// accumulated speculation error is corrected: w = BM_B + T + E, where E is the
// smallest stored path metric found by the path metric search unit V depths
// earlier. Stored metrics are kept relative to (speculated best + T), so the
// threshold T is folded into w here and the MACS units only look at the sign
// of a metric. This follows the decoder's algorithm; the depth counter and its
// reset value (the first symbol after reset is depth 1) are this design's.
//
// Interface: w and corr are combinational from bm_best, e and the depth
// counter; the counter advances on every clock with adv high (one depth per
// accepted input symbol). corr flags a correction depth.
module spect_msu #(
  parameter int BM_W = 4,
  parameter int PM_W = 6,
  parameter int NW   = 8,    // width of w and of normalized branch metrics
  parameter int V    = 7,    // speed mismatch factor
  parameter int T    = 27    // retention threshold
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   adv,
  input  logic [BM_W-1:0]        bm_best,
  input  logic signed [PM_W-1:0] e,
  output logic signed [NW-1:0]   w,
  output logic                   corr
);
  localparam int CW = (V > 1) ? $clog2(V) : 1;
  logic [CW-1:0] cnt;   // (present depth) mod V

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= CW'(1 % V);
    else if (adv) cnt <= (cnt == CW'(V - 1)) ? '0 : cnt + 1'b1;
  end

  assign corr = (cnt == '0);

  always_comb begin
    w = NW'(signed'({1'b0, bm_best}));
    if (corr) w = w + NW'(T) + NW'(e);
  end
endmodule
