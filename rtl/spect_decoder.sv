// Parallel SPEC-T limited search decoder for a rate-1/2 convolutional code.
//
// A state-parallel register-exchange Viterbi structure turned into a
// T-algorithm decoder: at each depth only paths whose metric lies within T of
// the best metric survive, and the best metric is not searched in the main
// loop but speculated (SPEC-T). The speculation assumes the best path follows
// the hard-decision branch; every V depths the error of that guess, measured
// V depths earlier by an off-loop minimum search, is corrected.
//
// Data path, one trellis depth per accepted input symbol:
//   soft_in -> BMU -> MSU (w) -> MNU (BM - w, register) -> N MACS units ->
//   path metric registers, register exchange array (REA) -> majority vote
//   (MVU) -> out_bit.
// The path metric search unit (PMSU) snapshots the metrics of every V-th depth
// and returns their minimum E to the MSU in time for the next correction.
// Stored metrics are normalized: survivors are negative, non-survivors hold 0,
// and the starting state 0 is initialized to -T. Two guard states forming a
// trellis cycle always survive, so the decoder can never lose all paths.
//
// Interface: in_valid/soft_in accept one symbol (two soft code bits, soft_in[1]
// for generator G0) per clock; in_valid may drop at any time (stall). Once L
// depths have been decoded, each accepted symbol yields one out_valid/out_bit
// three clocks later: the decision for the information bit L-1 depths older
// than that symbol. With continuous input, the decision for a bit appears
// L+2 clocks after the bit's own symbol was accepted.
//
// The block structure, code, widths, decision length, T, V, the 8-way first
// majority-vote stage and the 2-group search follow the decoder being
// modelled (K = 9 example). The state numbering, metric convention, pipeline
// registers and guard-state choice are this design's own.
module spect_decoder #(
  parameter int          K            = 9,
  parameter int unsigned G0           = 'o561,
  parameter int unsigned G1           = 'o753,
  parameter int          SOFT_W       = 3,
  parameter int          PM_W         = 6,
  parameter int          L            = 55,
  parameter int          T            = 27,
  parameter int          V            = 7,
  parameter int          MV_N1        = 8,
  parameter int          PMSU_S       = 2,
  parameter int          CS_PER_STAGE = 3,
  parameter bit          GUARD_RING   = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [1:0][SOFT_W-1:0] soft_in,
  output logic                   out_valid,
  output logic                   out_bit
);
  import spect_pkg::*;

  localparam int N    = 1 << (K - 1);
  localparam int BM_W = SOFT_W + 1;
  localparam int NW   = PM_W + 2;
  localparam int GA   = guard_state_a(K);
  localparam int GB   = guard_state_b(K);
  localparam int LV   = $clog2(N / PMSU_S);
  localparam int PST  = (LV + CS_PER_STAGE - 1) / CS_PER_STAGE;
  localparam int FW   = $clog2(L + 1);

  // ---------------- BMU, MSU, MNU ----------------
  logic [3:0][BM_W-1:0]   bm;
  logic [BM_W-1:0]        bm_best;
  logic signed [PM_W-1:0] e;
  logic                   e_valid;
  logic                   pmsu_busy;
  logic signed [NW-1:0]   w;
  logic                   corr;

  spect_bmu #(.SOFT_W(SOFT_W)) u_bmu (.sin(soft_in), .bm(bm), .bm_best(bm_best));

  spect_msu #(.BM_W(BM_W), .PM_W(PM_W), .NW(NW), .V(V), .T(T)) u_msu (
    .clk, .rst_n, .adv(in_valid), .bm_best, .e, .w, .corr);

  logic                 acs_valid;
  logic                 acs_corr;
  logic signed [NW-1:0] nbm [4];

  spect_mnu #(.BM_W(BM_W), .NW(NW)) u_mnu (
    .clk, .rst_n, .in_valid, .corr_in(corr), .bm, .w,
    .out_valid(acs_valid), .corr_out(acs_corr), .nbm);

  // ---------------- MACS array and path metric registers ----------------
  logic signed [PM_W-1:0] sm_q [N];
  logic signed [PM_W-1:0] sm_d [N];
  logic [N-1:0]           dec_d, en_d, en_q;

  for (genvar s = 0; s < N; s++) begin : g_state
    localparam int  P0  = pred_state(K, s, 0);
    localparam int  P1  = pred_state(K, s, 1);
    localparam int  UB  = state_ubit(K, s);
    localparam int  SY0 = branch_sym(K, G0, G1, P0, UB);
    localparam int  SY1 = branch_sym(K, G0, G1, P1, UB);
    localparam bit  GRD = GUARD_RING && (s == GA || s == GB);
    localparam int  GIN = (s == GA) ? (GB & 1) : (GA & 1);

    logic signed [PM_W-1:0] sm_in  [2];
    logic signed [NW-1:0]   nbm_in [2];
    assign sm_in[0]  = sm_q[P0];
    assign sm_in[1]  = sm_q[P1];
    assign nbm_in[0] = nbm[SY0];
    assign nbm_in[1] = nbm[SY1];

    spect_macs #(.PM_W(PM_W), .NW(NW), .NIN(2), .GUARD(GRD), .GUARD_IN(GIN)) u_macs (
      .sm_in, .nbm_in, .sm_out(sm_d[s]), .dec(dec_d[s]), .en(en_d[s]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sm_q[s] <= (s == 0) ? -PM_W'(T) : '0;
        en_q[s] <= (s == 0) || GRD;
      end else if (acs_valid) begin
        sm_q[s] <= sm_d[s];
        en_q[s] <= en_d[s];
      end
    end
  end

  // ---------------- Register exchange array ----------------
  logic [N-1:0] oldest;

  spect_rea #(.K(K), .L(L)) u_rea (
    .clk, .rst_n, .adv(acs_valid), .dec(dec_d), .en(en_d), .oldest);

  // The oldest bits are meaningful once L depths have been decoded.
  logic [FW-1:0] fill;
  logic          mv_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill     <= '0;
      mv_valid <= 1'b0;
    end else begin
      mv_valid <= acs_valid && (fill >= FW'(L - 1));
      if (acs_valid && fill != FW'(L)) fill <= fill + 1'b1;
    end
  end

  // ---------------- Majority vote ----------------
  // One decoded bit per branch (t = 1), so one one-dimensional vote unit.
  spect_mvu1d #(.N(N), .N1(MV_N1)) u_mvu (
    .clk, .rst_n, .in_valid(mv_valid), .en(en_q), .bits(oldest),
    .out_valid, .out_bit);

  // ---------------- Path metric search ----------------
  spect_pmsu #(.N(N), .PM_W(PM_W), .S(PMSU_S), .CS_PER_STAGE(CS_PER_STAGE),
               .E_RESET(-T)) u_pmsu (
    .clk, .rst_n, .capture(acs_valid && acs_corr), .sm(sm_d),
    .e, .e_valid, .busy(pmsu_busy));

  // The search must finish within V depths; with continuous input this needs
  // S + P + 2 <= V (P = tree register stages).
  initial assert (PMSU_S + PST + 2 <= V)
    else $error("speed mismatch factor V too small for this search unit");
  initial assert (2 * T < (1 << PM_W)) else $error("T does not fit PM_W");

  // A correction must never use a search that is still running.
  a_search_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && corr) |-> !pmsu_busy);
endmodule
