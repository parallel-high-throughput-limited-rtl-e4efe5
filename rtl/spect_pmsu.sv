// Path metric search unit (PMSU): time-multiplexed, pipelined minimum search.
//
// On capture the N path metrics of the present depth are copied into a
// snapshot register. On the following S clocks one group of R = N/S metrics
// per clock is pumped into an R-input binary tree of compare-select (CS)
// elements; the tree is pipelined with a register after every CS_PER_STAGE
// levels (and after the last level). The group minima are folded in an
// accumulator and the overall minimum is presented on e, with e_valid high for
// one clock, S + P clocks after capture (P = number of tree register stages).
// busy is high from capture until e is updated. e resets to E_RESET.
// The grouping and the binary CS tree follow the decoder; the snapshot
// register, the stage spacing and the handshake are this design's choices.
module spect_pmsu #(
  parameter int N            = 256,
  parameter int PM_W         = 6,
  parameter int S            = 2,
  parameter int CS_PER_STAGE = 3,
  parameter int E_RESET      = -27
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   capture,
  input  logic signed [PM_W-1:0] sm [N],
  output logic signed [PM_W-1:0] e,
  output logic                   e_valid,
  output logic                   busy
);
  localparam int R  = N / S;
  localparam int LV = $clog2(R);
  localparam int GW = (S > 1) ? $clog2(S) : 1;

  typedef logic signed [PM_W-1:0] pm_t;

  function automatic pm_t pm_min(pm_t a, pm_t b);
    return (b < a) ? b : a;
  endfunction

  pm_t           snap [N];
  logic          feeding;
  logic [GW-1:0] gsel;

  // Snapshot and group sequencing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feeding <= 1'b0;
      gsel    <= '0;
      for (int i = 0; i < N; i++) snap[i] <= '0;
    end else begin
      if (capture) begin
        for (int i = 0; i < N; i++) snap[i] <= sm[i];
        feeding <= 1'b1;
        gsel    <= '0;
      end else if (feeding) begin
        if (gsel == GW'(S - 1)) feeding <= 1'b0;
        else                    gsel    <= gsel + 1'b1;
      end
    end
  end

  // Level 0 of the tree: the selected group.
  for (genvar l = 0; l <= LV; l++) begin : g_lv
    localparam int  M   = R >> l;
    localparam bit  REG = (l > 0) && ((l % CS_PER_STAGE == 0) || (l == LV));
    pm_t  nd [M];
    logic vld;
    logic first;
    logic last;
    if (l == 0) begin : g_in
      always_comb begin
        for (int i = 0; i < M; i++) nd[i] = snap[int'(gsel) * R + i];
        vld   = feeding;
        first = (gsel == '0);
        last  = (gsel == GW'(S - 1));
      end
    end else if (REG) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < M; i++) nd[i] <= '0;
          vld   <= 1'b0;
          first <= 1'b0;
          last  <= 1'b0;
        end else begin
          for (int i = 0; i < M; i++) nd[i] <= pm_min(g_lv[l-1].nd[2*i], g_lv[l-1].nd[2*i+1]);
          vld   <= g_lv[l-1].vld;
          first <= g_lv[l-1].first;
          last  <= g_lv[l-1].last;
        end
      end
    end else begin : g_comb
      always_comb begin
        for (int i = 0; i < M; i++) nd[i] = pm_min(g_lv[l-1].nd[2*i], g_lv[l-1].nd[2*i+1]);
        vld   = g_lv[l-1].vld;
        first = g_lv[l-1].first;
        last  = g_lv[l-1].last;
      end
    end
  end

  pm_t acc;
  pm_t tree_min;
  pm_t folded;
  assign tree_min = g_lv[LV].nd[0];
  assign folded   = g_lv[LV].first ? tree_min : pm_min(acc, tree_min);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      e       <= PM_W'(E_RESET);
      e_valid <= 1'b0;
      busy    <= 1'b0;
    end else begin
      e_valid <= 1'b0;
      if (capture) busy <= 1'b1;
      if (g_lv[LV].vld) begin
        acc <= folded;
        if (g_lv[LV].last) begin
          e       <= folded;
          e_valid <= 1'b1;
          busy    <= capture;
        end
      end
    end
  end

  initial assert (N % S == 0 && (1 << LV) == R) else $error("N/S must be a power of two");
endmodule
