// Stimulus and reference checker for the SPEC-T decoder, used by the
// end-to-end and workload testbenches.
//
// Random information bits are encoded with the code (G0, G1), sent as BPSK
// over an additive white Gaussian noise channel and quantized to 3-bit soft
// values. A bit-true model of the SPEC-T algorithm written here (its own
// trellis numbering, encoder and majority vote) runs alongside the decoder:
// every depth the decoder's N path metrics and survivor flags (probe inputs)
// must equal the model's, and every decoded bit must equal the model's output.
// The decoded bits are also compared with the transmitted bits. Phases: clean
// channel, noisy channel at 4 dB with random input stalls, a burst of random
// symbols that lets every ordinary path die (only the guard states survive),
// and a clean recovery phase. It checks the input-to-output latency and that
// each mechanism (speculation correction with non-zero error, clock-gated
// rows, stalls, guard states out of band, guard-only depths, finished
// searches) occurred. done rises when all checks are counted.
module spect_dec_checker #(
  parameter int          K    = 9,
  parameter int unsigned G0   = 'o561,
  parameter int unsigned G1   = 'o753,
  parameter int          L    = 55,
  parameter int          T    = 27,
  parameter int          V    = 7,
  parameter int          PM_W = 6,
  parameter int          N1   = 8,
  parameter int          N_NOISY = 2000
) (
  input  logic                   clk,
  output logic                   rst_n,
  output logic                   in_valid,
  output logic [1:0][2:0]        soft_in,
  input  logic                   out_valid,
  input  logic                   out_bit,
  input  logic                   acs_valid,
  input  logic                   e_valid,
  input  logic signed [PM_W-1:0] sm_d [1 << (K - 1)],
  input  logic [(1 << (K - 1))-1:0] en_d,
  output logic                   done,
  output int                     checks,
  output int                     failures
);
  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    soft_in = '0;
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  localparam int N = 1 << (K - 1);
  localparam int SMAX = 7;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------------
  // Reference model of the algorithm
  // ------------------------------------------------------------------
  int  sm [N];
  bit  en_r [N];
  bit  path [N][L];      // path[s][0] newest bit
  int  e_last;
  int  depth;
  int  ga, gb;           // guard ring states
  bit  exp_q [$];
  int  hist_sm [4][N];
  bit  hist_en [4][N];
  longint surv_sum = 0;
  int  n_corr_nz = 0, n_guard_only = 0, n_guard_oob = 0, n_gated = 0;

  function automatic int par(int unsigned x);
    return $countones(x) & 1;
  endfunction

  // distance of soft value x from the ideal level of code bit c (0 or 7)
  function automatic int cost(int x, int c);
    return c ? SMAX - x : x;
  endfunction

  function automatic int sat(int x);
    int hi = (1 << (PM_W - 1)) - 1;
    int lo = -(1 << (PM_W - 1));
    return (x > hi) ? hi : (x < lo) ? lo : x;
  endfunction

  task automatic ref_init();
    for (int s = 0; s < N; s++) begin
      sm[s] = 0; en_r[s] = 0;
      for (int i = 0; i < L; i++) path[s][i] = 0;
    end
    sm[0] = -T; en_r[0] = 1;
    ga = 0;
    for (int i = 0; i < K - 1; i += 2) ga |= 1 << i;
    gb = (~ga) & (N - 1);
    en_r[ga] = 1; en_r[gb] = 1;
    e_last = -T;
    depth = 0;
  endtask

  task automatic ref_step(int x0, int x1);   // x0: G0 bit, x1: G1 bit
    int bmv [2][2];
    int bmb, w, mn, votes2, nsurv;
    bit corr;
    int nsm [N];
    bit nen [N];
    bit npath [N][L];
    depth++;
    for (int c0 = 0; c0 < 2; c0++)
      for (int c1 = 0; c1 < 2; c1++)
        bmv[c0][c1] = cost(x0, c0) + cost(x1, c1);
    bmb = 1 << 30;
    for (int c0 = 0; c0 < 2; c0++)
      for (int c1 = 0; c1 < 2; c1++)
        if (bmv[c0][c1] < bmb) bmb = bmv[c0][c1];
    corr = (depth % V) == 0;
    w = bmb + (corr ? T + e_last : 0);
    if (corr && e_last != -T) n_corr_nz++;
    for (int s = 0; s < N; s++) begin
      int cand [2];
      int best, d, u;
      bit grd;
      grd = (s == ga) || (s == gb);
      u = (s >> (K - 2)) & 1;
      for (int b = 0; b < 2; b++) begin
        int p, reg_bits, c0, c1;
        p = ((s << 1) & (N - 1)) | b;
        reg_bits = (u << (K - 1)) | p;
        c0 = par(G0 & reg_bits);
        c1 = par(G1 & reg_bits);
        if ((grd && (p == ga || p == gb)) || sm[p] < 0) cand[b] = sm[p] + bmv[c0][c1] - w;
        else cand[b] = sm[p];
      end
      d = (cand[1] < cand[0]) ? 1 : 0;
      best = sat(cand[d]);
      if (grd) begin nsm[s] = best; nen[s] = 1; end
      else if (best < 0) begin nsm[s] = best; nen[s] = 1; end
      else begin nsm[s] = 0; nen[s] = 0; end
      if (nen[s]) begin
        int p;
        p = ((s << 1) & (N - 1)) | d;
        for (int i = L - 1; i > 0; i--) npath[s][i] = path[p][i-1];
        npath[s][0] = u[0];
      end else begin
        for (int i = 0; i < L; i++) npath[s][i] = path[s][i];
      end
    end
    mn = 1 << 30; nsurv = 0;
    for (int s = 0; s < N; s++) begin
      sm[s] = nsm[s]; en_r[s] = nen[s];
      for (int i = 0; i < L; i++) path[s][i] = npath[s][i];
      if (sm[s] < mn) mn = sm[s];
      if (s != ga && s != gb && en_r[s]) nsurv++;
      hist_sm[depth % 4][s] = sm[s];
      hist_en[depth % 4][s] = en_r[s];
    end
    if (corr) e_last = mn;
    if (nsurv == 0) n_guard_only++;
    if (phase == 2) surv_sum += nsurv + 2;
    if (sm[ga] >= 0 || sm[gb] >= 0) n_guard_oob++;
    if (nsurv + 2 < N) n_gated++;
    if (depth >= L) begin
      votes2 = 0;
      for (int g = 0; g < N / N1; g++) begin
        int v1 = 0;
        for (int i = 0; i < N1; i++)
          if (en_r[g*N1+i]) v1 += path[g*N1+i][L-1] ? 1 : -1;
        votes2 += (v1 > 0) ? 1 : (v1 < 0) ? -1 : 0;
      end
      exp_q.push_back(votes2 > 0);
    end
  endtask

  // ------------------------------------------------------------------
  // Encoder and channel
  // ------------------------------------------------------------------
  int unsigned enc_reg = 0;
  bit info_q [$];
  int phase_of [$];
  real sigma = 0.0;
  int  phase = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int quant(int c);
    real y;
    int q;
    y = (c ? 1.0 : -1.0) + sigma * gauss();
    // uniform quantizer, step 0.5, levels symmetric about 0
    q = (y >= 0.0) ? $rtoi($floor(y * 2.0 + 4.0)) : 7 - $rtoi($floor(-y * 2.0 + 4.0));
    return (q < 0) ? 0 : (q > SMAX) ? SMAX : q;
  endfunction

  int n_stall = 0;

  // Present one symbol; random stalls when stall_pct > 0.
  task automatic send(int x0, int x1, int stall_pct);
    while (stall_pct > 0 && ($urandom % 100) < stall_pct) begin
      in_valid <= 1'b0;
      n_stall++;
      @(posedge clk);
    end
    in_valid   <= 1'b1;
    soft_in[1] <= 3'(x0);
    soft_in[0] <= 3'(x1);
    ref_step(x0, x1);
    @(posedge clk);
  endtask

  task automatic send_bit(bit u, int stall_pct);
    int c0, c1;
    enc_reg = (enc_reg >> 1) | (int'(u) << (K - 1));
    c0 = par(G0 & enc_reg);
    c1 = par(G1 & enc_reg);
    info_q.push_back(u);
    phase_of.push_back(phase);
    send(quant(c0), quant(c1), stall_pct);
  endtask

  // ------------------------------------------------------------------
  // Output and state monitors
  // ------------------------------------------------------------------
  int n_out = 0, n_pmsu = 0, acs_depth = 0, state_mism = 0;
  int bit_err [5] = '{default: 0};
  int late_err = 0;
  longint first_acc = -1, first_out = -1;
  int recover_start = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && first_acc < 0) first_acc = cyc;
      if (e_valid) n_pmsu++;
      if (acs_valid) begin
        bit bad;
        acs_depth++;
        bad = 0;
        for (int s = 0; s < N; s++)
          if (int'(sm_d[s]) != hist_sm[acs_depth % 4][s] || en_d[s] != hist_en[acs_depth % 4][s])
            bad = 1;
        checks++;
        if (bad) begin
          failures++;
          if (state_mism++ < 5) begin
            $display("path metric mismatch at depth %0d", acs_depth);
            for (int s = 0; s < N; s++) if (int'(sm_d[s]) != hist_sm[acs_depth % 4][s] || en_d[s] != hist_en[acs_depth % 4][s]) $display("  s=%0d dut %0d/%0b ref %0d/%0b", s, sm_d[s], en_d[s], hist_sm[acs_depth % 4][s], hist_en[acs_depth % 4][s]);
          end
        end
      end
      if (out_valid) begin
        bit e;
        if (first_out < 0) first_out = cyc;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected output %0d", n_out);
        end else begin
          e = exp_q.pop_front();
          if (out_bit !== e) begin
            failures++;
            if (failures < 10) $display("output %0d: got %0b, model %0b", n_out, out_bit, e);
          end
        end
        if (out_bit != info_q[n_out]) begin
          bit_err[phase_of[n_out]]++;
          if (recover_start >= 0 && n_out >= recover_start) late_err++;
        end
        n_out++;
      end
    end
  end

  // ------------------------------------------------------------------
  // Stimulus
  // ------------------------------------------------------------------
  localparam int N_CLEAN = 400, N_BURST = 60, N_RECOVER = 500, N_TAIL = L + 10;

  initial begin : stim
    int total;
    ref_init();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    phase = 1; sigma = 0.0;
    for (int i = 0; i < N_CLEAN; i++) send_bit(1'($urandom), 0);
    phase = 2; sigma = 1.0 / $sqrt(10.0 ** 0.4);            // Eb/N0 = 4 dB, rate 1/2
    for (int i = 0; i < N_NOISY; i++) send_bit(1'($urandom), 10);
    phase = 3;
    for (int i = 0; i < N_BURST; i++) begin                 // random confident symbols
      info_q.push_back(1'b0);
      phase_of.push_back(phase);
      send(($urandom % 2) * SMAX, ($urandom % 2) * SMAX, 0);
    end
    phase = 4; sigma = 0.0;
    for (int i = 0; i < N_RECOVER; i++) send_bit(1'($urandom), 0);
    recover_start = info_q.size() - 200;
    for (int i = 0; i < N_TAIL; i++) send_bit(1'b0, 0);
    in_valid <= 1'b0;
    total = info_q.size();
    repeat (10) @(posedge clk);

    // Every symbol but the last L-1 yields one decision.
    checks++;
    if (n_out != total - (L - 1)) begin
      failures++;
      $display("outputs %0d, expected %0d", n_out, total - (L - 1));
    end
    // Latency: first decision L+2 clocks after the first symbol was accepted
    // (it is sampled one clock after it was registered).
    checks++;
    if (first_out - first_acc != L + 3) begin
      failures++;
      $display("latency %0d, expected %0d", first_out - first_acc, L + 3);
    end
    checks++;
    if (bit_err[1] != 0) begin failures++; $display("errors on the clean channel: %0d", bit_err[1]); end
    checks++;
    if (bit_err[2] > N_NOISY * 3 / 100) begin failures++; $display("too many errors at 4 dB: %0d", bit_err[2]); end
    checks++;
    if (late_err != 0) begin failures++; $display("no recovery after the burst: %0d errors", late_err); end

    $display("K=%0d bit errors: clean %0d, 4 dB %0d/%0d, recovery %0d", K, bit_err[1], bit_err[2], N_NOISY, bit_err[4]);
    $display("average survivors at 4 dB: %0.1f of %0d states", real'(surv_sum) / N_NOISY, N);
    $display("events: corrections with E!=0 %0d, depths with gated rows %0d, stall cycles %0d,",
             n_corr_nz, n_gated, n_stall);
    $display("        guard states out of band %0d, guard-only depths %0d, searches %0d",
             n_guard_oob, n_guard_only, n_pmsu);
    checks++; if (n_corr_nz == 0)    begin failures++; $display("no non-zero correction"); end
    checks++; if (n_gated == 0)      begin failures++; $display("no gated rows"); end
    checks++; if (n_stall == 0)      begin failures++; $display("no stalls"); end
    checks++; if (n_guard_oob == 0)  begin failures++; $display("guard never out of band"); end
    checks++; if (n_guard_only == 0) begin failures++; $display("no guard-only depth"); end
    checks++; if (n_pmsu < total / V - 2) begin failures++; $display("too few searches %0d", n_pmsu); end
    done = 1'b1;
  end
endmodule
