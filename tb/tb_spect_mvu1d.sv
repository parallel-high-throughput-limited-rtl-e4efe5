// Testbench of the two-stage majority vote at N = 64, N1 = 8: random survivor
// flags (sparse and dense) and bits; the output, two clocks later, must equal
// the vote computed here (group sums clipped to -1/0/+1, then the sign of the
// total). The two-clock latency is checked on every input.
module tb_spect_mvu1d;
  localparam int N = 64, N1 = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] en = '0, bits = '0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0, n_one = 0, n_zero = 0;
  bit exp_q [$];
  bit vld_q [$];

  spect_mvu1d #(.N(N), .N1(N1)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit vote(logic [N-1:0] e, logic [N-1:0] b);
    int tot = 0;
    for (int g = 0; g < N / N1; g++) begin
      int s = 0;
      for (int i = 0; i < N1; i++) if (e[g*N1+i]) s += b[g*N1+i] ? 1 : -1;
      tot += (s > 0) ? 1 : (s < 0) ? -1 : 0;
    end
    return tot > 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int i = 0; i < N; i++) begin
        en[i]   = (t % 2) ? (($urandom % 10) == 0) : 1'($urandom);
        bits[i] = ($urandom % 100) < ((t % 3) * 30 + 20);
      end
      vld_q.push_back(in_valid);
      exp_q.push_back(vote(en, bits));
      if (vld_q.size() > 2) begin
        bit v, e;
        v = vld_q.pop_front();
        e = exp_q.pop_front();
        checks++;
        if (out_valid != v || (v && out_bit != e)) begin
          failures++;
          $display("t=%0d: out %0b/%0b expected %0b/%0b", t, out_valid, out_bit, v, e);
        end
        if (v && e) n_one++;
        if (v && !e) n_zero++;
      end
    end
    checks++;
    if (n_one == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
