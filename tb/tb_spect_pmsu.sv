// Testbench of the path metric search unit at its default size (256 metrics,
// 2 groups, a register every 3 compare-select levels): random sparse metric
// sets are captured every 8 clocks; e must become their minimum exactly
// S + P = 2 + 3 clocks after the capturing clock edge, with a one-clock e_valid, and busy must
// cover the search. The reset value of e is checked too.
module tb_spect_pmsu;
  localparam int N = 256, PM_W = 6, S = 2, CS = 3;
  localparam int LAT = S + 3;
  logic clk = 0, rst_n = 0, capture = 0;
  logic signed [PM_W-1:0] sm [N];
  logic signed [PM_W-1:0] e;
  logic e_valid, busy;
  int checks = 0, failures = 0;

  spect_pmsu #(.N(N), .PM_W(PM_W), .S(S), .CS_PER_STAGE(CS), .E_RESET(-27)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) sm[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (int'(e) != -27) failures++;
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int mn;
      @(negedge clk);
      mn = 0;
      for (int i = 0; i < N; i++) begin
        sm[i] = (($urandom % 6) == 0) ? 6'(-int'($urandom % 32) - 1) : '0;
        if (t % 5 == 4) sm[i] = (i == (t * 37) % N) ? 6'(-20) : '0;  // single survivor
        if (int'(sm[i]) < mn) mn = int'(sm[i]);
      end
      capture = 1;
      @(negedge clk);
      capture = 0;
      for (int i = 0; i < N; i++) sm[i] = 6'(-32);                  // must not be seen
      for (int c = 1; c <= LAT + 2; c++) begin
        checks++;
        if (e_valid != (c == LAT + 1) || busy != (c <= LAT)) begin
          failures++;
          $display("t=%0d c=%0d: e_valid %0b busy %0b", t, c, e_valid, busy);
        end
        if (c == LAT + 1) begin
          checks++;
          if (int'(e) != mn) begin
            failures++;
            $display("t=%0d: e %0d expected %0d", t, e, mn);
          end
        end
        if (c < LAT + 2) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
