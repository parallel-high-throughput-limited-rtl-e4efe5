// Testbench of the metric speculation unit: random best branch metrics and
// search results, random pauses of the depth counter; w must be BM_B except
// at every V-th depth (counted from 1 after reset), where it is BM_B + T + E.
module tb_spect_msu;
  localparam int V = 7, T = 27;
  logic clk = 0, rst_n = 0, adv = 0;
  logic [3:0] bm_best = '0;
  logic signed [5:0] e = '0;
  logic signed [7:0] w;
  logic corr;
  int checks = 0, failures = 0, depth = 1, ncorr = 0;

  spect_msu #(.BM_W(4), .PM_W(6), .NW(8), .V(V), .T(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int expw;
      @(negedge clk);
      bm_best = 4'($urandom % 15);
      e       = 6'(-($urandom % 33));
      adv     = ($urandom % 4) != 0;
      #1;
      expw = int'(bm_best) + (((depth % V) == 0) ? T + int'(e) : 0);
      checks++;
      if (int'(w) != expw || corr != ((depth % V) == 0)) begin
        failures++;
        $display("depth %0d: w %0d corr %0b, expected %0d %0b", depth, w, corr, expw, (depth % V) == 0);
      end
      if (corr) ncorr++;
      if (adv) depth++;
    end
    checks++;
    if (ncorr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
