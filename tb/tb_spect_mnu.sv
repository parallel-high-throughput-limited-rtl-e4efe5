// Testbench of the metric normalization unit: random branch metrics and w;
// one clock after in_valid the outputs must be BM_j - w, and they must hold
// while in_valid is low.
module tb_spect_mnu;
  logic clk = 0, rst_n = 0, in_valid = 0, corr_in = 0;
  logic [3:0][3:0] bm = '0;
  logic signed [7:0] w = '0;
  logic out_valid, corr_out;
  logic signed [7:0] nbm [4];
  int checks = 0, failures = 0;
  int expn [4] = '{0, 0, 0, 0};
  bit expc = 0;

  spect_mnu #(.BM_W(4), .NW(8)) dut (.*);

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
    for (int i = 0; i < 300; i++) begin
      bit v;
      @(negedge clk);
      v = ($urandom % 3) != 0;
      in_valid = v;
      corr_in = 1'($urandom);
      for (int j = 0; j < 4; j++) bm[j] = 4'($urandom % 15);
      w = 8'(int'($urandom % 80) - 10);
      if (v) begin
        for (int j = 0; j < 4; j++) expn[j] = int'(bm[j]) - int'(w);
        expc = corr_in;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != v || (v && corr_out != expc)) failures++;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(nbm[j]) != expn[j]) begin
          failures++;
          $display("step %0d: nbm[%0d] %0d expected %0d", i, j, nbm[j], expn[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
