// Exhaustive testbench of the branch metric unit: all 64 pairs of 3-bit soft
// values, each of the four branch metrics and the best branch metric compared
// with values computed here.
module tb_spect_bmu;
  logic [1:0][2:0] sin;
  logic [3:0][3:0] bm;
  logic [3:0]      bm_best;
  int checks = 0, failures = 0;

  spect_bmu #(.SOFT_W(3)) dut (.sin, .bm, .bm_best);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      for (int b = 0; b < 8; b++) begin
        int expb, m;
        sin[1] = 3'(a);
        sin[0] = 3'(b);
        #1;
        expb = 99;
        for (int c0 = 0; c0 < 2; c0++)
          for (int c1 = 0; c1 < 2; c1++) begin
            // distance: |soft - ideal level| with levels 0 and 7
            m = (c0 ? 7 - a : a) + (c1 ? 7 - b : b);
            if (m < expb) expb = m;
            checks++;
            if (int'(bm[c0*2+c1]) != m) begin
              failures++;
              $display("x=%0d,%0d sym %0d%0d: bm %0d expected %0d", a, b, c0, c1, bm[c0*2+c1], m);
            end
          end
        checks++;
        if (int'(bm_best) != expb) begin
          failures++;
          $display("x=%0d,%0d: best %0d expected %0d", a, b, bm_best, expb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
