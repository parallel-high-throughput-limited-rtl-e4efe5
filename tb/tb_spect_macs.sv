// Testbench of the modified ACS unit: an ordinary unit and a guard-ring unit
// (ungated input 1) get random path metrics (survivors negative, or 0) and
// normalized branch metrics; metric, decision and enable are compared with a
// model of gated add, minimum select, saturation and purge.
module tb_spect_macs;
  localparam int PM_W = 6, NW = 8;
  logic signed [PM_W-1:0] sm_in [2];
  logic signed [NW-1:0]   nbm_in [2];
  logic signed [PM_W-1:0] sm_a, sm_g;
  logic dec_a, dec_g, en_a, en_g;
  int checks = 0, failures = 0, npurge = 0, nsat = 0;

  spect_macs #(.PM_W(PM_W), .NW(NW), .NIN(2)) dut (
    .sm_in, .nbm_in, .sm_out(sm_a), .dec(dec_a), .en(en_a));
  spect_macs #(.PM_W(PM_W), .NW(NW), .NIN(2), .GUARD(1'b1), .GUARD_IN(1)) dut_g (
    .sm_in, .nbm_in, .sm_out(sm_g), .dec(dec_g), .en(en_g));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int x);
    return (x > 31) ? 31 : (x < -32) ? -32 : x;
  endfunction

  task automatic check(bit guard);
    int c [2];
    int d, best, esm;
    bit een;
    for (int i = 0; i < 2; i++) begin
      if ((guard && i == 1) || sm_in[i] < 0) c[i] = int'(sm_in[i]) + int'(nbm_in[i]);
      else c[i] = int'(sm_in[i]);
    end
    d = (c[1] < c[0]) ? 1 : 0;
    best = sat(c[d]);
    if (guard) begin esm = best; een = 1; end
    else begin een = best < 0; esm = een ? best : 0; end
    if (!guard && !een) npurge++;
    if (best != c[d]) nsat++;
    checks++;
    if (guard ? (int'(sm_g) != esm || dec_g != d[0] || en_g != een)
              : (int'(sm_a) != esm || dec_a != d[0] || en_a != een)) begin
      failures++;
      $display("guard %0b sm %0d,%0d nbm %0d,%0d: got %0d/%0b/%0b expected %0d/%0d/%0b", guard,
               sm_in[0], sm_in[1], nbm_in[0], nbm_in[1],
               guard ? sm_g : sm_a, guard ? dec_g : dec_a, guard ? en_g : en_a, esm, d, een);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int k = 0; k < 2; k++) begin
        case ($urandom % 4)
          0: sm_in[k] = '0;
          1: sm_in[k] = 6'(int'($urandom % 63) - 31);
          default: sm_in[k] = 6'(-int'(($urandom % 32) + 1));
        endcase
        nbm_in[k] = 8'(int'($urandom % 60) - 40);
      end
      #1;
      check(1'b0);
      check(1'b1);
    end
    checks++;
    if (npurge == 0 || nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
