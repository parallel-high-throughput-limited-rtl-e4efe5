// Workload testbench: the two smaller decoder configurations evaluated
// besides the 256-state one, run side by side with the same stimulus and
// bit-true checking as the end-to-end test:
//   K = 8: 128 states, code (247, 371), L = 46, T = 26, V = 7
//   K = 7:  64 states, code (133, 171), L = 40, T = 26, V = 6
// Both keep 6-bit path metrics, an 8-way first majority-vote stage and a
// 2-group path metric search.
module tb_spect_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst8, iv8, ov8, ob8, done8;
  logic [1:0][2:0] si8;
  int c8, f8;
  logic rst7, iv7, ov7, ob7, done7;
  logic [1:0][2:0] si7;
  int c7, f7;

  spect_decoder #(.K(8), .G0('o247), .G1('o371), .L(46), .T(26), .V(7)) dut8 (
    .clk, .rst_n(rst8), .in_valid(iv8), .soft_in(si8), .out_valid(ov8), .out_bit(ob8));
  spect_dec_checker #(.K(8), .G0('o247), .G1('o371), .L(46), .T(26), .V(7)) chk8 (
    .clk, .rst_n(rst8), .in_valid(iv8), .soft_in(si8), .out_valid(ov8), .out_bit(ob8),
    .acs_valid(dut8.acs_valid), .e_valid(dut8.u_pmsu.e_valid),
    .sm_d(dut8.sm_d), .en_d(dut8.en_d), .done(done8), .checks(c8), .failures(f8));

  spect_decoder #(.K(7), .G0('o133), .G1('o171), .L(40), .T(26), .V(6)) dut7 (
    .clk, .rst_n(rst7), .in_valid(iv7), .soft_in(si7), .out_valid(ov7), .out_bit(ob7));
  spect_dec_checker #(.K(7), .G0('o133), .G1('o171), .L(40), .T(26), .V(6)) chk7 (
    .clk, .rst_n(rst7), .in_valid(iv7), .soft_in(si7), .out_valid(ov7), .out_bit(ob7),
    .acs_valid(dut7.acs_valid), .e_valid(dut7.u_pmsu.e_valid),
    .sm_d(dut7.sm_d), .en_d(dut7.en_d), .done(done7), .checks(c7), .failures(f7));

  initial begin : watchdog
    #(5_000_000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c7, f8 + f7 + 1);
    $finish;
  end

  initial begin
    wait (done8 && done7);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c7, f8 + f7);
    $finish;
  end
endmodule
