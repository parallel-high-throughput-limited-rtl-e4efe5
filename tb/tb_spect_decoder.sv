// End-to-end testbench of the SPEC-T decoder at its default size (K = 9,
// 256 states, L = 55, T = 27, V = 7), decoder parameters untouched.
// spect_dec_checker drives a clean phase, a 4 dB AWGN phase with input
// stalls, a burst of random symbols and a recovery phase, and compares every
// depth's path metrics and every decoded bit with a bit-true model.
module tb_spect_decoder;
  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid, out_bit, done;
  logic [1:0][2:0] soft_in;
  int checks, failures;

  always #5 clk = ~clk;

  spect_decoder dut (.clk, .rst_n, .in_valid, .soft_in, .out_valid, .out_bit);

  spect_dec_checker chk (
    .clk, .rst_n, .in_valid, .soft_in, .out_valid, .out_bit,
    .acs_valid(dut.acs_valid), .e_valid(dut.u_pmsu.e_valid),
    .sm_d(dut.sm_d), .en_d(dut.en_d), .done, .checks, .failures);

  initial begin : watchdog
    #(5_000_000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
