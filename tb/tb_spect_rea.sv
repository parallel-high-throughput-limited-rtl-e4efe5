// Testbench of the register exchange array at K = 4 (8 states), L = 6:
// random decisions and enables; every row's oldest bit is compared with a
// model that shifts the chosen predecessor's row, appends the state's
// information bit and holds rows whose enable is low.
module tb_spect_rea;
  localparam int K = 4, N = 8, L = 6;
  logic clk = 0, rst_n = 0, adv = 0;
  logic [N-1:0] dec = '0, en = '0;
  logic [N-1:0] oldest;
  int checks = 0, failures = 0, nhold = 0;
  bit rows [N][L];

  spect_rea #(.K(K), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++) for (int i = 0; i < L; i++) rows[s][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      bit nr [N][L];
      @(negedge clk);
      adv = ($urandom % 5) != 0;
      dec = N'($urandom);
      en  = N'($urandom | $urandom);
      for (int s = 0; s < N; s++) begin
        int p;
        p = ((s << 1) & (N - 1)) | int'(dec[s]);
        if (adv && en[s]) begin
          nr[s][0] = (s >> (K - 2)) & 1;      // newest bit: MSB of the state
          for (int i = 1; i < L; i++) nr[s][i] = rows[p][i-1];
        end else begin
          if (adv) nhold++;
          for (int i = 0; i < L; i++) nr[s][i] = rows[s][i];
        end
      end
      rows = nr;
      @(posedge clk);
      #1;
      for (int s = 0; s < N; s++) begin
        checks++;
        if (oldest[s] != rows[s][L-1]) begin
          failures++;
          $display("t=%0d row %0d: oldest %0b expected %0b", t, s, oldest[s], rows[s][L-1]);
        end
      end
    end
    checks++;
    if (nhold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
