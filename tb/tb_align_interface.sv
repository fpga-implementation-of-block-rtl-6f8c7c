// tb_align_interface: self-checking test of the alignment registers.
//
// Drives a new random vector every cycle and checks that tap m-1 shows the
// vector driven 1 + (m-1)*NB cycles earlier, for M = 4 stages and NB = 2
// blocks (the default BP5 configuration with 10 users) and also NB = 3.
module tb_align_interface;
  import mpic_pkg::*;

  localparam int K = 10, M = 4, QW = 16;
  localparam int NCYC = 100;

  logic clk = 0;
  logic signed [QW-1:0] y_in [K];
  logic signed [QW-1:0] tap2 [M][K];
  logic signed [QW-1:0] tap3 [M][K];
  logic signed [QW-1:0] hist [NCYC][K];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  align_interface #(.K(K), .M(M), .NB(2), .QW(QW)) dut2 (.clk(clk), .y_in(y_in), .y_tap(tap2));
  align_interface #(.K(K), .M(M), .NB(3), .QW(QW)) dut3 (.clk(clk), .y_in(y_in), .y_tap(tap3));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      // vectors driven before this edge are history; check the taps
      for (int m = 1; m <= M; m++) begin
        int d2, d3;
        d2 = 1 + (m - 1) * 2;
        d3 = 1 + (m - 1) * 3;
        if (c >= d3) begin
          checks += 2;
          if (tap2[m-1] != hist[c-d2]) begin
            failures++;
            $display("cycle %0d NB=2 tap %0d wrong", c, m);
          end
          if (tap3[m-1] != hist[c-d3]) begin
            failures++;
            $display("cycle %0d NB=3 tap %0d wrong", c, m);
          end
        end
      end
      for (int k = 0; k < K; k++) y_in[k] = QW'($urandom);
      hist[c] = y_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
