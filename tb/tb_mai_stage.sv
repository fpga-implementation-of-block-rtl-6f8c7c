// tb_mai_stage: self-checking test of one MAI cancellation stage.
//
// Four instances share one random stimulus: U = 1 (DF-MPIC), 2, 5 (BP5) and
// 10 (MPIC) users per block for K = 10 users. Each gets random Rake outputs
// y, previous-stage decisions b_prev and a random real correlation matrix,
// with symbols back to back and with idle gaps. The expected soft values and
// decisions come from a user-by-user model: user k cancels user j with the
// new decision of j if j's block precedes k's block, else with b_prev. The
// output must appear exactly NB = ceil(K/U) cycles after the input. The test
// also counts how often a fed-back decision differed from b_prev, i.e. how
// often the decision feedback actually changed what was cancelled.
module tb_mai_stage;
  import mpic_pkg::*;

  localparam int K = 10, QW = 16, ZW = 21;
  localparam int NU = 4;
  localparam int UV [NU] = '{1, 2, 5, 10};
  localparam int NSYM = 200;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [QW-1:0] y [K];
  logic [K-1:0]         b_prev;
  logic signed [QW-1:0] r [K][K];
  logic                 out_valid [NU];
  logic signed [ZW-1:0] z [NU][K];
  logic [K-1:0]         b [NU];

  int checks = 0, failures = 0, cycle = 0, feedback_used [NU];
  int sent_cycle [NSYM];
  longint exp_z [NU][NSYM][K];
  int     got [NU];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar n = 0; n < NU; n++) begin : g_dut
    mai_stage #(.K(K), .U(UV[n]), .QW(QW), .ZW(ZW)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y(y), .b_prev(b_prev), .r(r),
      .out_valid(out_valid[n]), .z(z[n]), .b(b[n]));

    always @(posedge clk) if (rst_n && out_valid[n]) begin
      int nb;
      nb = (K + UV[n] - 1) / UV[n];
      checks++;
      if (got[n] >= NSYM || cycle - sent_cycle[got[n]] != nb) begin
        failures++;
        $display("U=%0d latency error on symbol %0d", UV[n], got[n]);
      end else
        for (int k = 0; k < K; k++) begin
          checks += 2;
          if (longint'(z[n][k]) != exp_z[n][got[n]][k]) begin
            failures++;
            $display("U=%0d sym %0d user %0d z got %0d exp %0d", UV[n], got[n], k, z[n][k],
                     exp_z[n][got[n]][k]);
          end
          if (b[n][k] != (exp_z[n][got[n]][k] < 0)) begin
            failures++;
            $display("U=%0d sym %0d user %0d wrong decision", UV[n], got[n], k);
          end
        end
      got[n]++;
    end
  end

  function automatic longint rnd(int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (got[n]) got[n] = 0;
    foreach (feedback_used[n]) feedback_used[n] = 0;
    for (int k = 0; k < K; k++)
      for (int j = 0; j < K; j++) r[k][j] = QW'(rnd(12));
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < K; k++) y[k] = QW'(rnd(14));
      b_prev = K'($urandom);
      // one full-scale symbol
      if (s == 7) for (int k = 0; k < K; k++) y[k] = (k % 2) ? 16'sh7fff : 16'sh8000;
      for (int n = 0; n < NU; n++) begin
        int bn [K];
        for (int k = 0; k < K; k++) begin
          longint zz;
          zz = longint'(y[k]);
          for (int j = 0; j < K; j++) begin
            int bj;
            if (j == k) continue;
            if (j / UV[n] < k / UV[n]) begin
              bj = bn[j];
              if ((bj < 0) != b_prev[j]) feedback_used[n]++;
            end else
              bj = b_prev[j] ? -1 : 1;
            zz -= longint'(r[k][j]) * bj;
          end
          exp_z[n][s][k] = zz;
          bn[k] = (zz < 0) ? -1 : 1;
        end
      end
      in_valid = 1;
      sent_cycle[s] = cycle;
      @(negedge clk);
      if (s % 5 == 4) begin
        in_valid = 0;
        repeat ($urandom_range(3)) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (15) @(negedge clk);
    for (int n = 0; n < NU; n++) begin
      checks++;
      if (got[n] != NSYM) begin failures++; $display("U=%0d got %0d symbols", UV[n], got[n]); end
      checks++;
      if (UV[n] < K && feedback_used[n] == 0) begin
        failures++;
        $display("U=%0d decision feedback never changed a cancellation", UV[n]);
      end
      $display("U=%0d: %0d cancellations used a changed fed-back decision", UV[n], feedback_used[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
