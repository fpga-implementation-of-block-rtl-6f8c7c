// tb_ic_stages: self-checking test of the interference cancellation stages block.
//
// K = 10 users, M = 4 stages; two instances with U = 5 (BP5, NB = 2) and
// U = 2 (NB = 5). The stimulus is a real symmetric correlation matrix with a
// strong diagonal and random cross terms, random transmitted bits b and
// y = R b + noise, so the Rake decisions contain errors that the stages can
// remove. For every stage selection sel = 0..M a burst of symbols is sent;
// each output is compared with the stage-by-stage longint model and must
// arrive exactly 2 + sel*NB cycles after its input. The test counts symbols
// in which the selected stage corrected a wrong Rake decision.
module tb_ic_stages;
  import mpic_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 10, M = 4, QW = 16, ZW = 21, SW = 3;
  localparam int NI = 2;
  localparam int UV [NI] = '{5, 2};
  localparam int NBURST = 40;

  logic clk = 0, rst_n = 0, y_valid = 0;
  logic signed [QW-1:0] y_re [K];
  logic signed [QW-1:0] r_re [K][K];
  logic [SW-1:0]        sel = '0;
  logic                 out_valid [NI];
  logic signed [ZW-1:0] z_out [NI][K];
  logic [K-1:0]         b_out [NI];

  int checks = 0, failures = 0, cycle = 0, corrected = 0, rake_err = 0;
  int sent_cycle [NBURST];
  longint exp_z [NI][NBURST][K];
  int     got [NI];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar n = 0; n < NI; n++) begin : g_dut
    ic_stages #(.K(K), .M(M), .U(UV[n]), .QW(QW), .ZW(ZW), .SW(SW)) dut (
      .clk(clk), .rst_n(rst_n), .y_valid(y_valid), .y_re(y_re), .r_re(r_re), .sel(sel),
      .out_valid(out_valid[n]), .z_out(z_out[n]), .b_out(b_out[n]));

    always @(posedge clk) if (rst_n && out_valid[n]) begin
      int nb;
      nb = (K + UV[n] - 1) / UV[n];
      checks++;
      if (got[n] >= NBURST || cycle - sent_cycle[got[n]] != 2 + int'(sel) * nb) begin
        failures++;
        $display("U=%0d sel=%0d latency error on symbol %0d", UV[n], sel, got[n]);
      end else
        for (int k = 0; k < K; k++) begin
          checks += 2;
          if (longint'(z_out[n][k]) != exp_z[n][got[n]][k]) begin
            failures++;
            $display("U=%0d sel=%0d sym %0d user %0d z got %0d exp %0d", UV[n], sel, got[n], k,
                     z_out[n][k], exp_z[n][got[n]][k]);
          end
          if (b_out[n][k] != (exp_z[n][got[n]][k] < 0)) begin
            failures++;
            $display("U=%0d sel=%0d sym %0d user %0d wrong decision", UV[n], sel, got[n], k);
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
    mat_t rm;
    for (int k = 0; k < K; k++) begin
      r_re[k][k] = 16'sd3000;
      for (int j = 0; j < k; j++) begin
        r_re[k][j] = QW'(rnd(12));
        r_re[j][k] = r_re[k][j];
      end
    end
    for (int k = 0; k < K; k++)
      for (int j = 0; j < K; j++) rm[k][j] = longint'(r_re[k][j]);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s <= M; s++) begin
      sel = SW'(s);
      foreach (got[n]) got[n] = 0;
      @(negedge clk);
      for (int q = 0; q < NBURST; q++) begin
        vec_t   yv;
        int     bt [K];
        longint zs [MMAX+1][KMAX];
        int     bs [MMAX+1][KMAX];
        for (int k = 0; k < K; k++) bt[k] = ($urandom & 1) ? -1 : 1;
        for (int k = 0; k < K; k++) begin
          yv[k] = rnd(12);
          for (int j = 0; j < K; j++) yv[k] += rm[k][j] * bt[j];
          y_re[k] = QW'(yv[k]);
        end
        for (int n = 0; n < NI; n++) begin
          bp_df_mpic(yv, rm, K, UV[n], M, zs, bs);
          for (int k = 0; k < K; k++) exp_z[n][q][k] = zs[s][k];
          if (n == 0)
            for (int k = 0; k < K; k++)
              if (bs[0][k] != bt[k] && bs[s][k] == bt[k]) corrected++;
          if (n == 0) for (int k = 0; k < K; k++) if (bs[0][k] != bt[k]) rake_err++;
        end
        y_valid = 1;
        sent_cycle[q] = cycle;
        @(negedge clk);
        if (q % 7 == 3) begin
          y_valid = 0;
          repeat ($urandom_range(4)) @(negedge clk);
        end
      end
      y_valid = 0;
      repeat (30) @(negedge clk);
      for (int n = 0; n < NI; n++) begin
        checks++;
        if (got[n] != NBURST) begin
          failures++;
          $display("U=%0d sel=%0d got %0d symbols", UV[n], s, got[n]);
        end
      end
    end
    checks++;
    if (corrected == 0) begin failures++; $display("no Rake error was ever corrected"); end
    $display("Rake errors %0d, corrected by the selected stage: %0d", rake_err, corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
