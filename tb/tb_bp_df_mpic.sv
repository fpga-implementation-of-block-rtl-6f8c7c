// tb_bp_df_mpic: end-to-end test of the detector at its default size
// (K = 10 users, NC = 32 chips, M = 4 stages, 5 users per block).
//
// The testbench plays the transmitters and the channel: random +-1+-j
// spreading codes, BPSK bits, flat block-fading channel coefficients with
// unequal user powers and uniform noise give r = C H b + n, one chip per
// cycle. For each fading block it loads the channel, waits for the
// correlation matrix, selects one output stage (all of 0..M are used) and
// streams symbols back to back. Every output is compared bit-exactly with a
// longint model of the whole chain (Rake, correlation matrix, quantisation,
// block-wise cancellation), and must appear 4 + sel*NB cycles after the last
// chip of its symbol. Counted mechanisms: channel reloads, symbols per
// selected stage, cancellations that used a fed-back decision differing from
// the previous stage, and Rake errors corrected by the cancellation stages.
// Bit errors of the Rake and of stage M against the sent bits are reported.
module tb_bp_df_mpic;
  import mpic_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = K_USERS, NC = NC_CHIPS, M = M_STAGES, U = USERS_PER_BLOCK;
  localparam int DW = DATA_W, QW = Q_W, QS = Q_SHIFT;
  localparam int ZW = Q_W + $clog2(K_USERS) + 1, SW = $clog2(M_STAGES + 1);
  localparam int NB = (K + U - 1) / U;
  localparam int NFADE = 10;      // fading blocks (channel loads)
  localparam int NSYM  = 40;      // symbols per fading block

  logic clk = 0, rst_n = 0;
  chip_t code [K][NC];
  logic signed [DW-1:0] h_re [K], h_im [K];
  logic load = 0, r_ready;
  logic chip_valid = 0;
  logic signed [DW-1:0] r_re = '0, r_im = '0;
  logic [SW-1:0] sel = '0;
  logic out_valid;
  logic signed [ZW-1:0] z_out [K];
  logic [K-1:0] b_out;

  int checks = 0, failures = 0, cycle = 0;
  int reloads = 0, fb_changed = 0, corrected = 0, rake_bit_err = 0, final_bit_err = 0;
  int sel_symbols [M+1];
  longint exp_z [NSYM][K];
  int last_chip_cycle [NSYM];
  int got = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bp_df_mpic dut (.*);

  function automatic longint rnd(int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (got >= NSYM) check("unexpected output", 0);
    else begin
      check($sformatf("latency of symbol %0d: %0d", got, cycle - last_chip_cycle[got]),
            cycle - last_chip_cycle[got] == 4 + int'(sel) * NB);
      for (int k = 0; k < K; k++)
        check($sformatf("sel %0d sym %0d user %0d: z %0d exp %0d", sel, got, k, z_out[k],
                        exp_z[got][k]),
              longint'(z_out[k]) == exp_z[got][k] && b_out[k] == (exp_z[got][k] < 0));
    end
    got++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t rr;
    foreach (sel_symbols[s]) sel_symbols[s] = 0;
    for (int k = 0; k < K; k++)
      for (int i = 0; i < NC; i++) code[k][i] = chip_t'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NFADE; f++) begin
      // new channel: user powers spread over about 12 dB
      for (int k = 0; k < K; k++) begin
        int bits;
        bits = 8 + (k + f) % 3;
        h_re[k] = DW'(rnd(bits));
        h_im[k] = DW'(rnd(bits));
      end
      // correlation matrix, modelled
      for (int k = 0; k < K; k++)
        for (int j = 0; j < K; j++) begin
          longint gr, gi, hr, hi;
          gr = 0;
          gi = 0;
          for (int i = 0; i < NC; i++) begin
            gr += cv(code[k][i].re_neg) * cv(code[j][i].re_neg)
                + cv(code[k][i].im_neg) * cv(code[j][i].im_neg);
            gi += cv(code[k][i].re_neg) * cv(code[j][i].im_neg)
                - cv(code[k][i].im_neg) * cv(code[j][i].re_neg);
          end
          hr = longint'(h_re[k]) * longint'(h_re[j]) + longint'(h_im[k]) * longint'(h_im[j]);
          hi = longint'(h_re[k]) * longint'(h_im[j]) - longint'(h_im[k]) * longint'(h_re[j]);
          rr[k][j] = quant(hr * gr - hi * gi, QS, QW);
        end
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      check("r_ready drops during a load", !r_ready);
      while (!r_ready) @(negedge clk);
      reloads++;
      sel = SW'(f % (M + 1));
      got = 0;
      for (int s = 0; s < NSYM; s++) begin
        int     bt [K];
        longint sr [K], si [K];
        vec_t   yv;
        longint zs [MMAX+1][KMAX];
        int     bs [MMAX+1][KMAX];
        for (int k = 0; k < K; k++) begin
          bt[k] = ($urandom & 1) ? -1 : 1;
          sr[k] = 0;
          si[k] = 0;
        end
        for (int i = 0; i < NC; i++) begin
          longint a, b;
          a = rnd(11);
          b = rnd(11);
          for (int k = 0; k < K; k++) begin
            longint cr, ci;
            cr = cv(code[k][i].re_neg);
            ci = cv(code[k][i].im_neg);
            // c h b
            a += (cr * longint'(h_re[k]) - ci * longint'(h_im[k])) * bt[k];
            b += (cr * longint'(h_im[k]) + ci * longint'(h_re[k])) * bt[k];
          end
          chip_valid = 1;
          r_re = DW'(a);
          r_im = DW'(b);
          for (int k = 0; k < K; k++) begin
            longint cr, ci;
            cr = cv(code[k][i].re_neg);
            ci = cv(code[k][i].im_neg);
            sr[k] += cr * a + ci * b;
            si[k] += cr * b - ci * a;
          end
          if (i == NC - 1) last_chip_cycle[s] = cycle;
          @(negedge clk);
        end
        for (int k = 0; k < K; k++)
          yv[k] = quant(longint'(h_re[k]) * sr[k] + longint'(h_im[k]) * si[k], QS, QW);
        bp_df_mpic(yv, rr, K, U, M, zs, bs);
        for (int k = 0; k < K; k++) begin
          exp_z[s][k] = zs[sel][k];
          if (bs[0][k] != bt[k]) rake_bit_err++;
          if (bs[M][k] != bt[k]) final_bit_err++;
          if (bs[0][k] != bt[k] && bs[M][k] == bt[k]) corrected++;
        end
        for (int m = 1; m <= M; m++)
          for (int k = 0; k < K; k++)
            for (int j = 0; j < K; j++)
              if (j / U < k / U && bs[m][j] != bs[m-1][j]) fb_changed++;
        sel_symbols[sel]++;
      end
      chip_valid = 0;
      repeat (4 + M * NB + 4) @(negedge clk);
      check($sformatf("fading block %0d: %0d of %0d symbols out", f, got, NSYM), got == NSYM);
    end
    check("channel reloaded", reloads >= 2);
    for (int s = 0; s <= M; s++) check($sformatf("stage %0d selected", s), sel_symbols[s] > 0);
    check("decision feedback changed a cancellation", fb_changed > 0);
    check("a Rake error was corrected", corrected > 0);
    $display("reloads %0d, fed-back decisions that changed %0d, Rake errors corrected %0d",
             reloads, fb_changed, corrected);
    $display("bit errors over %0d bits: Rake %0d, stage %0d %0d", NFADE * NSYM * K,
             rake_bit_err, M, final_bit_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
