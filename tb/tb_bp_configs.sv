// tb_bp_configs: the four detector configurations side by side over a noise sweep.
//
// Four detectors of the default size (K = 10 users, NC = 32 chips, M = 4
// stages) differ only in the users per block: U = 10 (plain MPIC), 5, 2 and
// 1 (DF-MPIC). They receive the same chips, generated here as r = C H b + n
// with random +-1+-j codes, a new Rayleigh flat-fading channel per fading
// block (complex Gaussian h_k, equal mean power) and complex Gaussian noise
// whose power is set for Eb/N0 = 0, 4, 8, 12 and 16 dB. The received chips
// are saturated to 16 bits like an ADC would. Every output of every detector
// is compared bit-exactly with the longint model, and the bit errors of the
// Rake decision and of stage M are counted per configuration and Eb/N0 and
// printed as a table: the simulated counterpart of a BER-versus-SNR
// comparison of the four detectors.
module tb_bp_configs;
  import mpic_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = K_USERS, NC = NC_CHIPS, M = M_STAGES;
  localparam int DW = DATA_W, QW = Q_W, QS = Q_SHIFT;
  localparam int ZW = Q_W + $clog2(K_USERS) + 1, SW = $clog2(M_STAGES + 1);
  localparam int NI = 4;
  localparam int UV [NI] = '{10, 5, 2, 1};
  localparam int NSNR = 5;
  localparam int EBN0_DB [NSNR] = '{0, 4, 8, 12, 16};
  localparam real H_SIGMA = 256.0;  // std. dev. of each channel component
  localparam int NFADE = 40;      // fading blocks per noise level
  localparam int NSYM  = 50;      // symbols per fading block

  logic clk = 0, rst_n = 0;
  chip_t code [K][NC];
  logic signed [DW-1:0] h_re [K], h_im [K];
  logic load = 0;
  logic r_ready [NI];
  logic chip_valid = 0;
  logic signed [DW-1:0] r_re = '0, r_im = '0;
  logic [SW-1:0] sel = SW'(M);
  logic out_valid [NI];
  logic signed [ZW-1:0] z_out [NI][K];
  logic [K-1:0] b_out [NI];

  int checks = 0, failures = 0;
  longint exp_z [NI][NSYM][K];
  int got [NI];
  int rake_err [NSNR], stage_err [NI][NSNR];

  always #5 clk = ~clk;

  for (genvar n = 0; n < NI; n++) begin : g_det
    bp_df_mpic #(.U(UV[n])) dut (
      .clk(clk), .rst_n(rst_n), .code(code), .h_re(h_re), .h_im(h_im), .load(load),
      .r_ready(r_ready[n]), .chip_valid(chip_valid), .r_re(r_re), .r_im(r_im), .sel(sel),
      .out_valid(out_valid[n]), .z_out(z_out[n]), .b_out(b_out[n]));

    always @(posedge clk) if (rst_n && out_valid[n]) begin
      checks++;
      if (got[n] >= NSYM) begin
        failures++;
        $display("U=%0d unexpected output", UV[n]);
      end else
        for (int k = 0; k < K; k++)
          if (longint'(z_out[n][k]) != exp_z[n][got[n]][k] ||
              b_out[n][k] != (exp_z[n][got[n]][k] < 0)) begin
            failures++;
            $display("U=%0d sym %0d user %0d: z %0d exp %0d", UV[n], got[n], k, z_out[n][k],
                     exp_z[n][got[n]][k]);
          end
      got[n]++;
    end
  end

  // zero-mean unit-variance Gaussian sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic longint sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t rr;
    real sig_pow, noise_pow, n_sigma;
    foreach (rake_err[s]) rake_err[s] = 0;
    foreach (stage_err[n, s]) stage_err[n][s] = 0;
    for (int k = 0; k < K; k++)
      for (int i = 0; i < NC; i++) code[k][i] = chip_t'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int snr = 0; snr < NSNR; snr++) begin
      sig_pow = 0.0;
      noise_pow = 0.0;
      // Eb = NC * |c|^2 * E|h|^2 = NC * 2 * 2 H_SIGMA^2, N0 = 2 n_sigma^2
      n_sigma = $sqrt(real'(NC) * 2.0 * H_SIGMA ** 2 / (10.0 ** (real'(EBN0_DB[snr]) / 10.0)));
      for (int f = 0; f < NFADE; f++) begin
        for (int k = 0; k < K; k++) begin
          h_re[k] = DW'(sat16(longint'($rtoi(H_SIGMA * gauss()))));
          h_im[k] = DW'(sat16(longint'($rtoi(H_SIGMA * gauss()))));
          sig_pow += real'(NC) * 2.0 * (real'(h_re[k]) ** 2 + real'(h_im[k]) ** 2);
        end
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
        while (!(r_ready[0] && r_ready[1] && r_ready[2] && r_ready[3])) @(negedge clk);
        foreach (got[n]) got[n] = 0;
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
            longint a, b, na, nb;
            na = longint'($rtoi(n_sigma * gauss()));
            nb = longint'($rtoi(n_sigma * gauss()));
            noise_pow += real'(na * na + nb * nb);
            a = na;
            b = nb;
            for (int k = 0; k < K; k++) begin
              longint cr, ci;
              cr = cv(code[k][i].re_neg);
              ci = cv(code[k][i].im_neg);
              a += (cr * longint'(h_re[k]) - ci * longint'(h_im[k])) * bt[k];
              b += (cr * longint'(h_im[k]) + ci * longint'(h_re[k])) * bt[k];
            end
            a = sat16(a);
            b = sat16(b);
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
            @(negedge clk);
          end
          for (int k = 0; k < K; k++)
            yv[k] = quant(longint'(h_re[k]) * sr[k] + longint'(h_im[k]) * si[k], QS, QW);
          for (int n = 0; n < NI; n++) begin
            bp_df_mpic(yv, rr, K, UV[n], M, zs, bs);
            for (int k = 0; k < K; k++) begin
              exp_z[n][s][k] = zs[M][k];
              if (bs[M][k] != bt[k]) stage_err[n][snr]++;
              if (n == 0 && bs[0][k] != bt[k]) rake_err[snr]++;
            end
          end
        end
        chip_valid = 0;
        repeat (4 + M * K + 4) @(negedge clk);
        for (int n = 0; n < NI; n++) begin
          checks++;
          if (got[n] != NSYM) begin
            failures++;
            $display("U=%0d: %0d of %0d symbols out", UV[n], got[n], NSYM);
          end
        end
      end
      // measured Eb/N0: mean bit energy of one user over the noise power per chip
      $display("Eb/N0 set %0d dB, measured %0.1f dB", EBN0_DB[snr],
               10.0 * $log10((sig_pow / (NFADE * K)) / (noise_pow / (NFADE * NSYM * NC))));
    end
    $display("bit errors per %0d bits:  Rake   MPIC(U=10)   BP5   BP2   DF-MPIC(U=1)",
             NFADE * NSYM * K);
    for (int snr = 0; snr < NSNR; snr++)
      $display("  Eb/N0 %2d dB:             %5d  %5d        %5d %5d %5d", EBN0_DB[snr], rake_err[snr],
               stage_err[0][snr], stage_err[1][snr], stage_err[2][snr], stage_err[3][snr]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
