// tb_corr_matrix: self-checking test of the correlation matrix block.
//
// Loads random +-1+-j codes and channel coefficients, pulses start and
// compares every entry R_kj with quant(conj(h_k) h_j sum conj(c_k) c_j)
// computed here in longint. Checks busy/r_valid and that done comes exactly
// K*K + 2 cycles after start. Runs several loads, the last one with
// full-scale coefficients so the saturation of the quantiser is exercised.
module tb_corr_matrix;
  import mpic_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 10, NC = 32, DW = 16, QW = 16, QS = 12;
  localparam int NLOAD = 5;

  logic clk = 0, rst_n = 0, start = 0;
  chip_t code [K][NC];
  logic signed [DW-1:0] h_re [K], h_im [K];
  logic busy, done, r_valid;
  logic signed [QW-1:0] r_re [K][K], r_im [K][K];

  int checks = 0, failures = 0, saturated = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  corr_matrix #(.K(K), .NC(NC), .DW(DW), .QW(QW), .QSHIFT(QS)) dut (.*);

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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check("r_valid low after reset", !r_valid && !busy);
    for (int l = 0; l < NLOAD; l++) begin
      int t0;
      bit big;
      big = (l == NLOAD - 1);
      for (int k = 0; k < K; k++) begin
        for (int i = 0; i < NC; i++) code[k][i] = chip_t'($urandom);
        h_re[k] = DW'(rnd(big ? 16 : 10));
        h_im[k] = DW'(rnd(big ? 16 : 10));
      end
      // one load with identical codes for two users: full correlation
      if (l == 1) for (int i = 0; i < NC; i++) code[3][i] = code[7][i];
      @(negedge clk);
      start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      check("busy after start", busy && !r_valid);
      while (!done) @(negedge clk);
      check($sformatf("done latency %0d", cycle - t0 - 1), cycle - t0 - 1 == K * K + 2);
      @(negedge clk);
      check("r_valid after done", r_valid && !busy);
      for (int k = 0; k < K; k++)
        for (int j = 0; j < K; j++) begin
          longint gr, gi, hr, hi, er, ei;
          gr = 0;
          gi = 0;
          for (int i = 0; i < NC; i++) begin
            longint akr, aki, bjr, bji;
            akr = cv(code[k][i].re_neg);
            aki = cv(code[k][i].im_neg);
            bjr = cv(code[j][i].re_neg);
            bji = cv(code[j][i].im_neg);
            gr += akr * bjr + aki * bji;
            gi += akr * bji - aki * bjr;
          end
          hr = longint'(h_re[k]) * longint'(h_re[j]) + longint'(h_im[k]) * longint'(h_im[j]);
          hi = longint'(h_re[k]) * longint'(h_im[j]) - longint'(h_im[k]) * longint'(h_re[j]);
          er = quant(hr * gr - hi * gi, QS, QW);
          ei = quant(hr * gi + hi * gr, QS, QW);
          if (er == 32767 || er == -32768) saturated++;
          check($sformatf("load %0d R[%0d][%0d] got %0d,%0d exp %0d,%0d", l, k, j,
                          r_re[k][j], r_im[k][j], er, ei),
                longint'(r_re[k][j]) == er && longint'(r_im[k][j]) == ei);
        end
    end
    check("saturation exercised", saturated > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
