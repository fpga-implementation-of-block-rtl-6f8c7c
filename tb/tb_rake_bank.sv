// tb_rake_bank: self-checking test of the Rake detector bank.
//
// Random +-1+-j codes, random channel coefficients and random chips; symbols
// are sent back to back and with idle gaps. Every y_k is compared with
// quant(conj(h_k) sum conj(c_k) r) computed here in longint, and y_valid must
// come exactly 2 cycles after the last chip of each symbol. One pass uses
// full-scale inputs so that the output saturation is exercised.
module tb_rake_bank;
  import mpic_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 10, NC = 32, DW = 16, QW = 16, QS = 12;
  localparam int NSYM = 24;

  logic clk = 0, rst_n = 0;
  logic chip_valid = 0;
  logic signed [DW-1:0] r_re = '0, r_im = '0;
  chip_t code [K][NC];
  logic signed [DW-1:0] h_re [K], h_im [K];
  logic y_valid;
  logic signed [QW-1:0] y_re [K], y_im [K];

  int checks = 0, failures = 0, saturated = 0;
  longint exp_re [NSYM][K], exp_im [NSYM][K];
  int     last_cycle [NSYM];
  int     cycle = 0, got = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rake_bank #(.K(K), .NC(NC), .DW(DW), .QW(QW), .QSHIFT(QS)) dut (.*);

  function automatic longint rnd(int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  // output checker
  always @(posedge clk) if (rst_n && y_valid) begin
    checks++;
    if (got >= NSYM || cycle - last_cycle[got] != 2) begin
      failures++;
      $display("latency error: symbol %0d at cycle %0d", got, cycle);
    end
    for (int k = 0; k < K; k++) begin
      checks++;
      if (got < NSYM && (longint'(y_re[k]) != exp_re[got][k] || longint'(y_im[k]) != exp_im[got][k])) begin
        failures++;
        $display("sym %0d user %0d: got %0d,%0d exp %0d,%0d", got, k, y_re[k], y_im[k],
                 exp_re[got][k], exp_im[got][k]);
      end
      if (got < NSYM && (exp_re[got][k] == 32767 || exp_re[got][k] == -32768)) saturated++;
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
    for (int k = 0; k < K; k++)
      for (int i = 0; i < NC; i++) code[k][i] = chip_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      longint sr [K], si [K];
      bit big;
      big = (s >= NSYM - 4);
      for (int k = 0; k < K; k++) begin
        h_re[k] = DW'(rnd(big ? 16 : 10));
        h_im[k] = DW'(rnd(big ? 16 : 10));
        sr[k] = 0;
        si[k] = 0;
      end
      for (int i = 0; i < NC; i++) begin
        longint a, b;
        a = rnd(big ? 16 : 14);
        b = rnd(big ? 16 : 14);
        @(negedge clk);
        if (s % 3 == 1) begin
          chip_valid = 0;
          repeat ($urandom_range(2)) @(negedge clk);
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
        if (i == NC - 1) last_cycle[s] = cycle;
      end
      for (int k = 0; k < K; k++) begin
        longint hr, hi;
        hr = longint'(h_re[k]);
        hi = longint'(h_im[k]);
        exp_re[s][k] = quant(hr * sr[k] + hi * si[k], QS, QW);
        exp_im[s][k] = quant(hr * si[k] - hi * sr[k], QS, QW);
      end
      // channel changes only after the symbol left the multiplier
      @(negedge clk);
      chip_valid = 0;
      @(negedge clk);
      @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != NSYM) begin failures++; $display("got %0d symbols of %0d", got, NSYM); end
    checks++;
    if (saturated == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
