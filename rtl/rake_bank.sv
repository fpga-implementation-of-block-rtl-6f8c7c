// rake_bank: bank of K single-finger Rake detectors, y = (C H)^H r.
//
// In a frequency-nonselective (flat) channel each user's Rake detector is one
// finger: a correlator despreads the received chips with the conjugate of the
// user's spreading code, s_k = sum_i conj(c_k(i)) r(i), and the sum is then
// weighted with the conjugate channel coefficient, y_k = conj(h_k) s_k.
// All K correlators run in parallel on the same chip stream. The result is
// quantised to Q_W bits (arithmetic right shift by Q_SHIFT and saturation).
//
// Interface: one complex chip per cycle when chip_valid is high; chips of a
// symbol arrive in order, gaps are allowed. A chip counter, cleared by reset,
// marks symbol boundaries every NC chips. Codes and channel coefficients are
// static inputs (block fading) and must not change inside a symbol.
// Timing: y_valid pulses for one cycle two cycles after the last chip of a
// symbol (one cycle to close the accumulation, one for the complex multiply).
// The despreader and the chip encoding (+-1 +-j chips, so despreading needs no
// multiplier) are this design's choices; the equation is the published one.
module rake_bank
  import mpic_pkg::*;
#(
  parameter int unsigned K       = K_USERS,
  parameter int unsigned NC      = NC_CHIPS,
  parameter int unsigned DW      = DATA_W,
  parameter int unsigned QW      = Q_W,
  parameter int unsigned QSHIFT  = Q_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 chip_valid,
  input  logic signed [DW-1:0] r_re,
  input  logic signed [DW-1:0] r_im,
  input  chip_t                code [K][NC],
  input  logic signed [DW-1:0] h_re [K],
  input  logic signed [DW-1:0] h_im [K],
  output logic                 y_valid,
  output logic signed [QW-1:0] y_re [K],
  output logic signed [QW-1:0] y_im [K]
);
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1;
  localparam int unsigned AW = DW + 2 + $clog2(NC);   // despread accumulator
  localparam int unsigned PW = AW + DW + 1;           // after conj(h) * s

  logic [CW-1:0] chip_idx;
  logic          last_chip;
  logic          s_valid;

  assign last_chip = chip_valid && (chip_idx == CW'(NC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_idx <= '0;
      s_valid  <= 1'b0;
      y_valid  <= 1'b0;
    end else begin
      s_valid <= last_chip;
      y_valid <= s_valid;
      if (chip_valid) chip_idx <= last_chip ? '0 : chip_idx + 1'b1;
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_user
    logic signed [AW-1:0] acc_re, acc_im;      // running despread sum
    logic signed [AW-1:0] nxt_re, nxt_im;
    logic signed [AW-1:0] s_re, s_im;          // completed despread symbol
    logic signed [AW-1:0] tr, ti;              // conj(c) * r for this chip
    logic signed [PW-1:0] p_re, p_im;
    logic signed [QW-1:0] q_re, q_im;
    chip_t                c;

    always_comb begin
      c  = code[k][chip_idx];
      // conj(c) r = (cr - j ci)(rr + j ri) = (cr rr + ci ri) + j (cr ri - ci rr)
      tr = (c.re_neg ? -AW'(r_re) : AW'(r_re)) + (c.im_neg ? -AW'(r_im) : AW'(r_im));
      ti = (c.re_neg ? -AW'(r_im) : AW'(r_im)) - (c.im_neg ? -AW'(r_re) : AW'(r_re));
      nxt_re = (chip_idx == '0) ? tr : acc_re + tr;
      nxt_im = (chip_idx == '0) ? ti : acc_im + ti;
    end

    always_ff @(posedge clk) begin
      if (chip_valid) begin
        acc_re <= nxt_re;
        acc_im <= nxt_im;
      end
      if (last_chip) begin
        s_re <= nxt_re;
        s_im <= nxt_im;
      end
    end

    // conj(h) s = (hr - j hi)(sr + j si) = (hr sr + hi si) + j (hr si - hi sr)
    assign p_re = PW'(h_re[k]) * PW'(s_re) + PW'(h_im[k]) * PW'(s_im);
    assign p_im = PW'(h_re[k]) * PW'(s_im) - PW'(h_im[k]) * PW'(s_re);

    quantize #(.IN_W(PW), .OUT_W(QW), .SHIFT(QSHIFT)) u_q_re (.din(p_re), .dout(q_re));
    quantize #(.IN_W(PW), .OUT_W(QW), .SHIFT(QSHIFT)) u_q_im (.din(p_im), .dout(q_im));

    always_ff @(posedge clk) begin
      if (s_valid) begin
        y_re[k] <= q_re;
        y_im[k] <= q_im;
      end
    end
  end
endmodule
