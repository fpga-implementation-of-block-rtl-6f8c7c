// corr_matrix: computes the user correlation matrix R = H^H (C^H C) H.
//
// Entry (k,j) is R_kj = conj(h_k) h_j G_kj with G_kj = sum_i conj(c_k(i)) c_j(i),
// the code cross-correlation. The block walks through the K*K entries one per
// cycle in a two-step pipeline: step 1 forms G_kj (an adder tree over the NC
// chip products, each of which is 0 or +-2 per component for +-1+-j chips)
// and conj(h_k) h_j; step 2 multiplies the two and quantises the result with
// the same shift as the Rake outputs, then writes it into the R register array.
//
// Interface: a start pulse while idle begins a computation from the codes and
// channel coefficients on the inputs, which must stay stable until done.
// busy is high during the computation; r_valid goes high when all entries are
// written and stays high until the next start. Timing: done pulses K*K + 2
// cycles after the clock edge that samples start. The entries are held in registers so the cancellation
// stages can read the whole matrix in parallel.
// The sequential one-entry-per-cycle organisation is this design's choice; the
// published architecture only specifies the matrix product R = H^H C^H C H. All K*K entries are
// computed, including the diagonal that the cancellation stages ignore.
module corr_matrix
  import mpic_pkg::*;
#(
  parameter int unsigned K      = K_USERS,
  parameter int unsigned NC     = NC_CHIPS,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned QW     = Q_W,
  parameter int unsigned QSHIFT = Q_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  chip_t                code [K][NC],
  input  logic signed [DW-1:0] h_re [K],
  input  logic signed [DW-1:0] h_im [K],
  output logic                 busy,
  output logic                 done,
  output logic                 r_valid,
  output logic signed [QW-1:0] r_re [K][K],
  output logic signed [QW-1:0] r_im [K][K]
);
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned GW = $clog2(NC) + 3;   // |G| <= 2*NC per component
  localparam int unsigned HW = 2 * DW + 1;       // conj(h_k) h_j
  localparam int unsigned PW = HW + GW + 1;      // R before quantisation

  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_t;
  state_t state;

  logic [KW-1:0] k_idx, j_idx;          // entry entering step 1
  logic          s1_valid;
  logic [KW-1:0] s1_k, s1_j;
  logic signed [GW-1:0] g_re, g_im, s1_g_re, s1_g_im;
  logic signed [HW-1:0] hh_re, hh_im, s1_hh_re, s1_hh_im;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [QW-1:0] q_re, q_im;
  logic          last_entry;

  assign busy       = (state != IDLE);
  assign last_entry = (k_idx == KW'(K - 1)) && (j_idx == KW'(K - 1));

  // Step 1: code cross-correlation and channel product for entry (k_idx, j_idx).
  always_comb begin
    chip_t ck, cj;
    g_re = '0;
    g_im = '0;
    for (int i = 0; i < NC; i++) begin
      ck = code[k_idx][i];
      cj = code[j_idx][i];
      // conj(ck) cj: re = ckr cjr + cki cji, im = ckr cji - cki cjr
      g_re = g_re + ((ck.re_neg ^ cj.re_neg) ? -GW'(1) : GW'(1))
                  + ((ck.im_neg ^ cj.im_neg) ? -GW'(1) : GW'(1));
      g_im = g_im + ((ck.re_neg ^ cj.im_neg) ? -GW'(1) : GW'(1))
                  - ((ck.im_neg ^ cj.re_neg) ? -GW'(1) : GW'(1));
    end
    hh_re = HW'(h_re[k_idx]) * HW'(h_re[j_idx]) + HW'(h_im[k_idx]) * HW'(h_im[j_idx]);
    hh_im = HW'(h_re[k_idx]) * HW'(h_im[j_idx]) - HW'(h_im[k_idx]) * HW'(h_re[j_idx]);
  end

  // Step 2: R_kj = hh * G, quantised.
  assign p_re = PW'(s1_hh_re) * PW'(s1_g_re) - PW'(s1_hh_im) * PW'(s1_g_im);
  assign p_im = PW'(s1_hh_re) * PW'(s1_g_im) + PW'(s1_hh_im) * PW'(s1_g_re);

  quantize #(.IN_W(PW), .OUT_W(QW), .SHIFT(QSHIFT)) u_q_re (.din(p_re), .dout(q_re));
  quantize #(.IN_W(PW), .OUT_W(QW), .SHIFT(QSHIFT)) u_q_im (.din(p_im), .dout(q_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      k_idx    <= '0;
      j_idx    <= '0;
      s1_valid <= 1'b0;
      done     <= 1'b0;
      r_valid  <= 1'b0;
    end else begin
      done     <= 1'b0;
      s1_valid <= (state == RUN);
      unique case (state)
        IDLE: if (start) begin
          state   <= RUN;
          k_idx   <= '0;
          j_idx   <= '0;
          r_valid <= 1'b0;
        end
        RUN: begin
          if (last_entry) begin
            state <= DRAIN;
          end else if (j_idx == KW'(K - 1)) begin
            j_idx <= '0;
            k_idx <= k_idx + 1'b1;
          end else begin
            j_idx <= j_idx + 1'b1;
          end
        end
        DRAIN: if (!s1_valid) begin
          state   <= IDLE;
          done    <= 1'b1;
          r_valid <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    s1_k     <= k_idx;
    s1_j     <= j_idx;
    s1_g_re  <= g_re;
    s1_g_im  <= g_im;
    s1_hh_re <= hh_re;
    s1_hh_im <= hh_im;
    if (s1_valid) begin
      r_re[s1_k][s1_j] <= q_re;
      r_im[s1_k][s1_j] <= q_im;
    end
  end

  // A new computation may only be requested while the previous one is idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == IDLE)
    else $error("corr_matrix: start while busy");
endmodule
