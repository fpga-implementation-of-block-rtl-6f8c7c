// bp_df_mpic: block parallel decision-feedback multistage parallel interference
// cancellation (BP-DF-MPIC) detector for a K-user synchronous DS-CDMA uplink
// in a flat (frequency-nonselective), block-fading channel.
//
// Three parts: a bank of Rake detectors despreads the received chips into
// y = (CH)^H r; a correlation matrix block computes R = H^H C^H C H from the
// spreading codes and the channel estimates; the interference cancellation
// stages block starts from the Rake decisions and, over M stages, subtracts
// the interference of the other users, z = y - R0 b, where R0 is R without
// its diagonal. Users are processed in blocks of U: a block uses the current
// stage's decisions of the blocks before it (decision feedback) and the
// previous stage's decisions of the rest. U = 1 is DF-MPIC, U = K plain MPIC.
//
// Use: load codes and channel coefficients, pulse load and wait for r_ready
// (K*K + 2 cycles), then stream chips (one per cycle with chip_valid, NC per
// symbol). For each symbol, out_valid pulses 2 cycles after the last chip
// (Rake) plus 2 + sel*NB cycles (stages), with the soft values z and hard
// decisions b (bit 1 = -1) of the stage chosen by sel. New codes or channel
// coefficients are loaded between bursts while no symbol is in flight.
// The partition into the three parts and their equations follow the published architecture;
// the chip-serial Rake, the sequential matrix computation, the quantisation
// and the handshakes are this design's choices. The imaginary parts of y and
// R are computed but not used: with real BPSK decisions only the real parts
// reach a decision, so lint reports them as unused, as it does the done pulse
// of the matrix block (r_ready is used instead).
module bp_df_mpic
  import mpic_pkg::*;
#(
  parameter int unsigned K      = K_USERS,
  parameter int unsigned NC     = NC_CHIPS,
  parameter int unsigned M      = M_STAGES,
  parameter int unsigned U      = USERS_PER_BLOCK,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned QW     = Q_W,
  parameter int unsigned QSHIFT = Q_SHIFT,
  parameter int unsigned ZW     = Q_W + $clog2(K_USERS) + 1,
  parameter int unsigned SW     = $clog2(M_STAGES + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration: spreading codes and channel estimates
  input  chip_t                code [K][NC],
  input  logic signed [DW-1:0] h_re [K],
  input  logic signed [DW-1:0] h_im [K],
  input  logic                 load,
  output logic                 r_ready,
  // received chips
  input  logic                 chip_valid,
  input  logic signed [DW-1:0] r_re,
  input  logic signed [DW-1:0] r_im,
  // stage selection and estimates
  input  logic [SW-1:0]        sel,
  output logic                 out_valid,
  output logic signed [ZW-1:0] z_out [K],
  output logic [K-1:0]         b_out
);
  logic                 y_valid;
  logic signed [QW-1:0] y_re [K];
  logic signed [QW-1:0] y_im [K];
  logic                 cm_busy, cm_done;
  logic signed [QW-1:0] rm_re [K][K];
  logic signed [QW-1:0] rm_im [K][K];

  rake_bank #(.K(K), .NC(NC), .DW(DW), .QW(QW), .QSHIFT(QSHIFT)) u_rake (
    .clk       (clk),
    .rst_n     (rst_n),
    .chip_valid(chip_valid),
    .r_re      (r_re),
    .r_im      (r_im),
    .code      (code),
    .h_re      (h_re),
    .h_im      (h_im),
    .y_valid   (y_valid),
    .y_re      (y_re),
    .y_im      (y_im)
  );

  corr_matrix #(.K(K), .NC(NC), .DW(DW), .QW(QW), .QSHIFT(QSHIFT)) u_corr (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (load),
    .code   (code),
    .h_re   (h_re),
    .h_im   (h_im),
    .busy   (cm_busy),
    .done   (cm_done),
    .r_valid(r_ready),
    .r_re   (rm_re),
    .r_im   (rm_im)
  );

  ic_stages #(.K(K), .M(M), .U(U), .QW(QW), .ZW(ZW), .SW(SW)) u_ic (
    .clk      (clk),
    .rst_n    (rst_n),
    .y_valid  (y_valid),
    .y_re     (y_re),
    .r_re     (rm_re),
    .sel      (sel),
    .out_valid(out_valid),
    .z_out    (z_out),
    .b_out    (b_out)
  );

  // Symbols are only detected with a complete correlation matrix.
  assert property (@(posedge clk) disable iff (!rst_n) y_valid |-> r_ready && !cm_busy)
    else $error("bp_df_mpic: symbol detected while the correlation matrix is not ready");
endmodule
