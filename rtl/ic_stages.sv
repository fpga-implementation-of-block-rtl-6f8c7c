// ic_stages: interference cancellation stages block of the BP-DF-MPIC detector.
//
// Takes the real parts of the Rake outputs y and of the correlation matrix R
// and refines the decisions in M stages. Stage 0 is the Rake decision
// b0 = sign(Re y), registered once. Stage m (1..M) is a mai_stage
// that cancels the interference estimated from the decisions of stage m-1
// with block-wise decision feedback (U users per block, NB = ceil(K/U) blocks).
// The alignment interface delays y so that each stage gets the Rake output of
// the symbol it is working on, and the output interface picks the stage whose
// estimates leave the block.
//
// Interface: y_valid qualifies y_re for one symbol; a new symbol may come every
// cycle. R (r_re) must be stable while symbols are in flight.
// Timing: stage m's result is ready 1 + m*NB cycles after y_valid; the output
// register adds one, so out_valid follows y_valid by 2 + sel*NB cycles.
// The structure (alignment, M stages, output selection) follows the published architecture.
module ic_stages
  import mpic_pkg::*;
#(
  parameter int unsigned K  = K_USERS,
  parameter int unsigned M  = M_STAGES,
  parameter int unsigned U  = USERS_PER_BLOCK,
  parameter int unsigned QW = Q_W,
  parameter int unsigned ZW = Q_W + $clog2(K_USERS) + 1,
  parameter int unsigned SW = $clog2(M_STAGES + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 y_valid,
  input  logic signed [QW-1:0] y_re [K],
  input  logic signed [QW-1:0] r_re [K][K],
  input  logic [SW-1:0]        sel,
  output logic                 out_valid,
  output logic signed [ZW-1:0] z_out [K],
  output logic [K-1:0]         b_out
);
  localparam int unsigned NB = num_blocks(K, U);

  logic                 st_valid [M+1];
  logic signed [ZW-1:0] st_z     [M+1][K];
  logic [K-1:0]         st_b     [M+1];
  logic signed [QW-1:0] y_tap    [M][K];

  // Stage 0: Rake hard decision.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_valid[0] <= 1'b0;
    else        st_valid[0] <= y_valid;
  end
  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      st_z[0][k] <= ZW'(y_re[k]);
      st_b[0][k] <= y_re[k][QW-1];
    end
  end

  align_interface #(.K(K), .M(M), .NB(NB), .QW(QW)) u_align (
    .clk  (clk),
    .y_in (y_re),
    .y_tap(y_tap)
  );

  for (genvar m = 1; m <= M; m++) begin : g_stage
    mai_stage #(.K(K), .U(U), .QW(QW), .ZW(ZW)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (st_valid[m-1]),
      .y        (y_tap[m-1]),
      .b_prev   (st_b[m-1]),
      .r        (r_re),
      .out_valid(st_valid[m]),
      .z        (st_z[m]),
      .b        (st_b[m])
    );
  end

  output_interface #(.K(K), .M(M), .ZW(ZW), .SW(SW)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .sel      (sel),
    .st_valid (st_valid),
    .st_z     (st_z),
    .st_b     (st_b),
    .out_valid(out_valid),
    .z_out    (z_out),
    .b_out    (b_out)
  );
endmodule
