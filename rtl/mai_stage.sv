// mai_stage: one multiple-access-interference cancellation stage of BP-DF-MPIC.
//
// For every user k the stage forms z_k = y_k - sum_{j != k} Re(R_kj) * b_j and
// decides b_k = sign(z_k) (b is real BPSK, so only Re(R) and Re(y)
// matter). The users are split into NB = ceil(K/U) blocks of U users. Users of
// block p cancel the interference of blocks 0..p-1 with the decisions this
// stage has already made for them (secondary interference, decision feedback)
// and the interference of their own and later blocks with the decisions of the
// previous stage (primary interference). U = 1 gives DF-MPIC, U = K gives MPIC.
//
// Pipeline: NB register steps per stage. Step 0 cancels the primary
// interference of every user at once and decides block 0. Step p (p >= 1)
// subtracts the secondary interference of blocks 0..p-1 from the users of block
// p and decides them. Each step is one clock cycle, so the latency is NB cycles
// and a new symbol can enter every cycle; the cost of decision feedback is the
// extra pipeline registers, which grow with NB.
//
// Interface: in_valid qualifies y, b_prev (decisions of stage m-1) for one
// symbol; R is static. out_valid/z/b appear NB cycles later.
// Decision bit 1 means b = -1 (sign(z) with sign(0) = +1), a choice of this
// design. Splitting into primary and secondary cancellation follows the
// published architecture; the one-cycle-per-block pipeline is this design's reading of it.
module mai_stage
  import mpic_pkg::*;
#(
  parameter int unsigned K  = K_USERS,
  parameter int unsigned U  = USERS_PER_BLOCK,
  parameter int unsigned QW = Q_W,
  parameter int unsigned ZW = Q_W + $clog2(K_USERS) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [QW-1:0] y [K],
  input  logic [K-1:0]         b_prev,
  input  logic signed [QW-1:0] r [K][K],
  output logic                 out_valid,
  output logic signed [ZW-1:0] z [K],
  output logic [K-1:0]         b
);
  localparam int unsigned NB = num_blocks(K, U);

  // Pipeline registers of each step.
  logic                 st_valid [NB];
  logic signed [ZW-1:0] st_z     [NB][K];   // partly or fully cancelled value
  logic [K-1:0]         st_bnew  [NB];      // decisions of this stage (valid for decided blocks)

  function automatic logic signed [ZW-1:0] term(logic signed [QW-1:0] rv, logic neg);
    return neg ? -ZW'(rv) : ZW'(rv);
  endfunction

  // Step 0: primary interference of all users; block 0 is then complete.
  logic signed [ZW-1:0] z0   [K];
  logic [K-1:0]         bn0;
  always_comb begin
    for (int k = 0; k < K; k++) begin
      z0[k] = ZW'(y[k]);
      for (int j = 0; j < K; j++)
        if (j != k && (j / U) >= (k / U))
          z0[k] = z0[k] - term(r[k][j], b_prev[j]);
      bn0[k] = ((k / U) == 0) ? z0[k][ZW-1] : 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_valid[0] <= 1'b0;
    else        st_valid[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    st_z[0]    <= z0;
    st_bnew[0] <= bn0;
  end

  // Steps 1..NB-1: secondary interference of the blocks decided before.
  for (genvar p = 1; p < NB; p++) begin : g_step
    logic signed [ZW-1:0] zp  [K];
    logic [K-1:0]         bnp;
    always_comb begin
      for (int k = 0; k < K; k++) begin
        zp[k]  = st_z[p-1][k];
        bnp[k] = st_bnew[p-1][k];
        if ((k / U) == p) begin
          for (int j = 0; j < K; j++)
            if ((j / U) < p)
              zp[k] = zp[k] - term(r[k][j], st_bnew[p-1][j]);
          bnp[k] = zp[k][ZW-1];
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st_valid[p] <= 1'b0;
      else        st_valid[p] <= st_valid[p-1];
    end
    always_ff @(posedge clk) begin
      st_z[p]    <= zp;
      st_bnew[p] <= bnp;
    end
  end

  assign out_valid = st_valid[NB-1];
  assign z         = st_z[NB-1];
  assign b         = st_bnew[NB-1];
endmodule
