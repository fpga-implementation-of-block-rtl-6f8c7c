// align_interface: delays the Rake outputs so that each cancellation stage sees
// the Rake output of the symbol whose decisions it is receiving.
//
// The Rake decision (stage 0) takes one cycle and every MAI cancellation stage
// takes NB cycles, so stage m (1..M) starts on a symbol 1 + (m-1)*NB cycles
// after the Rake output of that symbol appeared. The block is a shift register
// of K-word vectors, advanced every cycle, with one tap per stage.
// Interface: y_in is sampled every clock; y_tap[m-1] is the vector for stage m.
// Timing: y_tap[m-1] equals y_in from 1 + (m-1)*NB cycles earlier.
// That the alignment is made of registers follows the published architecture; the tap
// positions follow from this design's stage latencies.
module align_interface
  import mpic_pkg::*;
#(
  parameter int unsigned K  = K_USERS,
  parameter int unsigned M  = M_STAGES,
  parameter int unsigned NB = num_blocks(K_USERS, USERS_PER_BLOCK),
  parameter int unsigned QW = Q_W
) (
  input  logic                 clk,
  input  logic signed [QW-1:0] y_in  [K],
  output logic signed [QW-1:0] y_tap [M][K]
);
  localparam int unsigned DEPTH = 1 + (M - 1) * NB;

  logic signed [QW-1:0] sr [DEPTH][K];

  always_ff @(posedge clk) begin
    sr[0] <= y_in;
    for (int d = 1; d < DEPTH; d++) sr[d] <= sr[d-1];
  end

  for (genvar m = 1; m <= M; m++) begin : g_tap
    assign y_tap[m-1] = sr[(m - 1) * NB];
  end
endmodule
