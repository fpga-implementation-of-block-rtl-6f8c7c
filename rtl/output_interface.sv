// output_interface: selects which data estimation stage leaves the detector.
//
// The detector produces decisions at the Rake output (stage 0) and after each
// of the M cancellation stages. sel chooses one of them; the chosen stage's
// valid flag, soft values z and hard decisions b are registered and driven
// out. Since stage m finishes later than stage m-1, the latency from the Rake
// output is 1 + m*NB + 1 cycles for selection m (the last +1 is this register).
// Interface: sel in 0..M (a larger value gives stage M); out_valid qualifies
// z_out/b_out. Changing sel while symbols are in flight can drop or repeat a
// symbol; it is meant to be set between bursts. Selecting the stage follows
// the published architecture; the registered multiplexer is this design's choice.
module output_interface
  import mpic_pkg::*;
#(
  parameter int unsigned K  = K_USERS,
  parameter int unsigned M  = M_STAGES,
  parameter int unsigned ZW = Q_W + $clog2(K_USERS) + 1,
  parameter int unsigned SW = $clog2(M_STAGES + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SW-1:0]        sel,
  input  logic                 st_valid [M+1],
  input  logic signed [ZW-1:0] st_z     [M+1][K],
  input  logic [K-1:0]         st_b     [M+1],
  output logic                 out_valid,
  output logic signed [ZW-1:0] z_out [K],
  output logic [K-1:0]         b_out
);
  logic [SW-1:0] s;
  assign s = (int'(sel) > M) ? SW'(M) : sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= st_valid[s];
  end

  always_ff @(posedge clk) begin
    z_out <= st_z[s];
    b_out <= st_b[s];
  end
endmodule
