// quantize: scales a signed full-precision value down to a signed OUT_W-bit word.
//
// The input is shifted right arithmetically by SHIFT bits (truncation towards
// minus infinity) and then saturated to the OUT_W range. Purely combinational.
// The detector quantises its Rake outputs and its correlation entries with this
// block, using the same shift for both so that they stay on one scale.
module quantize #(
  parameter int unsigned IN_W  = 40,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned SHIFT = 12
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam logic signed [IN_W-1:0] MAXV = IN_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(64'sd1 <<< (OUT_W - 1));

  logic signed [IN_W-1:0] shifted;

  always_comb begin
    shifted = din >>> SHIFT;
    if (shifted > MAXV)      dout = MAXV[OUT_W-1:0];
    else if (shifted < MINV) dout = MINV[OUT_W-1:0];
    else                     dout = shifted[OUT_W-1:0];
  end
endmodule
