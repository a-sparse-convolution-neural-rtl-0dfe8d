// scnn_pe: one 8-bit reconfigurable processing element.
//
// The same element serves both phases of the accelerator. In MAC mode it
// multiplies a signed 8-bit feature by a signed 8-bit weight and returns the
// 16-bit product; the column adder tree of the array accumulates it. In DIST
// mode it treats both operands as unsigned coordinates and returns the signed
// difference b - a (sign-extended into the same result bus), from which the
// coordinate manager derives partial distances. One shared result bus keeps the
// element compact, which is the point of reconfiguring one array for both tasks.
// Purely combinational; the array registers the results.
// The dual use follows the architecture; the subtract-as-difference encoding and
// the result-bus sharing are this design's choices.
module scnn_pe
  import scnn_pkg::*;
(
  input  pe_mode_e                  mode,
  input  logic     [DATA_W-1:0]     a,    // feature (MAC) / query coordinate (DIST)
  input  logic     [DATA_W-1:0]     b,    // weight  (MAC) / candidate coordinate (DIST)
  output logic signed [PROD_W-1:0]  res   // product (MAC) / b - a (DIST)
);

  logic signed [PROD_W-1:0] prod;
  logic signed [DIFF_W-1:0] diff;

  always_comb begin
    prod = PROD_W'(signed'(a) * signed'(b));
    diff = signed'({1'b0, b}) - signed'({1'b0, a});
    res  = (mode == MODE_MAC) ? prod : PROD_W'(diff);
  end

endmodule
