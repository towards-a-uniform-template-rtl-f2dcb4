// TX template: one-dimensional Winograd F(2,3) input transform, B^T * x.
//   x'0 = x0 - x2,  x'1 = x1 + x2,  x'2 = x2 - x1,  x'3 = x1 - x3
// Four adders/subtractors, purely combinational. Output is one bit wider
// than the input. The PE builds 2D and 3D transforms by applying this unit
// along columns, rows and (3D) depth.
// The adder network is the published F(2,3) input transform; the width growth is
// this design's choice.
module trans_x #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x [4],
  output logic signed [W:0]   y [4]
);
  always_comb begin
    y[0] = (W+1)'(x[0]) - (W+1)'(x[2]);
    y[1] = (W+1)'(x[1]) + (W+1)'(x[2]);
    y[2] = (W+1)'(x[2]) - (W+1)'(x[1]);
    y[3] = (W+1)'(x[1]) - (W+1)'(x[3]);
  end
endmodule
