// TW template: one-dimensional Winograd F(2,3) filter transform, G * w.
//   w'0 = w0, w'1 = (w0+w1+w2)/2, w'2 = (w0-w1+w2)/2, w'3 = w2
// The halving is done as a move of the binary point: the output carries one
// fractional bit, i.e. y = 2 * G * w, so no precision is lost. The sum w0+w2
// is shared by w'1 and w'2 (two adders and one subtractor in total). The
// output is two bits wider than the input. The accumulated factor of 2 per
// dimension is removed once after the output transform.
// Adders, subtractor and halving follow the published filter-transform template;
// keeping the half as a fractional bit instead of shifting it out is this
// design's choice.
module trans_w #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] w [3],
  output logic signed [W+1:0] y [4]
);
  logic signed [W+1:0] s02;
  always_comb begin
    s02  = (W+2)'(w[0]) + (W+2)'(w[2]);
    y[0] = (W+2)'(w[0]) <<< 1;
    y[1] = s02 + (W+2)'(w[1]);
    y[2] = s02 - (W+2)'(w[1]);
    y[3] = (W+2)'(w[2]) <<< 1;
  end
endmodule
