// TM template: one-dimensional Winograd F(2,3) output transform, A^T * s.
//   s'0 = s0 + s1 + s2,  s'1 = s1 - s2 - s3
// Four adders/subtractors, combinational; output two bits wider than input.
// The adder network is the published F(2,3) output transform.
module trans_m #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] s [4],
  output logic signed [W+1:0] y [2]
);
  always_comb begin
    y[0] = (W+2)'(s[0]) + (W+2)'(s[1]) + (W+2)'(s[2]);
    y[1] = (W+2)'(s[1]) - (W+2)'(s[2]) - (W+2)'(s[3]);
  end
endmodule
