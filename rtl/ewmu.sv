// EWMU: element-wise multiplication unit. N independent signed multipliers,
// p[i] = x[i] * w[i], registered once (one-cycle latency, one plane per
// cycle). With N = 16 it multiplies one 4x4 transformed plane; a 3D 4x4x4
// tile is handled as four such planes on consecutive cycles.
// The multiplier array is the published EWMU template; 16 multipliers per PE
// (a 3D tile taking four passes) and the output register are this design's
// choices.
module ewmu
  import wino_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic  clk,
  input  logic  en,       // capture the products of this cycle
  input  xt_t   x [N],
  input  wt_t   w [N],
  output prod_t p [N]
);
  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < int'(N); i++) p[i] <= prod_t'(x[i]) * prod_t'(w[i]);
    end
  end
endmodule
