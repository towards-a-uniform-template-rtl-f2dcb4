// ReLU / POOL / bypass stage behind the ACCU of one PU.
//
// A finished 2x2 (2D) or 2x2x2 (3D) accumulator tile is first rescaled to the
// 16-bit fixed-point output format (arithmetic right shift by `out_shift`,
// then saturation), then passed through ReLU when `relu_en` is set. With
// `pool_en` the tile is max-pooled (2D: 2x2 -> 1; 3D: 2x2 per depth plane,
// or 2x2x2 -> 1 when `pool_depth` is set); the pooled value is placed at
// [z][0][0] and the other entries are zero. With `pool_en` clear the pooling
// is bypassed and the whole tile is passed on. Unused depth planes (2D) are
// zero. One register stage: result one cycle after `in_valid`.
// ReLU, POOL and the pool bypass are the published post-processing path;
// the rescale/saturate step, the pool window and the ReLU switch are this
// design's choices.
module post_proc
  import wino_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  layer_cfg_t cfg,
  input  acc_tile_t  in,
  output logic       out_valid,
  output out_tile_t  out
);
  localparam acc_t DMAX = acc_t'(2**(DATA_W-1) - 1);
  localparam acc_t DMIN = -acc_t'(2**(DATA_W-1));

  out_tile_t q, res;
  data_t     pmax [2];

  always_comb begin
    for (int z = 0; z < 2; z++) begin
      for (int r = 0; r < 2; r++) begin
        for (int c = 0; c < 2; c++) begin
          acc_t s;
          s = in[z][r][c] >>> cfg.out_shift;
          if (s > DMAX)      q[z][r][c] = data_t'(DMAX);
          else if (s < DMIN) q[z][r][c] = data_t'(DMIN);
          else               q[z][r][c] = data_t'(s);
          if (cfg.relu_en && q[z][r][c] < 0) q[z][r][c] = '0;
          if (!cfg.mode3d && z == 1) q[z][r][c] = '0;
        end
      end
    end
    for (int z = 0; z < 2; z++) begin
      pmax[z] = q[z][0][0];
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++)
          if (q[z][r][c] > pmax[z]) pmax[z] = q[z][r][c];
    end
    if (!cfg.pool_en) begin
      res = q;
    end else begin
      for (int z = 0; z < 2; z++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) res[z][r][c] = '0;
      if (cfg.mode3d && cfg.pool_depth) begin
        res[0][0][0] = (pmax[1] > pmax[0]) ? pmax[1] : pmax[0];
      end else begin
        res[0][0][0] = pmax[0];
        res[1][0][0] = cfg.mode3d ? pmax[1] : '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) out <= res;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
