// ACCU: accumulator array of one PU.
//
// It receives, one per cycle, the 2x2 plane results of the PU (already summed
// over the Ti PEs) and finishes the Winograd output transform in depth, then
// accumulates over input-channel groups.
//  * 2D: each input is a complete 2x2 output tile (plane 0 only).
//  * 3D: the four planes p = 0..3 of a tile arrive on consecutive cycles; the
//    depth output transform A^T = [1 1 1 0; 0 1 -1 -1] is applied by adding
//    or subtracting each plane into two 2x2 registers (output depth 0 and 1),
//    and the result is halved (exact) to remove the last x2 filter factor.
// A finished tile is added to the partial sum of the same tile position kept
// in the accumulator memory (TILES entries of 2x2x2 sums; bypassed on the
// first input-channel group) and written back. On the last group the sum is
// also presented on `out` with `out_valid` one cycle after the last plane.
// The memory is read combinationally (distributed RAM / registers).
// The accumulator array follows the published ACCU template; keeping the
// partial sums of earlier input-channel groups inside it is this design's
// choice.
module accu
  import wino_pkg::*;
#(
  parameter int unsigned TILES = 49,
  localparam int unsigned AW = (TILES > 1) ? $clog2(TILES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          mode3d,
  input  logic [1:0]    plane,
  input  logic [AW-1:0] tile_addr,
  input  logic          first_group,
  input  logic          last_group,
  input  plane2_t       in_sum,
  output logic          out_valid,
  output acc_tile_t     out
);
  typedef logic [7:0][ACC_W-1:0] word_t;   // packed 2x2x2 tile, index z*4+r*2+c
  word_t     mem [TILES];
  word_t     old, total_w;
  plane2_t   z0, z1;           // depth-0 / depth-1 running sums of a 3D tile
  plane2_t   z0_n, z1_n;
  acc_tile_t total;
  logic      complete;

  always_comb begin
    z0_n = z0;
    z1_n = z1;
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 2; c++) begin
        unique case (plane)
          2'd0: begin z0_n[r][c] = in_sum[r][c];              z1_n[r][c] = '0; end
          2'd1: begin z0_n[r][c] = z0[r][c] + in_sum[r][c];   z1_n[r][c] = z1[r][c] + in_sum[r][c]; end
          2'd2: begin z0_n[r][c] = z0[r][c] + in_sum[r][c];   z1_n[r][c] = z1[r][c] - in_sum[r][c]; end
          2'd3: begin                                         z1_n[r][c] = z1[r][c] - in_sum[r][c]; end
        endcase
      end
    end
    complete = in_valid && (!mode3d || plane == 2'd3);
    old = mem[tile_addr];
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 2; c++) begin
        if (mode3d) begin
          total[0][r][c] = z0_n[r][c] >>> 1;
          total[1][r][c] = z1_n[r][c] >>> 1;
        end else begin
          total[0][r][c] = in_sum[r][c];
          total[1][r][c] = '0;
        end
        if (!first_group) begin
          total[0][r][c] = total[0][r][c] + acc_t'(old[r*2+c]);
          total[1][r][c] = total[1][r][c] + acc_t'(old[4+r*2+c]);
        end
        total_w[r*2+c]   = total[0][r][c];
        total_w[4+r*2+c] = total[1][r][c];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      z0 <= z0_n;
      z1 <= z1_n;
    end
    if (complete) begin
      mem[tile_addr] <= total_w;
      out <= total;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= complete && last_group;
  end
endmodule
