// PU: processing unit for one output channel. It holds TI Winograd PEs, one
// per input channel of the current group, all fed with their own input tile
// and filter, sums their 2x2 plane results with an adder tree and hands the
// sum to the ACCU. The side information of a plane (tile address and the
// group flags) is delayed to line up with the 3-cycle PE pipeline.
//
// Timing: inputs in cycle t, ACCU result (`out_valid`, `out`) in cycle t+4.
// Ti PEs feeding one ACCU per output channel follows the published PU; the
// adder tree is this design's choice.
module wino_pu
  import wino_pkg::*;
#(
  parameter int unsigned TI    = 4,
  parameter int unsigned TILES = 49,
  localparam int unsigned AW = (TILES > 1) ? $clog2(TILES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  logic          mode3d,
  input  logic [1:0]    plane,
  input  logic [AW-1:0] tile_addr,
  input  logic          first_group,
  input  logic          last_group,
  input  in_tile_t      in_tile [TI],
  input  w_tile_t       w_tile  [TI],
  output logic          out_valid,
  output acc_tile_t     out
);
  logic       pe_valid [TI];
  logic [1:0] pe_plane [TI];
  plane2_t    pe_out   [TI];

  for (genvar i = 0; i < TI; i++) begin : g_pe
    wino_pe u_pe (
      .clk, .rst_n, .valid, .mode3d, .plane,
      .in_tile(in_tile[i]), .w_tile(w_tile[i]),
      .out_valid(pe_valid[i]), .out_plane(pe_plane[i]), .out(pe_out[i])
    );
  end

  plane2_t sum;
  always_comb begin
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 2; c++) begin
        sum[r][c] = '0;
        for (int i = 0; i < int'(TI); i++) sum[r][c] = sum[r][c] + pe_out[i][r][c];
      end
    end
  end

  // side information, aligned with the PE outputs
  logic [AW-1:0] addr_d [3];
  logic          first_d [3], last_d [3], mode_d [3];
  always_ff @(posedge clk) begin
    addr_d[0] <= tile_addr;   first_d[0] <= first_group; last_d[0] <= last_group; mode_d[0] <= mode3d;
    for (int k = 1; k < 3; k++) begin
      addr_d[k] <= addr_d[k-1]; first_d[k] <= first_d[k-1];
      last_d[k] <= last_d[k-1]; mode_d[k]  <= mode_d[k-1];
    end
  end

  accu #(.TILES(TILES)) u_accu (
    .clk, .rst_n,
    .in_valid(pe_valid[0]), .mode3d(mode_d[2]), .plane(pe_plane[0]),
    .tile_addr(addr_d[2]), .first_group(first_d[2]), .last_group(last_d[2]),
    .in_sum(sum), .out_valid, .out
  );
endmodule
