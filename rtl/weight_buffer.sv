// Weight buffer: the 3x3x3 filters (3x3 in plane 0 for 2D layers) of TO
// output channels x TI input channels for the current engine pass, kept in
// registers because every PE reads its whole filter in every cycle.
// Write: BW_ON bits (BW_ON/16 weights) per cycle into filter (wr_to, wr_ti),
// weights k = grp*BW_ON/16 .. in the order k = z*9 + row*3 + col; indices
// past 26 are ignored. Read: all filters, continuously.
// A weight buffer with one bank per PU is published; keeping it in registers
// and the write format are this design's choices.
module weight_buffer
  import wino_pkg::*;
#(
  parameter int unsigned TO    = 64,
  parameter int unsigned TI    = 4,
  parameter int unsigned BW_ON = 64,
  localparam int unsigned VPW  = BW_ON / DATA_W,
  localparam int unsigned NG   = (27 + VPW - 1) / VPW,
  localparam int unsigned OW   = (TO > 1) ? $clog2(TO) : 1,
  localparam int unsigned IW   = (TI > 1) ? $clog2(TI) : 1,
  localparam int unsigned GW   = (NG > 1) ? $clog2(NG) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [OW-1:0]    wr_to,
  input  logic [IW-1:0]    wr_ti,
  input  logic [GW-1:0]    wr_grp,
  input  logic [BW_ON-1:0] wr_data,
  output w_tile_t          w [TO][TI]
);
  // one register word per filter, written one BW_ON-bit group at a time
  logic [NG-1:0][BW_ON-1:0] filt [TO][TI];

  for (genvar o = 0; o < TO; o++) begin : g_to
    for (genvar i = 0; i < TI; i++) begin : g_ti
      always_ff @(posedge clk) begin
        if (wr_en && wr_to == OW'(o) && wr_ti == IW'(i)) filt[o][i][wr_grp] <= wr_data;
      end
      for (genvar k = 0; k < 27; k++) begin : g_k
        assign w[o][i][k / 9][(k / 3) % 3][k % 3] =
          data_t'(filt[o][i][k / VPW][(k % VPW) * DATA_W +: DATA_W]);
      end
    end
  end
endmodule
