// Template-based Winograd accelerator for 2D and 3D CNN convolution layers.
//
// One engine pass convolves a tile of TI input channels with the filters of
// TO output channels: TO PUs (one per output channel) each hold TI Winograd
// PEs (one per input channel). The input buffer broadcasts the same window
// to all PUs; each PU gets its own TI filters from the weight buffer. Each
// PU's ACCU accumulates over the input-channel groups of a layer (one pass
// per group, flags in `cfg`); on the last group every finished tile goes
// through ReLU and POOL (or the pool bypass) into the output buffer.
// The same hardware runs 2D layers (F(2x2,3x3), 1 cycle per output tile) and
// 3D layers (F(2x2x2,3x3x3), 4 cycles per output tile), chosen by
// cfg.mode3d.
//
// Use: fill the input buffer (TI write ports, BW_ON bits each) and the weight
// buffer, hold `cfg`, pulse `start`, wait for `done`, repeat for the next
// input-channel group; after the last group read the output buffer.
// Tile sizes: output tile TZ x TR x TC (TZ only in 3D), input tile
// (TZ+2) x (TR+2) x (TC+2); stride 1, 3x3(x3) kernels, the input tile
// already holds any zero padding.
// The buffer / PU / ACCU / ReLU / POOL / bypass structure and Ti = 4, To = 64,
// Bw_on = 64 bits follow the published architecture; the tile sizes
// (2 x 14 x 14), the run-time 2D/3D mode bit and the port formats are this
// design's choices. External memory and the data mover are left to the user.
module wino_accel_top
  import wino_pkg::*;
#(
  parameter int unsigned TI    = 4,
  parameter int unsigned TO    = 64,
  parameter int unsigned TZ    = 2,
  parameter int unsigned TR    = 14,
  parameter int unsigned TC    = 14,
  parameter int unsigned BW_ON = 64,
  localparam int unsigned TD    = TZ + 2,
  localparam int unsigned TH    = TR + 2,
  localparam int unsigned TWD   = TC + 2,
  localparam int unsigned TILES = (TZ / 2) * (TR / 2) * (TC / 2),
  localparam int unsigned VPW   = BW_ON / DATA_W,
  localparam int unsigned NGI   = (TWD + VPW - 1) / VPW,
  localparam int unsigned NGW   = (27 + VPW - 1) / VPW,
  localparam int unsigned AW    = (TILES > 1) ? $clog2(TILES) : 1,
  localparam int unsigned OW    = (TO > 1) ? $clog2(TO) : 1,
  localparam int unsigned IW    = (TI > 1) ? $clog2(TI) : 1,
  localparam int unsigned ZW    = $clog2(TD),
  localparam int unsigned RW    = $clog2(TH),
  localparam int unsigned GIW   = (NGI > 1) ? $clog2(NGI) : 1,
  localparam int unsigned GWW   = (NGW > 1) ? $clog2(NGW) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // control
  input  layer_cfg_t       cfg,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // input buffer write ports (one per input channel)
  input  logic             in_wr_en   [TI],
  input  logic [ZW-1:0]    in_wr_z    [TI],
  input  logic [RW-1:0]    in_wr_row  [TI],
  input  logic [GIW-1:0]   in_wr_grp  [TI],
  input  logic [BW_ON-1:0] in_wr_data [TI],
  // weight buffer write port
  input  logic             w_wr_en,
  input  logic [OW-1:0]    w_wr_to,
  input  logic [IW-1:0]    w_wr_ti,
  input  logic [GWW-1:0]   w_wr_grp,
  input  logic [BW_ON-1:0] w_wr_data,
  // output buffer read port
  input  logic             out_rd_en,
  input  logic [OW-1:0]    out_rd_bank,
  input  logic [AW-1:0]    out_rd_addr,
  output out_tile_t        out_rd_data
);
  localparam int unsigned CW = $clog2(TWD);

  logic          rd_en;
  logic [ZW-1:0] rd_z0;
  logic [RW-1:0] rd_r0;
  logic [CW-1:0] rd_c0;
  logic          pe_valid, mode3d_q;
  logic [1:0]    pe_plane;
  logic [AW-1:0] pe_addr, ob_addr;
  in_tile_t      win [TI];
  w_tile_t       w   [TO][TI];
  logic          pu_valid [TO];
  acc_tile_t     pu_out   [TO];
  logic          pp_valid [TO];
  out_tile_t     pp_out   [TO];

  engine_ctrl #(.TZ(TZ), .TR(TR), .TC(TC)) u_ctrl (
    .clk, .rst_n, .start, .mode3d(cfg.mode3d), .busy, .done,
    .rd_en, .rd_z0, .rd_r0, .rd_c0,
    .pe_valid, .pe_plane, .pe_addr, .mode3d_q,
    .tile_done(pp_valid[0]), .ob_addr
  );

  input_buffer #(.TI(TI), .TD(TD), .TH(TH), .TWD(TWD), .BW_ON(BW_ON)) u_ibuf (
    .clk, .wr_en(in_wr_en), .wr_z(in_wr_z), .wr_row(in_wr_row),
    .wr_grp(in_wr_grp), .wr_data(in_wr_data),
    .rd_en, .rd_z0, .rd_r0, .rd_c0, .rd_tile(win)
  );

  weight_buffer #(.TO(TO), .TI(TI), .BW_ON(BW_ON)) u_wbuf (
    .clk, .wr_en(w_wr_en), .wr_to(w_wr_to), .wr_ti(w_wr_ti),
    .wr_grp(w_wr_grp), .wr_data(w_wr_data), .w
  );

  for (genvar o = 0; o < TO; o++) begin : g_pu
    wino_pu #(.TI(TI), .TILES(TILES)) u_pu (
      .clk, .rst_n, .valid(pe_valid), .mode3d(mode3d_q), .plane(pe_plane),
      .tile_addr(pe_addr), .first_group(cfg.first_group),
      .last_group(cfg.last_group), .in_tile(win), .w_tile(w[o]),
      .out_valid(pu_valid[o]), .out(pu_out[o])
    );
    post_proc u_post (
      .clk, .rst_n, .in_valid(pu_valid[o]), .cfg, .in(pu_out[o]),
      .out_valid(pp_valid[o]), .out(pp_out[o])
    );
  end

  output_buffer #(.TO(TO), .TILES(TILES)) u_obuf (
    .clk, .wr_en(pp_valid[0]), .wr_addr(ob_addr), .wr_data(pp_out),
    .rd_en(out_rd_en), .rd_bank(out_rd_bank), .rd_addr(out_rd_addr),
    .rd_data(out_rd_data)
  );
endmodule
