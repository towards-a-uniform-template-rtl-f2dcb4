// Input buffer: holds the tiled input feature maps of TI input channels,
// TD x TH x TWD values each (the input tile of one engine pass including its
// 2-value halo: TH = Tr + 2, TWD = Tc + 2, TD = Tz + 2).
//
// Partitioning, step by step: every channel is split into TD depth blocks;
// within a block the rows are split cyclically over two banks (even / odd
// rows), and each bank has two read ports. One bank word is a whole row of
// TWD values. A 4x4x4 window whose origin row is even therefore needs rows
// r0, r0+2 from the even bank and r0+1, r0+3 from the odd bank: one read per
// port, so the whole window of every channel is read in one cycle.
//
// Write side: one port per input channel (TI ports), each writing BW_ON bits
// (BW_ON/16 consecutive values of one row) per cycle.
// Read side: `rd_en` with window origin (z0, r0, c0) gives `rd_tile` one cycle
// later. r0 must be even; z0 + 3 < TD and c0 + 3 < TWD.
// Splitting into depth blocks and then cyclically over rows follows the
// published step-by-step partitioning; two row banks with two read ports each
// and one write port per channel are this design's reading of it.
module input_buffer
  import wino_pkg::*;
#(
  parameter int unsigned TI    = 4,
  parameter int unsigned TD    = 4,
  parameter int unsigned TH    = 16,
  parameter int unsigned TWD   = 16,
  parameter int unsigned BW_ON = 64,
  localparam int unsigned VPW  = BW_ON / DATA_W,           // values per write
  localparam int unsigned NG   = (TWD + VPW - 1) / VPW,    // write groups per row
  localparam int unsigned ZW   = $clog2(TD),
  localparam int unsigned RW   = $clog2(TH),
  localparam int unsigned CW   = $clog2(TWD),
  localparam int unsigned GW   = (NG > 1) ? $clog2(NG) : 1
) (
  input  logic              clk,
  // write ports, one per input channel
  input  logic              wr_en    [TI],
  input  logic [ZW-1:0]     wr_z     [TI],
  input  logic [RW-1:0]     wr_row   [TI],
  input  logic [GW-1:0]     wr_grp   [TI],
  input  logic [BW_ON-1:0]  wr_data  [TI],
  // window read
  input  logic              rd_en,
  input  logic [ZW-1:0]     rd_z0,
  input  logic [RW-1:0]     rd_r0,
  input  logic [CW-1:0]     rd_c0,
  output in_tile_t          rd_tile  [TI]
);
  localparam int unsigned ROWS_B = (TH + 1) / 2;   // rows per parity bank
  localparam int unsigned WORD   = NG * BW_ON;     // row word incl. padding
  localparam int unsigned BAW    = (ROWS_B > 1) ? $clog2(ROWS_B) : 1;

  // bank outputs: [channel][depth block][row parity][port] -> row word
  logic [WORD-1:0] rd_row [TI][TD][2][2];
  logic [BAW-1:0]  ra0, ra1;
  logic [ZW-1:0]   z0_q;
  logic [CW-1:0]   c0_q;

  // port 0 reads rows r0 (even bank) / r0+1 (odd bank),
  // port 1 reads rows r0+2 / r0+3
  assign ra0 = BAW'(rd_r0 >> 1);
  assign ra1 = BAW'((rd_r0 >> 1) + 1'b1);

  for (genvar i = 0; i < TI; i++) begin : g_ch
    for (genvar z = 0; z < TD; z++) begin : g_depth
      for (genvar p = 0; p < 2; p++) begin : g_par
        ibuf_bank #(.DEPTH(ROWS_B), .WORD(WORD), .BW_ON(BW_ON)) u_bank (
          .clk,
          .wr_en(wr_en[i] && wr_z[i] == ZW'(z) && wr_row[i][0] == 1'(p)),
          .wr_addr(BAW'(wr_row[i] >> 1)), .wr_grp(wr_grp[i]), .wr_data(wr_data[i]),
          .rd_en, .rd_addr0(ra0), .rd_addr1(ra1),
          .rd_data0(rd_row[i][z][p][0]), .rd_data1(rd_row[i][z][p][1])
        );
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      z0_q <= rd_z0;
      c0_q <= rd_c0;
    end
  end

  // depth-block and column selection behind the bank registers
  always_comb begin
    for (int i = 0; i < int'(TI); i++)
      for (int z = 0; z < 4; z++)
        for (int r = 0; r < 4; r++) begin
          logic [WORD-1:0] row_w;
          row_w = rd_row[i][(int'(z0_q) + z) % int'(TD)][r % 2][r / 2];
          for (int c = 0; c < 4; c++)
            rd_tile[i][z][r][c] = data_t'(row_w[((int'(c0_q) + c) % int'(TWD)) * int'(DATA_W) +: DATA_W]);
        end
  end
endmodule
