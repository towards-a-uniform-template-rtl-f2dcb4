// One bank of the input buffer: DEPTH words of WORD bits (a word is one
// row of the input tile), written BW_ON bits at a time (group `wr_grp` of
// the word), with two independent read ports (a true dual-port block RAM
// used as one write and two read ports). Reads are registered: data one
// cycle after the address.
// This design's own helper: one dual-ported bank of the input buffer.
module ibuf_bank #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WORD  = 256,
  parameter int unsigned BW_ON = 64,
  localparam int unsigned NG = WORD / BW_ON,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned GW = (NG > 1) ? $clog2(NG) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [GW-1:0]    wr_grp,
  input  logic [BW_ON-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr0,
  input  logic [AW-1:0]    rd_addr1,
  output logic [WORD-1:0]  rd_data0,
  output logic [WORD-1:0]  rd_data1
);
  logic [NG-1:0][BW_ON-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_grp] <= wr_data;
    if (rd_en) begin
      rd_data0 <= mem[rd_addr0];
      rd_data1 <= mem[rd_addr1];
    end
  end
endmodule
