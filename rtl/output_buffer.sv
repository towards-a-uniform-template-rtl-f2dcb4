// Output buffer: TO banks (one per PU / output channel) of TILES words; a
// word is one 2x2x2 output tile of 16-bit values (2D tiles use depth 0; a
// pooled tile holds its value at [z][0][0]). All banks are written in the
// same cycle at the same tile address by the ReLU/POOL stages. The read port
// towards external memory returns the word of (rd_bank, rd_addr) one cycle
// after rd_en.
// An output buffer is published; its banking and word format are this
// design's choices.
module output_buffer
  import wino_pkg::*;
#(
  parameter int unsigned TO    = 64,
  parameter int unsigned TILES = 49,
  localparam int unsigned OW   = (TO > 1) ? $clog2(TO) : 1,
  localparam int unsigned AW   = (TILES > 1) ? $clog2(TILES) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  out_tile_t     wr_data [TO],
  input  logic          rd_en,
  input  logic [OW-1:0] rd_bank,
  input  logic [AW-1:0] rd_addr,
  output out_tile_t     rd_data
);
  typedef logic [7:0][DATA_W-1:0] word_t;   // packed 2x2x2 tile, index z*4+r*2+c

  function automatic word_t pack(input out_tile_t t);
    for (int k = 0; k < 8; k++) pack[k] = t[k / 4][(k / 2) % 2][k % 2];
  endfunction

  word_t rd_word [TO];
  logic [OW-1:0] bank_q;

  for (genvar o = 0; o < TO; o++) begin : g_bank
    word_t mem [TILES];
    always_ff @(posedge clk) begin
      if (wr_en) mem[wr_addr] <= pack(wr_data[o]);
      if (rd_en && rd_bank == OW'(o)) rd_word[o] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk) if (rd_en) bank_q <= rd_bank;

  always_comb begin
    for (int k = 0; k < 8; k++) rd_data[k / 4][(k / 2) % 2][k % 2] = rd_word[bank_q][k];
  end
endmodule
