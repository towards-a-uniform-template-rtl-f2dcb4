// Self-checking test of the input buffer at its default size: every
// channel is filled through its own write port with random values (in
// random order of rows and column groups), then random 4x4x4 windows
// (even origin row) are read and compared with a shadow copy. Read latency
// is one cycle; all TI channels are returned together.
module tb_input_buffer;
  import wino_pkg::*;
  localparam int TI = 4, TD = 4, TH = 16, TWD = 16, BW_ON = 64, VPW = BW_ON / 16, NG = TWD / VPW;
  logic clk = 0;
  logic             wr_en   [TI];
  logic [1:0]       wr_z    [TI];
  logic [3:0]       wr_row  [TI];
  logic [1:0]       wr_grp  [TI];
  logic [BW_ON-1:0] wr_data [TI];
  logic rd_en = 0;
  logic [1:0] rd_z0; logic [3:0] rd_r0; logic [3:0] rd_c0;
  in_tile_t rd_tile [TI];
  int checks = 0, failures = 0;
  int shadow [TI][TD][TH][TWD];

  input_buffer #(.TI(TI), .TD(TD), .TH(TH), .TWD(TWD), .BW_ON(BW_ON)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < TI; i++) wr_en[i] = 0;
    @(negedge clk);
    // fill: word order scrambled with a stride co-prime to the word count
    for (int n = 0; n < TD * TH * NG; n++) begin
      automatic int k = (n * 37) % (TD * TH * NG);
      for (int i = 0; i < TI; i++) begin
        automatic int kk = (k + i * 11) % (TD * TH * NG);
        wr_en[i] = 1;
        wr_z[i] = 2'(kk / (TH * NG)); wr_row[i] = 4'((kk / NG) % TH); wr_grp[i] = 2'(kk % NG);
        for (int v = 0; v < VPW; v++) begin
          automatic int val = int'($urandom % 65536) - 32768;
          wr_data[i][v*16 +: 16] = 16'(val);
          shadow[i][wr_z[i]][wr_row[i]][wr_grp[i]*VPW+v] = val;
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < TI; i++) wr_en[i] = 0;
    for (int n = 0; n < 300; n++) begin
      int z0, r0, c0;
      z0 = 0; r0 = 2 * int'($urandom % ((TH - 2) / 2)); c0 = int'($urandom % (TWD - 3));
      rd_en = 1; rd_z0 = 2'(z0); rd_r0 = 4'(r0); rd_c0 = 4'(c0);
      @(negedge clk);
      rd_en = 0;
      for (int i = 0; i < TI; i++)
        for (int z = 0; z < 4; z++) for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(rd_tile[i][z][r][c]) != shadow[i][z0+z][r0+r][c0+c]) begin
            failures++;
            if (failures < 10) $display("FAIL ch%0d win(%0d,%0d,%0d) [%0d][%0d][%0d] %0d exp %0d", i, z0, r0, c0, z, r, c, rd_tile[i][z][r][c], shadow[i][z0+z][r0+r][c0+c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
