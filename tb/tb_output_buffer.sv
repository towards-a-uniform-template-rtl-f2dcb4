// Self-checking test of the output buffer: all tile addresses written for
// all banks at once, then every (bank, address) read back with one-cycle
// read latency, including a read in the same cycle as a write elsewhere.
module tb_output_buffer;
  import wino_pkg::*;
  localparam int TO = 4, TILES = 10;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [3:0] wr_addr, rd_addr;
  logic [1:0] rd_bank;
  out_tile_t wr_data [TO];
  out_tile_t rd_data;
  int checks = 0, failures = 0;
  int shadow [TO][TILES][8];

  output_buffer #(.TO(TO), .TILES(TILES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < TILES; a++) begin
      wr_en = 1; wr_addr = 4'(a);
      for (int o = 0; o < TO; o++) for (int k = 0; k < 8; k++) begin
        automatic int val = int'($urandom % 65536) - 32768;
        wr_data[o][k/4][(k/2)%2][k%2] = 16'(val);
        shadow[o][a][k] = val;
      end
      @(negedge clk);
    end
    wr_en = 0;
    for (int n = 0; n < TO * TILES; n++) begin
      automatic int o = n % TO, a = (n * 3) % TILES;
      rd_en = 1; rd_bank = 2'(o); rd_addr = 4'(a);
      @(negedge clk);
      rd_en = 0;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(rd_data[k/4][(k/2)%2][k%2]) != shadow[o][a][k]) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d addr %0d k %0d: %0d exp %0d", o, a, k, rd_data[k/4][(k/2)%2][k%2], shadow[o][a][k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
