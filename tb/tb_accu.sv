// Self-checking test of the ACCU: random plane sums for 2D tiles (one plane)
// and 3D tiles (four planes), accumulated over three input-channel groups
// (first / middle / last) at random tile addresses. Expected values use the
// A^T depth matrix and a shadow copy of the partial sums. Result latency is
// one cycle after the last plane; outputs only on the last group.
module tb_accu;
  import wino_pkg::*;
  import wino_ref_pkg::*;
  localparam int TILES = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, mode3d = 0, first_group = 0, last_group = 0;
  logic [1:0] plane = 0;
  logic [$clog2(TILES)-1:0] tile_addr = 0;
  plane2_t in_sum;
  logic out_valid;
  acc_tile_t out;
  int checks = 0, failures = 0, nout = 0;
  longint shadow [TILES][2][2][2];

  accu #(.TILES(TILES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) nout++;

  task automatic run_tile(input bit m3, input int a, input int grp);
    longint pl [4][2][2];
    longint tot [2][2][2];
    int np = m3 ? 4 : 1;
    for (int p = 0; p < np; p++) begin
      @(negedge clk);
      in_valid = 1; mode3d = m3; plane = 2'(p); tile_addr = a[$clog2(TILES)-1:0];
      first_group = (grp == 0); last_group = (grp == 2);
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          // even values keep the 3D halving exact, as it is for real PE data
          pl[p][r][c] = longint'($signed($urandom % 2000000)) * 2 - 2000000;
          in_sum[r][c] = acc_t'(pl[p][r][c]);
        end
    end
    for (int z = 0; z < 2; z++)
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          if (m3) begin
            tot[z][r][c] = 0;
            for (int p = 0; p < 4; p++) tot[z][r][c] += AT[z][p] * pl[p][r][c];
            tot[z][r][c] /= 2;
          end else tot[z][r][c] = (z == 0) ? pl[0][r][c] : 0;
          if (grp != 0) tot[z][r][c] += shadow[a][z][r][c];
          shadow[a][z][r][c] = tot[z][r][c];
        end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid != (grp == 2)) begin failures++; $display("FAIL out_valid=%0d grp=%0d", out_valid, grp); end
    if (grp == 2)
      for (int z = 0; z < 2; z++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) begin
            checks++;
            if (longint'(out[z][r][c]) != tot[z][r][c]) begin
              failures++;
              if (failures < 10) $display("FAIL a=%0d out[%0d][%0d][%0d]=%0d exp %0d", a, z, r, c, out[z][r][c], tot[z][r][c]);
            end
          end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++)
      for (int grp = 0; grp < 3; grp++)
        for (int a = 0; a < TILES; a++) run_tile(m == 1, (a * 5) % TILES, grp);
    @(negedge clk);
    checks++;
    if (nout != 2 * TILES) begin failures++; $display("FAIL outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
