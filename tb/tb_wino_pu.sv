// Self-checking test of a PU (TI = 4 PEs + ACCU): for every tile position,
// random windows and filters for each input channel, two input-channel
// groups, in 2D and 3D mode. Expected outputs are direct convolutions summed
// over channels and groups. Latency: result 4 cycles after the last plane.
module tb_wino_pu;
  import wino_pkg::*;
  import wino_ref_pkg::*;
  localparam int TI = 4, TILES = 4;
  logic clk = 0, rst_n = 0;
  logic valid = 0, mode3d = 0, first_group = 0, last_group = 0;
  logic [1:0] plane = 0;
  logic [$clog2(TILES)-1:0] tile_addr = 0;
  in_tile_t in_tile [TI];
  w_tile_t  w_tile  [TI];
  logic out_valid;
  acc_tile_t out;
  int checks = 0, failures = 0, cyc = 0;
  lout_t expv [2][TILES];   // [mode][tile]
  int mode_q [$];
  int issue_cyc [$];
  int addr_q [$];

  wino_pu #(.TI(TI), .TILES(TILES)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      int a, ic, md;
      checks++;
      if (addr_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        a = addr_q.pop_front(); ic = issue_cyc.pop_front(); md = mode_q.pop_front();
        if (cyc - ic != 4) begin failures++; $display("FAIL latency %0d", cyc - ic); end
        for (int z = 0; z < 2; z++)
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++) begin
              checks++;
              if (longint'(out[z][r][c]) != expv[md][a][z][r][c]) begin
                failures++;
                if (failures < 10) $display("FAIL a=%0d [%0d][%0d][%0d] %0d exp %0d", a, z, r, c, out[z][r][c], expv[md][a][z][r][c]);
              end
            end
      end
    end
  end

  initial begin
    ltile4_t x; ltile3_t w; lout_t o;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++)
      for (int g = 0; g < 2; g++)
        for (int a = 0; a < TILES; a++) begin
          if (g == 0) for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) expv[m][a][z][r][c] = 0;
          @(negedge clk);
          for (int i = 0; i < TI; i++) begin
            for (int z = 0; z < 4; z++) for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
              in_tile[i][z][r][c] = data_t'($urandom); x[z][r][c] = longint'(in_tile[i][z][r][c]);
            end
            for (int z = 0; z < 3; z++) for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
              w_tile[i][z][r][c] = data_t'($urandom); w[z][r][c] = longint'(w_tile[i][z][r][c]);
            end
            o = conv(x, w, m == 1);
            for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) expv[m][a][z][r][c] += o[z][r][c];
          end
          for (int p = 0; p < (m == 1 ? 4 : 1); p++) begin
            if (p > 0) @(negedge clk);
            valid = 1; mode3d = (m == 1); plane = 2'(p); tile_addr = 2'(a);
            first_group = (g == 0); last_group = (g == 1);
          end
          if (g == 1) begin mode_q.push_back(m); addr_q.push_back(a); issue_cyc.push_back(cyc); end
        end
    @(negedge clk);
    valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (addr_q.size() != 0) begin failures++; $display("FAIL missing outputs %0d", addr_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
