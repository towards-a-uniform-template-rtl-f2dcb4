// Self-checking test of the Winograd PE.
// 2D: the PE output must equal the direct 3x3 convolution of the 4x4 window.
// 3D: plane p must equal the 2D convolution of the depth-transformed window
// plane (B^T along depth) with the depth-transformed filter plane (2G along
// depth), and the depth output transform of the four planes, halved, must
// equal the direct 3x3x3 convolution. The 3-cycle latency is checked, with a
// new plane issued every cycle.
module tb_wino_pe;
  import wino_pkg::*;
  import wino_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, mode3d = 0;
  logic [1:0] plane = 0;
  in_tile_t in_tile;
  w_tile_t  w_tile;
  logic out_valid;
  logic [1:0] out_plane;
  plane2_t out;
  int checks = 0, failures = 0;

  wino_pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, queued per issued plane
  typedef struct { longint v [2][2]; int cyc; int pl; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // 3D combination check
  longint planes [4][2][2];

  task automatic rnd_tiles(input int kind, output ltile4_t x, output ltile3_t w);
    for (int z = 0; z < 4; z++)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          in_tile[z][r][c] = (kind == 0) ? data_t'($urandom) : (($urandom % 2) ? 16'sh7fff : 16'sh8000);
          x[z][r][c] = longint'(in_tile[z][r][c]);
        end
    for (int z = 0; z < 3; z++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          w_tile[z][r][c] = (kind == 0) ? data_t'($urandom) : (($urandom % 2) ? 16'sh7fff : 16'sh8000);
          w[z][r][c] = longint'(w_tile[z][r][c]);
        end
  endtask

  // checker
  int got3d = 0;
  always @(negedge clk) begin
    if (out_valid) begin
      automatic exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (cyc - e.cyc != 3 || out_plane != 2'(e.pl)) begin
          failures++; $display("FAIL latency %0d plane %0d/%0d", cyc - e.cyc, out_plane, e.pl);
        end
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) begin
            checks++;
            if (longint'(out[r][c]) != e.v[r][c]) begin
              failures++;
              if (failures < 10) $display("FAIL out[%0d][%0d]=%0d exp %0d", r, c, out[r][c], e.v[r][c]);
            end
            planes[out_plane][r][c] = longint'(out[r][c]);
          end
      end
    end
  end

  initial begin
    ltile4_t x, xt;
    ltile3_t w;
    lout_t   ref3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 2D tiles, one per cycle
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      rnd_tiles(n % 6 == 5, x, w);
      mode3d = 0; valid = 1; plane = 0;
      begin
        automatic exp_t e;
        automatic lout_t o = conv(x, w, 1'b0);
        e.cyc = cyc; e.pl = 0;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) e.v[r][c] = o[0][r][c];
        q.push_back(e);
      end
    end
    // 3D tiles, four planes each
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      rnd_tiles(n % 5 == 4, x, w);
      xt = depth_tx(x);
      ref3 = conv(x, w, 1'b1);
      for (int p = 0; p < 4; p++) begin
        automatic exp_t e;
        if (p > 0) @(negedge clk);
        mode3d = 1; valid = 1; plane = 2'(p);
        e.cyc = cyc; e.pl = p;
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) begin
            e.v[r][c] = 0;
            for (int kr = 0; kr < 3; kr++)
              for (int kc = 0; kc < 3; kc++)
                e.v[r][c] += xt[p][r+kr][c+kc] * depth_tw(w, p, kr, kc);
          end
        q.push_back(e);
      end
      // after the 4 planes of this tile come out, check the 3D combination
      fork
        begin
          automatic lout_t rr = ref3;
          repeat (3) @(posedge clk);
          @(negedge clk); #1;
          for (int z = 0; z < 2; z++)
            for (int r = 0; r < 2; r++)
              for (int c = 0; c < 2; c++) begin
                automatic longint s = 0;
                for (int p = 0; p < 4; p++) s += AT[z][p] * planes[p][r][c];
                checks++;
                if (s / 2 != rr[z][r][c] || s % 2 != 0) begin
                  failures++;
                  if (failures < 10) $display("FAIL 3D z%0d r%0d c%0d got %0d exp %0d", z, r, c, s / 2, rr[z][r][c]);
                end
              end
          got3d++;
        end
      join_none
    end
    @(negedge clk);
    valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0 || got3d != 40) begin failures++; $display("FAIL leftover %0d got3d %0d", q.size(), got3d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
