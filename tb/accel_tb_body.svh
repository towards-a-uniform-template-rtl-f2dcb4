// Body of the end-to-end accelerator testbenches. The including module
// defines TI, TO, TZ, TR, TC, BW_ON and instantiates the top as `dut`.
//
// Each scenario is one layer of NGRP x TI input channels and TO output
// channels on one input tile (TZ+2) x (TR+2) x (TC+2): for every
// input-channel group the input and weight buffers are filled through their
// write ports and one engine pass is run; after the last group the output
// buffer is read back and compared with a direct convolution followed by
// the rescale / ReLU / pooling reference. Pass length is checked against
// (TR/2)(TC/2) cycles (2D) or 4(TZ/2)(TR/2)(TC/2) cycles (3D) plus the
// 9-cycle pipeline. Every mechanism (2D, 3D, multi-group accumulation,
// ReLU clamping, saturation, pooling, depth pooling, bypass) is counted and
// must occur at least once.
  import wino_pkg::*;
  import wino_ref_pkg::*;
  localparam int TD = TZ + 2, TH = TR + 2, TWD = TC + 2;
  localparam int VPW = BW_ON / 16, NGI = (TWD + VPW - 1) / VPW, NGW = (27 + VPW - 1) / VPW;
  localparam int NZ = TZ / 2, NR = TR / 2, NC = TC / 2, TILES = NZ * NR * NC;
  localparam int NGRP = 2, N = NGRP * TI;

  logic clk = 0, rst_n = 0, start = 0;
  layer_cfg_t cfg;
  logic busy, done;
  logic             in_wr_en   [TI];
  logic [$clog2(TD)-1:0]  in_wr_z   [TI];
  logic [$clog2(TH)-1:0]  in_wr_row [TI];
  logic [((NGI > 1) ? $clog2(NGI) : 1)-1:0] in_wr_grp [TI];
  logic [BW_ON-1:0] in_wr_data [TI];
  logic w_wr_en = 0;
  logic [((TO > 1) ? $clog2(TO) : 1)-1:0] w_wr_to, out_rd_bank;
  logic [((TI > 1) ? $clog2(TI) : 1)-1:0] w_wr_ti;
  logic [((NGW > 1) ? $clog2(NGW) : 1)-1:0] w_wr_grp;
  logic [BW_ON-1:0] w_wr_data;
  logic out_rd_en = 0;
  logic [((TILES > 1) ? $clog2(TILES) : 1)-1:0] out_rd_addr;
  out_tile_t out_rd_data;

  int checks = 0, failures = 0, cyc = 0;
  int n_2d = 0, n_3d = 0, n_accum = 0, n_relu = 0, n_sat = 0, n_pool = 0, n_dpool = 0, n_bypass = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // layer data
  int fmap [N][TD][TH][TWD];
  int wts  [TO][N][27];

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  task automatic gen_layer(input int amp);
    for (int n = 0; n < N; n++)
      for (int z = 0; z < TD; z++) for (int r = 0; r < TH; r++) for (int c = 0; c < TWD; c++)
        fmap[n][z][r][c] = int'($urandom % (2 * amp + 1)) - amp;
    for (int o = 0; o < TO; o++) for (int n = 0; n < N; n++) for (int k = 0; k < 27; k++)
      wts[o][n][k] = int'($urandom % (2 * amp + 1)) - amp;
  endtask

  task automatic load_group(input int g);
    for (int z = 0; z < TD; z++) for (int r = 0; r < TH; r++) for (int q = 0; q < NGI; q++) begin
      @(negedge clk);
      for (int i = 0; i < TI; i++) begin
        in_wr_en[i] = 1; in_wr_z[i] = z[$bits(in_wr_z[i])-1:0]; in_wr_row[i] = r[$bits(in_wr_row[i])-1:0];
        in_wr_grp[i] = q[$bits(in_wr_grp[i])-1:0];
        for (int v = 0; v < VPW; v++)
          in_wr_data[i][v*16 +: 16] = (q * VPW + v < TWD) ? 16'(fmap[g*TI+i][z][r][q*VPW+v]) : 16'h0;
      end
    end
    @(negedge clk);
    for (int i = 0; i < TI; i++) in_wr_en[i] = 0;
    for (int o = 0; o < TO; o++) for (int i = 0; i < TI; i++) for (int q = 0; q < NGW; q++) begin
      w_wr_en = 1; w_wr_to = o[$bits(w_wr_to)-1:0]; w_wr_ti = i[$bits(w_wr_ti)-1:0]; w_wr_grp = q[$bits(w_wr_grp)-1:0];
      for (int v = 0; v < VPW; v++)
        w_wr_data[v*16 +: 16] = (q * VPW + v < 27) ? 16'(wts[o][g*TI+i][q*VPW+v]) : 16'h0;
      @(negedge clk);
    end
    w_wr_en = 0;
  endtask

  function automatic longint quant(longint v, int sh, bit relu, ref int nsat, ref int nrelu);
    longint s = v >>> sh;
    if (s > 32767) begin s = 32767; nsat++; end
    if (s < -32768) begin s = -32768; nsat++; end
    if (relu && s < 0) begin s = 0; nrelu++; end
    return s;
  endfunction

  task automatic run_layer(input bit m3, input bit relu, input bit pool, input bit dpool,
                           input int sh, input int amp);
    int tiles = m3 ? TILES : NR * NC;
    gen_layer(amp);
    if (m3) n_3d++; else n_2d++;
    for (int g = 0; g < NGRP; g++) begin
      int t0, t1;
      load_group(g);
      cfg = '0;
      cfg.mode3d = m3; cfg.first_group = (g == 0); cfg.last_group = (g == NGRP - 1);
      cfg.relu_en = relu; cfg.pool_en = pool; cfg.pool_depth = dpool; cfg.out_shift = 6'(sh);
      if (g > 0) n_accum++;
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      t1 = cyc;
      chk(t1 - t0 == tiles * (m3 ? 4 : 1) + 9,
          $sformatf("pass took %0d cycles, expected %0d", t1 - t0, tiles * (m3 ? 4 : 1) + 9));
    end
    // read back and compare
    for (int o = 0; o < TO; o++) begin
      for (int t = 0; t < tiles; t++) begin
        int tz = t / (NR * NC), tr = (t / NC) % NR, tc = t % NC;
        longint e [2][2][2];
        longint q [2][2][2];
        @(negedge clk);
        out_rd_en = 1; out_rd_bank = o[$bits(out_rd_bank)-1:0]; out_rd_addr = t[$bits(out_rd_addr)-1:0];
        for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
          longint s = 0;
          if (m3 || z == 0)
            for (int n = 0; n < N; n++)
              for (int kz = 0; kz < (m3 ? 3 : 1); kz++)
                for (int kr = 0; kr < 3; kr++) for (int kc = 0; kc < 3; kc++)
                  s += longint'(fmap[n][2*tz+z+kz][2*tr+r+kr][2*tc+c+kc]) * wts[o][n][kz*9+kr*3+kc];
          q[z][r][c] = (m3 || z == 0) ? quant(s, sh, relu, n_sat, n_relu) : 0;
        end
        if (!pool) begin
          e = q; n_bypass++;
        end else begin
          longint m0 = q[0][0][0], m1 = q[1][0][0];
          for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
            if (q[0][r][c] > m0) m0 = q[0][r][c];
            if (q[1][r][c] > m1) m1 = q[1][r][c];
          end
          for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) e[z][r][c] = 0;
          n_pool++;
          if (m3 && dpool) begin e[0][0][0] = (m1 > m0) ? m1 : m0; n_dpool++; end
          else begin e[0][0][0] = m0; e[1][0][0] = m3 ? m1 : 0; end
        end
        @(negedge clk);
        out_rd_en = 0;
        for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
          chk(longint'(out_rd_data[z][r][c]) == e[z][r][c],
              $sformatf("%s out ch%0d tile%0d [%0d][%0d][%0d] = %0d, expected %0d", m3 ? "3D" : "2D",
                        o, t, z, r, c, out_rd_data[z][r][c], e[z][r][c]));
      end
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < TI; i++) in_wr_en[i] = 0;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    //        3D relu pool dpool shift amp
    run_layer(0,  1,   1,   0,    4,   100);    // 2D conv + ReLU + 2x2 pool
    run_layer(1,  1,   0,   0,    6,   100);    // 3D conv + ReLU, pool bypassed
    run_layer(1,  0,   1,   1,    0,   2000);   // 3D conv, saturating, 2x2x2 pool
    run_layer(0,  0,   0,   0,    0,   30);     // 2D conv, no ReLU, bypass
    chk(n_2d > 0, "no 2D layer");          chk(n_3d > 0, "no 3D layer");
    chk(n_accum > 0, "no accumulation over input-channel groups");
    chk(n_relu > 0, "ReLU never clamped");  chk(n_sat > 0, "no saturation");
    chk(n_pool > 0, "no pooling");          chk(n_dpool > 0, "no depth pooling");
    chk(n_bypass > 0, "no pool bypass");
    $display("mechanisms: 2D %0d, 3D %0d, group accumulations %0d, ReLU clamps %0d, saturations %0d, pooled tiles %0d, depth-pooled %0d, bypassed %0d",
             n_2d, n_3d, n_accum, n_relu, n_sat, n_pool, n_dpool, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
