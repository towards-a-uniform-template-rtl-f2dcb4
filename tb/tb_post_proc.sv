// Self-checking test of the ReLU / POOL / bypass stage: random accumulator
// tiles (including values that saturate) under every combination of mode,
// ReLU, pooling, depth pooling and a few shifts, against a reference model.
module tb_post_proc;
  import wino_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  layer_cfg_t cfg;
  acc_tile_t in;
  logic out_valid;
  out_tile_t out;
  int checks = 0, failures = 0;
  int n_relu = 0, n_sat = 0, n_pool = 0, n_bypass = 0;

  post_proc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat_q(longint v, int sh, bit relu);
    longint s = v >>> sh;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    if (relu && s < 0) s = 0;
    return s;
  endfunction

  initial begin
    longint e [2][2][2];
    longint q [2][2][2];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cfg = '0;
      cfg.mode3d = n[0]; cfg.relu_en = n[1]; cfg.pool_en = n[2]; cfg.pool_depth = n[3];
      cfg.out_shift = 6'((n / 16) % 4 * 3);
      for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
        in[z][r][c] = (n % 7 == 6) ? acc_t'($signed($urandom)) * 64 : acc_t'($signed($urandom % 200000) - 100000);
        q[z][r][c] = (z == 1 && !cfg.mode3d) ? 0 : sat_q(longint'(in[z][r][c]), int'(cfg.out_shift), cfg.relu_en);
        if ((longint'(in[z][r][c]) >>> cfg.out_shift) > 32767 || (longint'(in[z][r][c]) >>> cfg.out_shift) < -32768) n_sat++;
        if (cfg.relu_en && (longint'(in[z][r][c]) < 0)) n_relu++;
      end
      in_valid = 1;
      if (!cfg.pool_en) begin
        e = q; n_bypass++;
      end else begin
        longint m0, m1;
        n_pool++;
        m0 = q[0][0][0]; m1 = q[1][0][0];
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
          if (q[0][r][c] > m0) m0 = q[0][r][c];
          if (q[1][r][c] > m1) m1 = q[1][r][c];
        end
        for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) e[z][r][c] = 0;
        if (cfg.mode3d && cfg.pool_depth) e[0][0][0] = (m1 > m0) ? m1 : m0;
        else begin e[0][0][0] = m0; e[1][0][0] = cfg.mode3d ? m1 : 0; end
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
      for (int z = 0; z < 2; z++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
        checks++;
        if (longint'(out[z][r][c]) != e[z][r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d [%0d][%0d][%0d] %0d exp %0d", n, z, r, c, out[z][r][c], e[z][r][c]);
        end
      end
    end
    checks++;
    if (n_relu == 0 || n_sat == 0 || n_pool == 0 || n_bypass == 0) begin
      failures++; $display("FAIL coverage relu %0d sat %0d pool %0d bypass %0d", n_relu, n_sat, n_pool, n_bypass);
    end
    $display("ReLU clamps %0d, saturations %0d, pooled %0d, bypassed %0d", n_relu, n_sat, n_pool, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
