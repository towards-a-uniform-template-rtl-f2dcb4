// Self-checking test of the engine controller (Tz x Tr x Tc = 2 x 4 x 6):
// in 2D and 3D mode the window reads must walk the tile positions in
// tz / tr / tc order (four plane cycles per tile in 3D), the PE control must
// follow one cycle behind with the right plane and tile address, the pass
// must take (Tr/2)(Tc/2) resp. 4(Tz/2)(Tr/2)(Tc/2) issue cycles, `done` must
// come 9 cycles after the last issue, and finished tiles must get
// consecutive output-buffer addresses.
module tb_engine_ctrl;
  localparam int TZ = 2, TR = 4, TC = 6;
  localparam int NZ = TZ / 2, NR = TR / 2, NC = TC / 2;
  logic clk = 0, rst_n = 0, start = 0, mode3d = 0, tile_done = 0;
  logic busy, done, rd_en, pe_valid, mode3d_q;
  logic [1:0] rd_z0; logic [2:0] rd_r0; logic [2:0] rd_c0;
  logic [1:0] pe_plane;
  logic [1:0] pe_addr, ob_addr;
  int checks = 0, failures = 0, cyc = 0;

  engine_ctrl #(.TZ(TZ), .TR(TR), .TC(TC)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL cyc %0d: %s", cyc, msg);
    end
  endtask

  task automatic run(input bit m3);
    int np = m3 ? 4 : 1;
    int n = 0, nexp = (m3 ? NZ : 1) * NR * NC * np;
    int first_issue = -1, last_issue = -1, done_cyc = -1;
    int exp_z [$], exp_r [$], exp_c [$], exp_p [$], exp_a [$];
    for (int z = 0; z < (m3 ? NZ : 1); z++)
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++)
          for (int p = 0; p < np; p++) begin
            exp_z.push_back(2 * z); exp_r.push_back(2 * r); exp_c.push_back(2 * c);
            exp_p.push_back(p); exp_a.push_back((z * NR + r) * NC + c);
          end
    @(negedge clk);
    start = 1; mode3d = m3;
    @(negedge clk);
    start = 0; mode3d = !m3;   // mode is sampled at start only
    while (done_cyc < 0 && cyc < 4000) begin
      // PE side: one cycle after each read
      if (pe_valid) begin
        chk(pe_plane == 2'(exp_p[n - 1]) && pe_addr == 2'(exp_a[n - 1]) && mode3d_q == m3, "pe control");
      end
      if (rd_en) begin
        if (first_issue < 0) first_issue = cyc;
        last_issue = cyc;
        chk(n < nexp, "too many reads");
        if (n < nexp)
          chk(rd_z0 == 2'(exp_z[n]) && rd_r0 == 3'(exp_r[n]) && rd_c0 == 3'(exp_c[n]), "window origin");
        n++;
      end
      if (done) done_cyc = cyc;
      chk(busy || done, "busy during pass");
      @(negedge clk);
    end
    chk(n == nexp, $sformatf("reads %0d exp %0d", n, nexp));
    chk(last_issue - first_issue + 1 == nexp, "issue cycles contiguous");
    chk(done_cyc - last_issue == 9, $sformatf("done %0d cycles after last issue", done_cyc - last_issue));
    @(negedge clk);
    chk(!busy && !done, "idle after done");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    // output-buffer addresses: consecutive per finished tile, restart at start
    for (int k = 0; k < 5; k++) begin
      chk(ob_addr == 2'(k % 4), "ob_addr count");
      @(negedge clk); tile_done = 1; @(negedge clk); tile_done = 0;
    end
    start = 1; @(negedge clk); start = 0;
    chk(ob_addr == 0, "ob_addr restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
