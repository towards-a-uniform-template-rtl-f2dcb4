// Self-checking test of the EWMU: 16 signed products with one-cycle latency,
// full-range operands, and the enable holding the previous products.
module tb_ewmu;
  import wino_pkg::*;
  logic  clk = 0;
  logic  en;
  xt_t   x [16];
  wt_t   w [16];
  prod_t p [16];
  longint exp_p [16];
  int checks = 0, failures = 0;

  ewmu #(.N(16)) dut (.clk, .en, .x, .w, .p);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = (n % 5 != 4);
      for (int i = 0; i < 16; i++) begin
        x[i] = (n % 7 == 0) ? xt_t'(-(2**(XT_W-1))) : xt_t'($urandom);
        w[i] = (n % 11 == 0) ? wt_t'(-(2**(WT_W-1))) : wt_t'($urandom);
        if (en) exp_p[i] = longint'(x[i]) * longint'(w[i]);
      end
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (longint'(p[i]) != exp_p[i]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d p[%0d]=%0d exp %0d", n, i, p[i], exp_p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
