// Self-checking test of the weight buffer: all filters of a small
// TO x TI = 3 x 4 configuration written in BW_ON-bit groups in scrambled
// order, then every weight compared with a shadow copy.
module tb_weight_buffer;
  import wino_pkg::*;
  localparam int TO = 3, TI = 4, BW_ON = 64, VPW = 4, NG = 7;
  logic clk = 0, wr_en = 0;
  logic [1:0] wr_to; logic [1:0] wr_ti; logic [2:0] wr_grp;
  logic [BW_ON-1:0] wr_data;
  w_tile_t w [TO][TI];
  int checks = 0, failures = 0;
  int shadow [TO][TI][27];

  weight_buffer #(.TO(TO), .TI(TI), .BW_ON(BW_ON)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < TO * TI * NG; n++) begin
      automatic int k = (n * 5) % (TO * TI * NG);
      wr_en = 1; wr_to = 2'(k / (TI * NG)); wr_ti = 2'((k / NG) % TI); wr_grp = 3'(k % NG);
      for (int v = 0; v < VPW; v++) begin
        automatic int val = int'($urandom % 65536) - 32768;
        wr_data[v*16 +: 16] = 16'(val);
        if (wr_grp * VPW + v < 27) shadow[wr_to][wr_ti][wr_grp*VPW+v] = val;
      end
      @(negedge clk);
    end
    wr_en = 0;
    @(negedge clk);
    for (int o = 0; o < TO; o++) for (int i = 0; i < TI; i++) for (int k = 0; k < 27; k++) begin
      checks++;
      if (int'(w[o][i][k/9][(k/3)%3][k%3]) != shadow[o][i][k]) begin
        failures++;
        if (failures < 10) $display("FAIL w[%0d][%0d] k=%0d %0d exp %0d", o, i, k, w[o][i][k/9][(k/3)%3][k%3], shadow[o][i][k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
