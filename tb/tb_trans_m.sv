// Self-checking test of the TM unit against the A^T matrix product, with
// random and extreme 16-bit inputs.
module tb_trans_m;
  import wino_ref_pkg::*;
  localparam int W = 16;
  logic signed [W-1:0] x [4];
  logic signed [W+1:0] y [2];
  int checks = 0, failures = 0;

  trans_m #(.W(W)) dut (.s(x), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 4; k++) begin
        case (n % 4)
          0: x[k] = W'($urandom);
          1: x[k] = ($urandom % 2) ? 16'sh7fff : 16'sh8000;
          default: x[k] = W'($signed($urandom % 200) - 100);
        endcase
      end
      #1;
      for (int i = 0; i < 2; i++) begin
        longint e;
        e = 0;
        for (int k = 0; k < 4; k++) e += AT[i][k] * longint'(x[k]);
        checks++;
        if (longint'(y[i]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL y[%0d]=%0d exp %0d", i, y[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
