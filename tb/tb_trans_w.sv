// Self-checking test of the TW unit against the 2*G matrix product, with
// random and extreme 16-bit inputs.
module tb_trans_w;
  import wino_ref_pkg::*;
  localparam int W = 16;
  logic signed [W-1:0] x [3];
  logic signed [W+1:0] y [4];
  int checks = 0, failures = 0;

  trans_w #(.W(W)) dut (.w(x), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 3; k++) begin
        case (n % 4)
          0: x[k] = W'($urandom);
          1: x[k] = ($urandom % 2) ? 16'sh7fff : 16'sh8000;
          default: x[k] = W'($signed($urandom % 200) - 100);
        endcase
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        longint e;
        e = 0;
        for (int k = 0; k < 3; k++) e += G2[i][k] * longint'(x[k]);
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
