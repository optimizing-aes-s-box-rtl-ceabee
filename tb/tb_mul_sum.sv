// tb_mul_sum: checks Mul-Sum for all 256 pairs of GF(16) halves (g1, g0):
// d must equal g1*g0 + nu*(g1+g0)^2 with nu = Y^17, computed in the AES field.
module tb_mul_sum;
  import sbox_ref_pkg::*;
  logic [17:0] tl;
  logic [3:0]  d, exp_d;
  logic [7:0]  nu, s;
  int checks = 0, failures = 0;

  mul_sum dut (.tl(tl), .d(d));

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nu = gpow(Y, 17);
    for (int g1 = 0; g1 < 16; g1++) begin
      for (int g0 = 0; g0 < 16; g0++) begin
        tl = {expand(4'(g0)), expand(4'(g1))};
        s  = v16(4'(g1)) ^ v16(4'(g0));
        exp_d = c16(gmul(v16(4'(g1)), v16(4'(g0))) ^ gmul(nu, gmul(s, s)));
        #1;
        checks++;
        if (d !== exp_d) begin
          failures++;
          $display("FAIL g1=%0d g0=%0d d=%0d expected %0d", g1, g0, d, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
