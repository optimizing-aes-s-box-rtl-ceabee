// tb_bl0_matrix: checks the bottom linear layer BL0. For random theta, g1,
// g0 it feeds the 2Mul-style products and expects
//   affine( (theta*g0)*Y^16 + (theta*g1)*Y )
// computed in the AES field.
module tb_bl0_matrix;
  import sbox_ref_pkg::*;
  logic [3:0]  theta, g1, g0;
  logic [17:0] m;
  logic [7:0]  r, exp_r;
  int checks = 0, failures = 0;

  bl0_matrix dut (.m(m), .r(r));

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1024; n++) begin
      theta = 4'($urandom);
      g1    = 4'($urandom);
      g0    = 4'($urandom);
      m     = {expand(theta) & expand(g0), expand(theta) & expand(g1)};
      exp_r = affine(gmul(v16(theta), gmul(v16(g0), gpow(Y, 16)) ^ gmul(v16(g1), Y)));
      #1;
      checks++;
      if (r !== exp_r) begin
        failures++;
        $display("FAIL theta=%0d g1=%0d g0=%0d r=%02h expected %02h", theta, g1, g0, r, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
