// tb_mul2: checks 2Mul for every theta with random halves g1, g0 (given as
// TL0 would give them, expanded). Each product half must be the AND of the
// expanded theta with the expanded half, bit for bit.
module tb_mul2;
  import sbox_ref_pkg::*;
  logic [3:0]  theta, g1, g0;
  logic [17:0] tl, m;
  int checks = 0, failures = 0;

  mul2 dut (.theta(theta), .tl(tl), .m(m));

  // True when p is the partial-product pattern of a times b.
  function automatic bit pattern_ok(logic [8:0] p, logic [3:0] a, logic [3:0] b);
    return p == (expand(a) & expand(b));
  endfunction

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      theta = 4'(n % 16);
      g1 = 4'($urandom);
      g0 = 4'($urandom);
      tl = {expand(g0), expand(g1)};
      #1;
      checks++;
      if (!pattern_ok(m[8:0], theta, g1) || !pattern_ok(m[17:9], theta, g0)) begin
        failures++;
        $display("FAIL theta=%0d g1=%0d g0=%0d m=%05h", theta, g1, g0, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
