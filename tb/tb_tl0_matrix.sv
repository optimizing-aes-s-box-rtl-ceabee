// tb_tl0_matrix: checks the top linear layer TL0.
//  * Every tl[t] is the right expansion of its half (structure of the
//    multiplier operands).
//  * The halves (g1, g0) decode, through the tower basis, back to the input
//    byte for all 256 inputs (isomorphic mapping is correct and bijective).
module tb_tl0_matrix;
  import sbox_ref_pkg::*;
  logic [7:0]  u;
  logic [17:0] tl;
  logic [3:0]  g1, g0;
  int checks = 0, failures = 0;

  tl0_matrix dut (.u(u), .tl(tl));

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      u = 8'(i);
      #1;
      g1 = {tl[0], tl[1], tl[3], tl[4]};
      g0 = {tl[9], tl[10], tl[12], tl[13]};
      checks++;
      if (tl[8:0] !== expand(g1) || tl[17:9] !== expand(g0)) begin
        failures++;
        $display("FAIL u=%02h: expansion structure wrong tl=%05h", u, tl);
      end
      checks++;
      if (v256({g1, g0}) !== u) begin
        failures++;
        $display("FAIL u=%02h: tower code %02h decodes to %02h", u, {g1, g0}, v256({g1, g0}));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
