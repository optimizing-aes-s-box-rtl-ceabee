// tb_gf16_inv_rrb: exhaustive test of the 5-bit redundant-basis GF(2^4)
// inverter against its 32-entry lookup table.
module tb_gf16_inv_rrb;
  import sbox_ref_pkg::*;
  logic [4:0] x, y;
  int checks = 0, failures = 0;

  gf16_inv_rrb dut (.x(x), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      checks++;
      if (y !== INV_RRB_TABLE[i]) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected %0d", i, y, INV_RRB_TABLE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
