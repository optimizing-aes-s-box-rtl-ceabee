// tb_gf16_inv_nb_area: exhaustive test of the small-area GF(2^4) inverter
// against the 16-entry inverse table, plus a field check that x * f(x) = 1
// in GF(16) for x != 0 (using the AES-field reference model).
module tb_gf16_inv_nb_area;
  import sbox_ref_pkg::*;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  gf16_inv_nb_area dut (.x(x), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (y !== INV_NB_TABLE[i]) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected %0d", i, y, INV_NB_TABLE[i]);
      end
      if (i != 0) begin
        checks++;
        if (gmul(v16(x), v16(y)) != 8'h01) begin
          failures++;
          $display("FAIL x=%0d: x*y != 1", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
