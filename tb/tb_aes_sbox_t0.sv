// tb_aes_sbox_t0: exhaustive test of both S-box variants (small area and
// fast) against the FIPS-197 S-box computed in the AES field, plus a few
// known table entries.
module tb_aes_sbox_t0;
  import sbox_ref_pkg::*;
  import aes_sbox_pkg::*;
  logic [7:0] u, r_area, r_fast;
  int checks = 0, failures = 0;

  aes_sbox_t0 #(.VARIANT(INV_SMALL_AREA)) dut_area (.u(u), .r(r_area));
  aes_sbox_t0 #(.VARIANT(INV_LOW_DEPTH))  dut_fast (.u(u), .r(r_fast));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s u=%02h got %02h expected %02h", what, u, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      u = 8'(i);
      #1;
      check("area", r_area, sbox(u));
      check("fast", r_fast, sbox(u));
    end
    // FIPS-197 table entries
    u = 8'h00; #1; check("area", r_area, 8'h63); check("fast", r_fast, 8'h63);
    u = 8'h53; #1; check("area", r_area, 8'hED); check("fast", r_fast, 8'hED);
    u = 8'hFF; #1; check("area", r_area, 8'h16); check("fast", r_fast, 8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
