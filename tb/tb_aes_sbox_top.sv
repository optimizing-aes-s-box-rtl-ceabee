// tb_aes_sbox_top: end-to-end test of the top level at its default
// parameters (small-area S-box).
//  * All 256 S-box inputs against the FIPS-197 S-box, and SubBytes of the
//    FIPS-197 Appendix B first-round state.
//  * All 32 codes of the redundant-basis inverter against its table.
//  * All 256 inputs of the M0 example circuit against its matrix rows.
// It also counts the special cases the datapath must handle: the zero byte
// (whose GF(2^8) "inverse" is defined as 0, so the GF(2^4) inverter sees 0),
// inputs in the GF(16) subfield (g1 = g0, so Mul-Sum reduces to g^2), and
// the redundant codes of the RRB inverter (a code and its complement name
// the same field element). Each must occur at least once.
module tb_aes_sbox_top;
  import sbox_ref_pkg::*;
  logic [7:0] sbox_in, sbox_out;
  logic [4:0] rrb_x, rrb_y;
  logic [7:0] m0_x, m0_y, m0_exp;
  int checks = 0, failures = 0;
  int n_zero = 0, n_subfield = 0, n_rrb_pair = 0;

  // FIPS-197 Appendix B, round 1: state after AddRoundKey and after SubBytes
  localparam logic [127:0] ARK_STATE = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
  localparam logic [127:0] SUB_STATE = 128'hd42711aee0bf98f1b8b45de51e415230;
  // M0 matrix rows, X0 in the most significant bit
  localparam logic [7:0] M0_ROWS [8] = '{8'hCA, 8'hC8, 8'h66, 8'h19, 8'h68, 8'hF0, 8'h46, 8'hA4};

  aes_sbox_top dut (.sbox_in(sbox_in), .sbox_out(sbox_out), .rrb_x(rrb_x), .rrb_y(rrb_y),
                    .m0_x(m0_x), .m0_y(m0_y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rrb_x = '0;
    m0_x  = '0;
    for (int i = 0; i < 256; i++) begin
      sbox_in = 8'(i);
      #1;
      checks++;
      if (sbox_out !== sbox(sbox_in)) begin
        failures++;
        $display("FAIL S(%02h) = %02h expected %02h", sbox_in, sbox_out, sbox(sbox_in));
      end
      if (sbox_in == 8'h00) n_zero++;
      if (gpow(sbox_in, 16) == sbox_in) n_subfield++;
    end
    for (int b = 0; b < 16; b++) begin
      sbox_in = ARK_STATE[8*b +: 8];
      #1;
      checks++;
      if (sbox_out !== SUB_STATE[8*b +: 8]) begin
        failures++;
        $display("FAIL state byte %0d: S(%02h) = %02h expected %02h", b, sbox_in, sbox_out, SUB_STATE[8*b +: 8]);
      end
    end
    for (int i = 0; i < 32; i++) begin
      rrb_x = 5'(i);
      #1;
      checks++;
      if (rrb_y !== INV_RRB_TABLE[i]) begin
        failures++;
        $display("FAIL rrb x=%0d y=%0d expected %0d", i, rrb_y, INV_RRB_TABLE[i]);
      end
      if (i < 16 && INV_RRB_TABLE[i] == INV_RRB_TABLE[31 - i] ^ 5'h1F) n_rrb_pair++;
    end
    for (int i = 0; i < 256; i++) begin
      m0_x = 8'(i);
      for (int k = 0; k < 8; k++) m0_exp[7 - k] = ^(m0_x & M0_ROWS[k]);
      #1;
      checks++;
      if (m0_y !== m0_exp) begin
        failures++;
        $display("FAIL m0 x=%02h y=%02h expected %02h", m0_x, m0_y, m0_exp);
      end
    end
    $display("zero inputs: %0d, subfield inputs: %0d, complementary RRB pairs: %0d",
             n_zero, n_subfield, n_rrb_pair);
    checks += 3;
    if (n_zero == 0) failures++;
    if (n_subfield == 0) failures++;
    if (n_rrb_pair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
