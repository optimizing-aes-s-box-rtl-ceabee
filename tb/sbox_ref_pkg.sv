// sbox_ref_pkg: reference arithmetic for the S-box test benches, written
// independently of the RTL matrices.
//
// All arithmetic is done directly in the AES field GF(2^8) (polynomial
// x^8+x^4+x^3+x+1): multiplication by shift-and-add, inversion as a^254, the
// S-box as the FIPS-197 affine map of the inverse. Tower-field codes are
// decoded by summing the basis elements they select (W = 8'hBC, Z = 8'hE0,
// Y = 8'h12), so a test can say what a GF(16) or tower value must be without
// using the constants of the design.
package sbox_ref_pkg;

  localparam logic [7:0] W = 8'hBC;
  localparam logic [7:0] Z = 8'hE0;
  localparam logic [7:0] Y = 8'h12;

  // Table of the GF(2^4) inverse in normal basis, index 0..15.
  localparam logic [3:0] INV_NB_TABLE [16] = '{
    4'd0, 4'd12, 4'd8, 4'd4, 4'd3, 4'd10, 4'd7, 4'd6,
    4'd2, 4'd13, 4'd5, 4'd14, 4'd1, 4'd9, 4'd11, 4'd15};

  // Table of the GF(2^4) inverse in the redundant 5-bit basis, index 0..31.
  localparam logic [4:0] INV_RRB_TABLE [32] = '{
    5'd0, 5'd5, 5'd3, 5'd18, 5'd12, 5'd17, 5'd9, 5'd16,
    5'd10, 5'd6, 5'd24, 5'd16, 5'd20, 5'd16, 5'd16, 5'd16,
    5'd0, 5'd5, 5'd3, 5'd30, 5'd12, 5'd27, 5'd9, 5'd30,
    5'd10, 5'd6, 5'd29, 5'd29, 5'd23, 5'd27, 5'd23, 5'd31};

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 8'h00;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] gpow(logic [7:0] a, int n);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < n; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    return gpow(a, 254);
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] x, int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] affine(logic [7:0] x);
    return x ^ rotl8(x, 1) ^ rotl8(x, 2) ^ rotl8(x, 3) ^ rotl8(x, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    return affine(ginv(a));
  endfunction

  // AES-field value of a 4-bit normal-basis GF(16) code {a3,a2,a1,a0}.
  function automatic logic [7:0] v16(logic [3:0] c);
    logic [7:0] z4 = gpow(Z, 4);
    logic [7:0] w2 = gmul(W, W);
    logic [7:0] s  = 8'h00;
    if (c[3]) s ^= gmul(z4, w2);
    if (c[2]) s ^= gmul(z4, W);
    if (c[1]) s ^= gmul(Z, w2);
    if (c[0]) s ^= gmul(Z, W);
    return s;
  endfunction

  // Inverse of v16: search the 16 codes.
  function automatic logic [3:0] c16(logic [7:0] v);
    for (int c = 0; c < 16; c++) if (v16(4'(c)) == v) return 4'(c);
    return 4'hx;
  endfunction

  // AES-field value of an 8-bit tower code {g1, g0} = g1*Y^16 + g0*Y.
  function automatic logic [7:0] v256(logic [7:0] code);
    return gmul(v16(code[7:4]), gpow(Y, 16)) ^ gmul(v16(code[3:0]), Y);
  endfunction

  // GF(16) product of two codes.
  function automatic logic [3:0] m16(logic [3:0] a, logic [3:0] b);
    return c16(gmul(v16(a), v16(b)));
  endfunction

  // Karatsuba operand expansion used at the multiplier interfaces.
  function automatic logic [8:0] expand(logic [3:0] a);
    return {a[3] ^ a[2] ^ a[1] ^ a[0], a[2] ^ a[0], a[3] ^ a[1],
            a[1] ^ a[0], a[0], a[1], a[3] ^ a[2], a[2], a[3]};
  endfunction

endpackage
