// tb_gf_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL helpers. GF(2^233) products are formed as a
// full 465-bit carry-less product and reduced by long division with the
// whole polynomial f(x) = x^233 + x^74 + 1; inversion is a^(2^233 - 2)
// (Fermat); point addition uses the affine formulas of y^2 + xy = x^3 + 1.
// Also holds the K-233 base point and a few results worked out off-line.
package tb_gf_ref_pkg;

  typedef logic [232:0] fe_t;

  localparam logic [465:0] F_FULL = (466'(1) << 233) | (466'(1) << 74) | 466'(1);

  // NIST K-233 base point
  localparam fe_t GX = 233'h17232ba853a7e731af129f22ff4149563a419c26bf50a4c9d6eefad6126;
  localparam fe_t GY = 233'h1db537dece819b7f70f555a67c427a8cd9bf18aeb9b56e0c11056fae6a3;

  // phi(G) + G, worked out off-line with an independent model
  localparam fe_t PG_X = 233'h09e8b9df3ea854ef6b64c7796f243b18cda00a4d4a1a21c78a532077ac0;
  localparam fe_t PG_Y = 233'h112f126ed386438f8530986f55ae06c5a65dea1bc4a9bb3fcca4cd8cc3d;

  // Horner over the tau-adic digits of k = 0x52 (1010010) applied to G
  localparam fe_t K52_X = 233'h1b730fc0b7b7ef0d29689c4d85a862495e15a3da57087ac3f7a2a905743;
  localparam fe_t K52_Y = 233'h0b0aa78d64c3b847516504cb2bed15562b5b967b4873694f6796900a362;

  function automatic fe_t ref_mul(input fe_t a, input fe_t b);
    logic [465:0] p;
    p = '0;
    for (int i = 0; i < 233; i++)
      if (b[i]) p = p ^ (466'(a) << i);
    for (int i = 464; i >= 233; i--)
      if (p[i]) p = p ^ (F_FULL << (i - 233));
    return p[232:0];
  endfunction

  function automatic fe_t ref_sq(input fe_t a);
    return ref_mul(a, a);
  endfunction

  function automatic fe_t ref_inv(input fe_t a);
    fe_t r, b;
    // 2^233 - 2 = binary 1...10 (232 ones then a zero)
    r = 233'(1);
    b = ref_sq(a);
    for (int i = 1; i < 233; i++) begin
      r = ref_mul(r, b);
      b = ref_sq(b);
    end
    return r;
  endfunction

  function automatic bit on_curve(input fe_t x, input fe_t y);
    return (ref_sq(y) ^ ref_mul(x, y)) == (ref_mul(ref_sq(x), x) ^ 233'(1));
  endfunction

  // Affine addition for x1 != x2.
  function automatic void ref_add(input fe_t x1, input fe_t y1,
                                  input fe_t x2, input fe_t y2,
                                  output fe_t x3, output fe_t y3);
    fe_t l;
    l  = ref_mul(y1 ^ y2, ref_inv(x1 ^ x2));
    x3 = ref_sq(l) ^ l ^ x1 ^ x2;
    y3 = ref_mul(l, x1 ^ x3) ^ x3 ^ y1;
  endfunction

  // Horner evaluation sum k_i tau^i P with k_i in {0,1}; inf = point at infinity.
  function automatic void ref_tau_mul(input fe_t k, input fe_t px, input fe_t py,
                                      output fe_t qx, output fe_t qy, output bit inf);
    inf = 1'b1;
    qx = '0;
    qy = '0;
    for (int i = 232; i >= 0; i--) begin
      if (!inf) begin
        qx = ref_sq(qx);
        qy = ref_sq(qy);
      end
      if (k[i]) begin
        if (inf) begin
          qx = px; qy = py; inf = 1'b0;
        end else begin
          ref_add(qx, qy, px, py, qx, qy);
        end
      end
    end
  endfunction

  function automatic fe_t rand_fe();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = 32'($urandom);
    return r[232:0];
  endfunction

endpackage
