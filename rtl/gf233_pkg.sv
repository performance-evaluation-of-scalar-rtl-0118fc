// gf233_pkg: field constants, types and small combinational helpers for
// GF(2^233) in polynomial basis with the K-233 reduction polynomial
// f(x) = x^233 + x^74 + 1, shared by every block of the point multiplier.
//
// The field and the polynomial are the ones of the NIST Koblitz curve
// K-233 (y^2 + xy = x^3 + 1, a = 0, b = 1). An element is a 233-bit vector,
// bit i being the coefficient of x^i. The helpers are pure functions that
// synthesize to XOR networks: multiply by x, divide by x, square, and the
// constant x^(2m) mod f used to undo the Montgomery factor.
package gf233_pkg;

  localparam int unsigned M = 233;            // field degree
  localparam int unsigned K_MID = 74;         // middle term of f(x)

  typedef logic [M-1:0] gf_t;

  // f(x) without its leading term x^233
  localparam gf_t F_LOW = gf_t'(1) | (gf_t'(1) << K_MID);

  // Which finite field multiplier the point adder uses.
  typedef enum logic {
    MULT_INTERLEAVED = 1'b0,
    MULT_MONTGOMERY  = 1'b1
  } mult_kind_e;

  // a * x mod f
  function automatic gf_t gf_mulx(input gf_t a);
    return {a[M-2:0], 1'b0} ^ (a[M-1] ? F_LOW : '0);
  endfunction

  // a / x mod f (a + a0*f is divisible by x)
  function automatic gf_t gf_divx(input gf_t a);
    return {a[0], a[M-1:1] ^ (a[0] ? F_LOW[M-1:1] : '0)};
  endfunction

  // Reduce a polynomial of degree <= 2m-2 modulo f, folding from the top.
  function automatic gf_t gf_reduce(input logic [2*M-2:0] p);
    logic [2*M-2:0] s;
    s = p;
    for (int i = 2*M-2; i >= int'(M); i--) begin
      if (s[i]) begin
        s[i]           = 1'b0;
        s[i-M]         = ~s[i-M];
        s[i-M+K_MID]   = ~s[i-M+K_MID];
      end
    end
    return s[M-1:0];
  endfunction

  // x^(2m) mod f: multiplying a Montgomery product by it through one more
  // Montgomery pass gives the plain product.
  function automatic gf_t gf_mont_r2();
    gf_t r;
    r = gf_t'(1);
    for (int i = 0; i < 2*int'(M); i++) r = gf_mulx(r);
    return r;
  endfunction

  localparam gf_t MONT_R2 = gf_mont_r2();

endpackage
