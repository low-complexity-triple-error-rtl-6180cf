// bch_pkg: code parameters, GF(2^m) arithmetic and shared types of the
// triple-error-correcting m-SBS BCH decoder.
//
// The code is the (1020, 990) binary BCH code, t = 3, shortened from the
// primitive length 1023 code over GF(2^10): 30 parity bits = 3 x 10. Field
// elements are m-bit vectors in the polynomial basis; bit k is the
// coefficient of alpha^k. The primitive polynomial is x^10 + x^3 + 1, which is
// this design's choice (the code definition leaves it open).
//
// All functions are pure combinational and synthesize to XOR/AND networks.
// gf_mul with one constant operand becomes a constant multiplier (XOR only).
package bch_pkg;

  localparam int unsigned M         = 10;             // field degree
  localparam int unsigned FIELD_N   = (1 << M) - 1;   // 1023, primitive length
  localparam int unsigned N         = 1020;           // shortened code length (990 information bits)
  localparam int unsigned T         = 3;              // correctable errors
  localparam logic [M:0]  PRIM_POLY = 11'h409;        // x^10 + x^3 + 1

  typedef logic [M-1:0] gf_t;

  // Shared syndrome factors of one codeword (Fig. 3(a) outputs plus the two
  // case-1 coefficients S1 and S1^2 used by the Chien search multiplexers).
  //   a = S5 + S1^2 S3                 (coefficient of alpha^j,  case 2)
  //   b = S1^4 + S1 S3                 (coefficient of alpha^2j, case 2)
  //   c = S1^3 + S3                    (coefficient of alpha^3j, case 2)
  //   r = S1^6 + S3^2 + S1^3 S3 + S1 S5 (reference / determinant, case 2)
  typedef struct packed {
    gf_t s1;
    gf_t s1sq;
    gf_t a;
    gf_t b;
    gf_t c;
    gf_t r;
  } ssf_t;

  // Syndromes of one codeword.
  typedef struct packed {
    gf_t s1;
    gf_t s3;
    gf_t s5;
  } syn_t;

  // Multiply by alpha (shift and reduce).
  function automatic gf_t gf_mulx(gf_t a);
    logic [M:0] t;
    t = {a, 1'b0};
    if (t[M]) t = t ^ PRIM_POLY;
    return t[M-1:0];
  endfunction

  // General GF(2^m) multiplication, shift-and-add.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t acc;
    gf_t sh;
    acc = '0;
    sh  = a;
    for (int k = 0; k < M; k++) begin
      if (b[k]) acc = acc ^ sh;
      sh = gf_mulx(sh);
    end
    return acc;
  endfunction

  function automatic gf_t gf_sq(gf_t a);
    return gf_mul(a, a);
  endfunction

  // (.)^3 operator of Fig. 3(a).
  function automatic gf_t gf_cube(gf_t a);
    return gf_mul(a, gf_mul(a, a));
  endfunction

  // Cycles the error locator needs to see the first four Chien search values
  // of a codeword (its self-error-detection reference) with P lanes.
  function automatic int unsigned el_ref_cycles(int unsigned p);
    return (p >= 4) ? 1 : (4 + p - 1) / p;
  endfunction

  // alpha^e for any integer exponent (reduced modulo 2^m - 1). Used to build
  // the constants of the constant multipliers at elaboration time.
  function automatic gf_t gf_alpha_pow(int e);
    int   ee;
    gf_t  v;
    ee = e % int'(FIELD_N);
    if (ee < 0) ee = ee + int'(FIELD_N);
    v = gf_t'(1);
    for (int k = 0; k < ee; k++) v = gf_mulx(v);
    return v;
  endfunction

endpackage
