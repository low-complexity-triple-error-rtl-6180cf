// bch_tb_pkg: reference model used by the testbenches of the BCH decoder.
//
// It re-implements GF(2^10) arithmetic independently of the RTL (log and
// antilog tables instead of shift-and-add), builds the generator polynomial
// g(x) = m1(x) m3(x) m5(x) of the (1020, 990) code from the conjugates of
// alpha, alpha^3, alpha^5, encodes random messages systematically, and
// provides reference syndromes, shared factors and Chien search values.
// tb_init() must be called once before any other function.
package bch_tb_pkg;

  localparam int TM     = 10;
  localparam int TQ     = 1023;
  localparam int TN     = 1020;
  localparam int TNPAR  = 30;
  localparam int TPOLY  = 'h409;

  typedef logic [TN-1:0] cw_t;

  int          exp_t [2*TQ];
  int          log_t [TQ+1];
  logic [TNPAR:0] gpoly;

  function automatic int tmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int tpow(int e);
    int ee;
    ee = e % TQ;
    if (ee < 0) ee += TQ;
    return exp_t[ee];
  endfunction

  function automatic void tb_init();
    int v;
    v = 1;
    for (int k = 0; k < 2 * TQ; k++) begin
      exp_t[k] = v;
      if (k < TQ) log_t[v] = k;
      v = v << 1;
      if ((v & (1 << TM)) != 0) v = v ^ TPOLY;
    end
    // g(x) = product of minimal polynomials of alpha^1, alpha^3, alpha^5.
    begin
      int coef [TNPAR+1];
      int deg;
      int nc [TNPAR+1];
      for (int k = 0; k <= TNPAR; k++) coef[k] = 0;
      coef[0] = 1; deg = 0;
      for (int i = 1; i <= 5; i += 2) begin
        int e;
        e = i;
        for (int c = 0; c < TM; c++) begin
          // multiply by (x + alpha^e)
          for (int k = 0; k <= TNPAR; k++) nc[k] = 0;
          for (int k = 0; k <= deg; k++) begin
            nc[k + 1] ^= coef[k];
            nc[k]     ^= tmul(coef[k], tpow(e));
          end
          deg++;
          for (int k = 0; k <= TNPAR; k++) coef[k] = nc[k];
          e = (e * 2) % TQ;
        end
      end
      for (int k = 0; k <= TNPAR; k++) begin
        if (coef[k] > 1) $error("generator polynomial is not binary");
        gpoly[k] = coef[k][0];
      end
    end
  endfunction

  // Systematic encoding: message in bits TN-1 .. TNPAR, parity below.
  function automatic cw_t tb_encode(cw_t msg);
    logic [TNPAR-1:0] rem;
    logic fb;
    cw_t cw;
    rem = '0;
    for (int j = TN - 1; j >= TNPAR; j--) begin
      fb  = rem[TNPAR-1] ^ msg[j];
      rem = rem << 1;
      if (fb) rem = rem ^ gpoly[TNPAR-1:0];
    end
    cw = msg;
    cw[TNPAR-1:0] = rem;
    return cw;
  endfunction

  function automatic cw_t tb_random_codeword();
    cw_t msg;
    for (int k = 0; k < TN; k++) msg[k] = 1'($urandom);
    return tb_encode(msg);
  endfunction

  // Error pattern with nerr distinct positions.
  function automatic cw_t tb_error_pattern(int nerr);
    cw_t e;
    int  cnt, pos;
    e = '0; cnt = 0;
    while (cnt < nerr) begin
      pos = int'($urandom_range(TN - 1, 0));
      if (!e[pos]) begin e[pos] = 1'b1; cnt++; end
    end
    return e;
  endfunction

  function automatic int tb_syndrome(cw_t r, int i);
    int s;
    s = 0;
    for (int j = 0; j < TN; j++) if (r[j]) s ^= tpow(i * j);
    return s;
  endfunction

  // Reference shared factors, in the order s1, s1sq, a, b, c, r.
  function automatic void tb_ssf(int s1, int s3, int s5,
                                 output int o_s1sq, output int o_a,
                                 output int o_b, output int o_c,
                                 output int o_r);
    int s1sq, s1cube;
    s1sq   = tmul(s1, s1);
    s1cube = tmul(s1sq, s1);
    o_s1sq = s1sq;
    o_c    = s1cube ^ s3;
    o_b    = tmul(s1sq, s1sq) ^ tmul(s1, s3);
    o_a    = s5 ^ tmul(s1sq, s3);
    o_r    = tmul(s1cube, s1cube) ^ tmul(s3, s3) ^ tmul(s1cube, s3) ^ tmul(s1, s5);
  endfunction

  // Reference determinant decision value at position j.
  function automatic int tb_h(int a, int b, int c, int r, int j);
    return r ^ tmul(a, tpow(j)) ^ tmul(b, tpow(2 * j)) ^ tmul(c, tpow(3 * j));
  endfunction

endpackage
