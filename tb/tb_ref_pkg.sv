// tb_ref_pkg - reference values for the testbenches, written independently
// of the RTL package: the generator polynomials and the (15,7) check sums are
// typed in from the standard EG-LDPC code tables, and codewords are built as
// d(x)*g(x), not by the RTL's systematic encoder.
package tb_ref_pkg;

  typedef logic [255:0] vec_t;

  // Generator polynomials: (15,7) and (63,37) EG-LDPC codes.
  localparam vec_t G15 = 256'h1D1;        // 1 + x^4 + x^6 + x^7 + x^8
  localparam vec_t G63 = 256'h501F445;
  // Generator polynomial of the (73,45) difference-set cyclic code.
  localparam vec_t G73 = 256'h114019E1;

  // Check sums orthogonal on bit 14 of the (15,7) code, as bit sets.
  localparam logic [14:0] CS15 [4] = '{
    15'(1 << 1 | 1 << 5 | 1 << 13 | 1 << 14),
    15'(1 << 0 | 1 << 2 | 1 << 6 | 1 << 14),
    15'(1 << 7 | 1 << 8 | 1 << 10 | 1 << 14),
    15'(1 << 3 | 1 << 11 | 1 << 12 | 1 << 14)
  };

  // Product of two polynomials over GF(2), truncated to 256 bits.
  function automatic vec_t clmul(input vec_t a, input vec_t b);
    vec_t r = '0;
    for (int i = 0; i < 256; i++) if (a[i]) r = r ^ (b << i);
    return r;
  endfunction

  // Remainder of a divided by b.
  function automatic vec_t pmod(input vec_t a, input vec_t b);
    int db = 0;
    for (int i = 0; i < 256; i++) if (b[i]) db = i;
    for (int i = 255; i >= db; i--) if (a[i]) a = a ^ (b << (i - db));
    return a;
  endfunction

  function automatic int popcount(input vec_t v);
    int c = 0;
    for (int i = 0; i < 256; i++) c += int'(v[i]);
    return c;
  endfunction

  // Random vector of n bits.
  function automatic vec_t rand_vec(input int n);
    vec_t v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'($urandom_range(1));
    return v;
  endfunction

  // Random error pattern of weight w inside n bits.
  function automatic vec_t rand_err(input int n, input int w);
    vec_t e = '0;
    int   c = 0;
    while (c < w) begin
      int p = $urandom_range(n - 1);
      if (!e[p]) begin
        e[p] = 1'b1;
        c++;
      end
    end
    return e;
  endfunction

endpackage
