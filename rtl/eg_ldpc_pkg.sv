// eg_ldpc_pkg - code constants for the one-step majority-logic decodable
// cyclic codes used by the decoder: Euclidean-geometry LDPC codes EG(2,2^S)
// and difference-set cyclic codes (DSCC), the projective-geometry codes
// PG(2,2^S).
//
// Everything here is evaluated at elaboration time from two values: the code
// family and S. EG(2,2^S) gives N = 4^S - 1 (S=2: (15,7), S=3: (63,37),
// S=4: (255,175)) with J = 2^S orthogonal check sums; DSCC gives
// N = 4^S + 2^S + 1 (S=1: (7,3), S=2: (21,11), S=3: (73,45)) with
// J = 2^S + 1. The parity-check matrix consists of all N cyclic shifts of the
// incidence vector of one line of the geometry. For EG the line is
// {1 + b*alpha : b in GF(2^S)} over GF(2^(2S)), which misses the origin; for
// DSCC it is the projective line spanned by 1 and alpha in GF(2^(3S)), whose
// point exponents, taken modulo N, form a perfect difference set. Two lines
// share at most one point, so the J rows that contain codeword bit N-1 are
// orthogonal on that bit: every other bit appears in at most one of them.
// Those rows are the check sums of a one-step majority-logic decoder.
//
// The line constructions, the primitive polynomials and the generator
// polynomial g(x) = (x^N+1)/h(x), with h the reciprocal of
// gcd(line(x), x^N+1), are standard coding theory. For the default (15,7)
// code they give g(x) = 1 + x^4 + x^6 + x^7 + x^8 and the check sums on bit
// 14 {1,5,13,14}, {0,2,6,14}, {7,8,10,14}, {3,11,12,14}.
package eg_ldpc_pkg;

  localparam int MAX_N = 255;

  typedef enum logic {
    CODE_EG   = 1'b0,   // Euclidean geometry EG(2,2^S)
    CODE_DSCC = 1'b1    // difference-set cyclic, projective geometry PG(2,2^S)
  } code_family_e;

  // Polynomial over GF(2) or bit vector of a codeword: bit i is x^i.
  typedef logic [MAX_N:0] poly_t;

  function automatic int code_n(input code_family_e f, input int s);
    if (f == CODE_EG) return (1 << (2 * s)) - 1;
    return (1 << (2 * s)) + (1 << s) + 1;
  endfunction

  // Number of orthogonal check sums on each bit.
  function automatic int code_j(input code_family_e f, input int s);
    return (f == CODE_EG) ? (1 << s) : (1 << s) + 1;
  endfunction

  // Number of parity bits: 3^S - 1 (EG) or 3^S + 1 (DSCC).
  function automatic int code_parity(input code_family_e f, input int s);
    int p = 1;
    for (int i = 0; i < s; i++) p = p * 3;
    return (f == CODE_EG) ? p - 1 : p + 1;
  endfunction

  function automatic int code_k(input code_family_e f, input int s);
    return code_n(f, s) - code_parity(f, s);
  endfunction

  // Degree of the extension field the geometry is built in.
  function automatic int field_m(input code_family_e f, input int s);
    return (f == CODE_EG) ? 2 * s : 3 * s;
  endfunction

  // Primitive polynomial of GF(2^m).
  function automatic int prim_poly(input int m);
    case (m)
      3:       return 'hB;    // x^3 + x + 1
      4:       return 'h13;   // x^4 + x + 1
      6:       return 'h43;   // x^6 + x + 1
      8:       return 'h11D;  // x^8 + x^4 + x^3 + x^2 + 1
      default: return 'h211;  // x^9 + x^4 + 1
    endcase
  endfunction

  // Multiplication by alpha in GF(2^m), polynomial basis.
  function automatic int gf_times_alpha(input int x, input int m);
    x = x << 1;
    if (((x >> m) & 1) != 0) x = x ^ prim_poly(m);
    return x;
  endfunction

  // alpha^e in GF(2^m).
  function automatic int gf_pow(input int e, input int m);
    int x = 1;
    for (int i = 0; i < e; i++) x = gf_times_alpha(x, m);
    return x;
  endfunction

  // Discrete logarithm of a nonzero element of GF(2^m).
  function automatic int gf_log(input int v, input int m);
    int x = 1;
    for (int i = 0; i < (1 << m) - 1; i++) begin
      if (x == v) return i;
      x = gf_times_alpha(x, m);
    end
    return 0;
  endfunction

  // Incidence vector of the base line. The subfield GF(2^s) of GF(2^m) is
  // {0} and the powers alpha^(k*(2^m-1)/(2^s-1)).
  function automatic poly_t line_vector(input code_family_e f, input int s);
    poly_t v    = '0;
    int    n    = code_n(f, s);
    int    m    = field_m(f, s);
    int    step = ((1 << m) - 1) / ((1 << s) - 1);
    if (f == CODE_DSCC) v[0] = 1'b1;          // the point spanned by 1
    for (int k = 0; k < (1 << s); k++) begin
      int b = (k == 0) ? 0 : gf_pow((k - 1) * step, m);
      if (f == CODE_EG)
        v[gf_log(1 ^ ((b == 0) ? 0 : gf_times_alpha(b, m)), m)] = 1'b1;  // 1 + b*alpha
      else
        v[gf_log(b ^ 2, m) % n] = 1'b1;                                   // b + alpha
    end
    return v;
  endfunction

  // Cyclic rotation of an n-bit vector by a positions towards the MSB.
  function automatic poly_t rotl(input poly_t v, input int n, input int a);
    poly_t r = '0;
    for (int i = 0; i < n; i++) r[(i + a) % n] = v[i];
    return r;
  endfunction

  // Check sum j (0..J-1) orthogonal on bit n-1: the parity-check row that
  // maps the j-th point of the base line onto position n-1.
  function automatic poly_t check_mask(input code_family_e f, input int s, input int j);
    poly_t v   = line_vector(f, s);
    int    n   = code_n(f, s);
    int    cnt = 0;
    for (int i = 0; i < n; i++) begin
      if (v[i]) begin
        if (cnt == j) return rotl(v, n, n - 1 - i);
        cnt++;
      end
    end
    return '0;
  endfunction

  function automatic int poly_deg(input poly_t p);
    for (int i = MAX_N; i >= 0; i--) if (p[i]) return i;
    return -1;
  endfunction

  function automatic poly_t poly_mod(input poly_t a, input poly_t b);
    int db = poly_deg(b);
    for (int i = MAX_N; i >= db; i--) if (a[i]) a = a ^ (b << (i - db));
    return a;
  endfunction

  function automatic poly_t poly_div(input poly_t a, input poly_t b);
    poly_t q = '0;
    int db = poly_deg(b);
    for (int i = MAX_N; i >= db; i--)
      if (a[i]) begin
        q[i - db] = 1'b1;
        a = a ^ (b << (i - db));
      end
    return q;
  endfunction

  function automatic poly_t poly_gcd(input poly_t a, input poly_t b);
    while (b != '0) begin
      poly_t t = poly_mod(a, b);
      a = b;
      b = t;
    end
    return a;
  endfunction

  // x^n + 1, with n <= MAX_N.
  function automatic poly_t xn1(input int n);
    return (poly_t'(1) << n) | poly_t'(1);
  endfunction

  // Generator polynomial of the code (degree N-K).
  function automatic poly_t gen_poly(input code_family_e f, input int s);
    int    n  = code_n(f, s);
    poly_t gd = poly_gcd(line_vector(f, s), xn1(n));
    int    d  = poly_deg(gd);
    poly_t h  = '0;
    for (int i = 0; i <= d; i++) h[d - i] = gd[i];
    return poly_div(xn1(n), h);
  endfunction

endpackage
