// gf_pkg: shared types and elaboration-time helpers for the GF(2^m) datapath.
//
// A field GF(2^m) is fixed by its degree m and its irreducible polynomial
// IP = beta^m + a(m-1) beta^(m-1) + ... + a0. Polynomials are stored as a
// packed vector, bit i holding the coefficient of beta^i, bit m the leading 1.
// Field elements use the polynomial (standard) basis (beta^(m-1) ... beta^0),
// with the coefficient of beta^i in bit i.
//
// The helpers below run only while the design is elaborated: they turn the
// irreducible polynomial into the constant reduction table from which the
// partial product generators and the squaring circuit take their XOR masks. No run-time logic comes from them.
//
// MAX_DEG bounds the degree a module can be built for. It is 128, the largest
// field the multipliers were designed for; raise it for larger fields.
// The table of default polynomials follows the usual choices for each degree:
// beta^2+beta+1 for GF(2^2) and beta^31+beta^3+1 for GF(2^31) are the ones the
// design's examples use, beta^8+beta^4+beta^3+beta+1 is the AES field, and the
// others are common low-weight polynomials picked for this implementation.
package gf_pkg;

  localparam int unsigned MAX_DEG = 128;

  // A polynomial of degree up to MAX_DEG (bit i = coefficient of beta^i).
  typedef logic [MAX_DEG:0] poly_t;

  // MAX_DEG polynomials, entry k in bits [k]. Used as a constant matrix.
  typedef poly_t [MAX_DEG-1:0] polyvec_t;

  // Default irreducible polynomial for a degree; 0 when none is listed.
  function automatic poly_t typical_ip(input int unsigned m);
    poly_t p;
    p = '0;
    case (m)
      2:   p[2:0] = 3'b111;                 // beta^2 + beta + 1
      3:   p[3:0] = 4'b1011;                // beta^3 + beta + 1
      4:   p[4:0] = 5'b10011;               // beta^4 + beta + 1
      8:   p[8:0] = 9'h11b;                 // beta^8 + beta^4 + beta^3 + beta + 1
      16:  p[16:0] = 17'h1002b;             // beta^16 + beta^5 + beta^3 + beta + 1
      31:  p[31:0] = 32'h8000_0009;         // beta^31 + beta^3 + 1
      32:  p[32:0] = 33'h1_0000_008d;       // beta^32 + beta^7 + beta^3 + beta^2 + 1
      64:  begin p[64] = 1'b1; p[7:0] = 8'h1b; end  // beta^64 + beta^4 + beta^3 + beta + 1
      128: begin p[128] = 1'b1; p[7:0] = 8'h87; end // beta^128 + beta^7 + beta^2 + beta + 1
      default: p = '0;
    endcase
    return p;
  endfunction

  // p * beta mod ip, for p of degree below m.
  function automatic poly_t mul_beta(input int unsigned m, input poly_t ip, input poly_t p);
    poly_t r;
    r = p << 1;
    if ((r & (poly_t'(1) << m)) != '0) r = r ^ ip;
    return r;
  endfunction

  // Reduction table, stored by columns: bit e of entry j is the coefficient of
  // beta^j in beta^(m+e) mod ip, for 0 <= e <= m-2. These are the only powers
  // a product of two field elements can reach above degree m-1, so every
  // reduction network of the design is read from this one table.
  function automatic polyvec_t high_cols(input int unsigned m, input poly_t ip);
    polyvec_t c;
    poly_t    p;
    for (int unsigned j = 0; j < MAX_DEG; j++) c[j] = '0;
    p = (poly_t'(1) << m) ^ ip;                // beta^m mod ip
    for (int unsigned e = 0; e + 1 < m; e++) begin
      for (int unsigned j = 0; j < m; j++) c[j][e] = p[j];
      p = mul_beta(m, ip, p);
    end
    return c;
  endfunction

  // True when ip has degree exactly m and a nonzero constant term, the
  // minimum a field polynomial needs (irreducibility itself is not checked).
  function automatic bit ip_ok(input int unsigned m, input poly_t ip);
    return m >= 1 && m <= MAX_DEG && ip[m] && ip[0] && ((ip >> m) == poly_t'(1));
  endfunction

endpackage
