// gf_pkg: shared constants, message type and arithmetic for the non-binary
// LDPC codec.
//
// The codec works over GF(2^m). The field size GF(64) (m = 6), the
// (2,4)-regular code with N = 160 symbols (960 bits) and M = 80 checks, the
// 10 decoding iterations and the message length nm follow the document.
// The primitive polynomials, LLR word width and the parity-check matrix
// below are this design's own choices: the document does not print them.
//
// Parity-check matrix. Check i (0 <= i < M) has dc = 4 edges k = 0..3:
//   k = 0 -> column i                 k = 1 -> column M + i
//   k = 2 -> column (i + H_S1) mod M  k = 3 -> column M + (i + H_S2) mod M
// so every column is hit exactly twice (dv = 2) and, with H_S1 != +-H_S2,
// no two checks share two columns (no 4-cycles). The non-zero entry of
// edge e = 4*i + k is h = 1 + ((37*e + 11) mod (q-1)).
package gf_pkg;

  // ---------------- field and code sizes ----------------
  localparam int GF_M    = 6;                 // GF(64)
  localparam int GF_Q    = 1 << GF_M;
  localparam int LLR_W   = 8;                 // unsigned LLR, saturating
  localparam int Y_W     = 6;                 // signed channel sample
  localparam int NM      = 16;                // entries kept per message
  localparam int DV      = 2;
  localparam int DC      = 4;
  localparam int M_CHK   = 80;                // check nodes
  localparam int N_SYM   = 2 * M_CHK;         // code symbols (960 bits)
  localparam int K_SYM   = N_SYM - M_CHK;     // information symbols
  localparam int KMAX    = 10;                // decoding iterations
  localparam int H_S1    = 7;
  localparam int H_S2    = 13;
  localparam logic [LLR_W-1:0] LLR_MAX = '1;

  typedef logic [GF_M-1:0]  gf_t;
  typedef logic [LLR_W-1:0] llr_t;

  // One (LLR, GF symbol) couple of a truncated message.
  typedef struct packed {
    llr_t llr;
    gf_t  gf;
  } msg_t;

  // ---------------- GF(2^m) arithmetic ----------------
  // Primitive polynomial for m = 2..8, with the x^m term.
  function automatic logic [8:0] prim_poly(input int m);
    case (m)
      2: return 9'h007;   // x^2+x+1
      3: return 9'h00B;   // x^3+x+1
      4: return 9'h013;   // x^4+x+1
      5: return 9'h025;   // x^5+x^2+1
      6: return 9'h043;   // x^6+x+1
      7: return 9'h089;   // x^7+x^3+1
      default: return 9'h11D; // x^8+x^4+x^3+x^2+1
    endcase
  endfunction

  // Shift-and-add product of a and b in GF(2^m), m <= 8.
  function automatic logic [7:0] gf_mul_m(input logic [7:0] a, input logic [7:0] b, input int m);
    logic [8:0] p;
    logic [8:0] aa;
    p  = '0;
    aa = {1'b0, a};
    for (int i = 0; i < m; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa << 1;
      if (aa[m]) aa = aa ^ prim_poly(m);
    end
    return p[7:0];
  endfunction

  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [7:0] r;
    r = gf_mul_m(8'(a), 8'(b), GF_M);
    return r[GF_M-1:0];
  endfunction

  // Inverse by a^(q-2); the inverse of 0 is returned as 0.
  function automatic gf_t gf_inv(input gf_t a);
    gf_t r;
    r = gf_t'(1);
    for (int i = 0; i < GF_Q - 2; i++) r = gf_mul(r, a);
    return r;
  endfunction

  // Table of inverses, built at elaboration.
  function automatic logic [GF_Q*GF_M-1:0] gf_inv_table();
    logic [GF_Q*GF_M-1:0] t;
    t = '0;
    for (int a = 0; a < GF_Q; a++) t[a*GF_M +: GF_M] = gf_inv(gf_t'(a));
    return t;
  endfunction
  localparam logic [GF_Q*GF_M-1:0] GF_INV_TAB = gf_inv_table();

  function automatic gf_t gf_div(input gf_t a, input gf_t b);
    return gf_mul(a, GF_INV_TAB[b*GF_M +: GF_M]);
  endfunction

  // Saturating LLR sum.
  function automatic llr_t llr_add(input llr_t a, input llr_t b);
    logic [LLR_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[LLR_W] ? LLR_MAX : s[LLR_W-1:0];
  endfunction

  // ---------------- parity-check matrix ----------------
  function automatic int h_col(input int i, input int k, input int m_chk);
    case (k)
      0: return i;
      1: return m_chk + i;
      2: return (i + H_S1) % m_chk;
      default: return m_chk + (i + H_S2) % m_chk;
    endcase
  endfunction

  function automatic gf_t h_coef(input int i, input int k);
    return gf_t'(1 + ((37 * (4 * i + k) + 11) % (GF_Q - 1)));
  endfunction

  // The other edge of the column reached by edge e = 4*i + k (dv = 2).
  function automatic int other_edge(input int e, input int m_chk);
    int i, k;
    i = e / 4;
    k = e % 4;
    case (k)
      0: return ((i - H_S1 + m_chk) % m_chk) * 4 + 2;
      2: return ((i + H_S1) % m_chk) * 4 + 0;
      1: return ((i - H_S2 + m_chk) % m_chk) * 4 + 3;
      default: return ((i + H_S2) % m_chk) * 4 + 1;
    endcase
  endfunction

endpackage
