// gf_mul_karatsuba: digit-serial Karatsuba multiplier in GF(2^M).
//
// C = A * B mod F(x), F the primitive polynomial of gf_pkg::prim_poly(M).
// A is consumed D bits per clock, most significant digit first; B is held
// in parallel. Each cycle the digit A_t is split at H = D/2 into A0t (low)
// and A1t (high) and B at the same bit into B0 and B1, and three small
// carry-less products are formed, as in the three-multiplier Karatsuba
// structure of the document:
//   C0 += A0t*B0,  C1 += (A0t+A1t)*(B0+B1),  C2 += A1t*B1
// Each partial product is added into its own accumulator after the
// accumulator is shifted left by D bits ("Shift" and <Ci> registers).
// After T = ceil(M/D) digits the reconstruction C2*x^2H + (C1+C0+C2)*x^H
// + C0 forms the full 2M-1 bit product, which "Mod F(x)" reduces to M bits.
// The three-branch structure and reduction follow the document's figure;
// the digit size, the MSB-first digit order and reducing only once at the
// end (the reconstruction is therefore 2M-1 bits wide, not M+D) are this
// design's choices.
//
// Interface: pulse start with a and b valid; busy is high for T cycles;
// done pulses on the cycle after the last digit and c then holds the
// product until the next start.
module gf_mul_karatsuba #(
  parameter int M = 6,   // field GF(2^M), 2 <= M <= 8
  parameter int D = 2    // digit size, even, 2 <= D <= M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  import gf_pkg::*;

  localparam int T  = (M + D - 1) / D;   // digits per operand
  localparam int AP = T * D;             // padded width of A
  localparam int H  = D / 2;             // Karatsuba split point
  localparam int AW = AP + M;            // accumulator width
  localparam int CW = $clog2(T + 1);

  initial begin
    assert (D >= 2 && D % 2 == 0 && D <= M) else $error("D must be even and in 2..M");
  end

  // carry-less product of two short polynomials
  function automatic logic [15:0] clmul(input logic [7:0] x, input logic [7:0] y);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (y[i]) p = p ^ (16'(x) << i);
    return p;
  endfunction

  logic [AP-1:0] a_sh;
  logic [M-1:0]  b_q;
  logic [AW-1:0] acc0, acc1, acc2;
  logic [CW-1:0] cnt;

  // current digit and operand halves
  logic [D-1:0]   at;
  logic [7:0]     a0t, a1t, b0, b1;
  logic [15:0]    p0, p1, p2;
  always_comb begin
    at  = a_sh[AP-1 -: D];
    a0t = 8'(at[H-1:0]);
    a1t = 8'(at[D-1:H]);
    b0  = 8'(b_q[H-1:0]);
    b1  = 8'(b_q[M-1:H]);
    p0  = clmul(a0t, b0);
    p1  = clmul(a0t ^ a1t, b0 ^ b1);
    p2  = clmul(a1t, b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sh <= '0; b_q <= '0; acc0 <= '0; acc1 <= '0; acc2 <= '0;
      cnt  <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_sh <= AP'(a);
        b_q  <= b;
        acc0 <= '0; acc1 <= '0; acc2 <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc0 <= (acc0 << D) ^ AW'(p0);
        acc1 <= (acc1 << D) ^ AW'(p1);
        acc2 <= (acc2 << D) ^ AW'(p2);
        a_sh <= a_sh << D;
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(T - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // reconstruction and reduction modulo F(x)
  logic [AW+2*H-1:0] full;
  logic [AW+2*H-1:0] r;
  always_comb begin
    full = (AW+2*H)'(acc2) << (2*H);
    full = full ^ ((AW+2*H)'(acc1) << H) ^ ((AW+2*H)'(acc0) << H) ^ ((AW+2*H)'(acc2) << H);
    full = full ^ (AW+2*H)'(acc0);
    r = full;
    for (int i = AW + 2*H - 1; i >= M; i--)
      if (r[i]) r = r ^ ((AW+2*H)'(prim_poly(M)) << (i - M));
    c = r[M-1:0];
  end
endmodule
