// llr_pe: one processing element (PE c) of the LLR generator.
//
// Input is the list L(c-1) of (LLR, prefix) couples for the first c-1 bits
// of a symbol, streamed one couple per cycle in increasing LLR order. The
// element extends every prefix with the next bit c-1 in two ways
// (Expansion): with the hard decision d = sign(y_{c-1}) at unchanged LLR
// (list L0), and with the opposite bit at LLR + |y_{c-1}| (list L1). Each
// list is already sorted, so it is held in a short FIFO (Memorization) and
// a two-input minimum (Merging) pulls the smaller head each cycle, giving
// L(c) in increasing order. When a FIFO is empty the new couple bypasses
// it, so the element adds one cycle of latency. Couples beyond
// NOUT = min(2^c, NM) are never needed and are not emitted; the FIFO
// depths min(2^(c-1), NM/3) and min(2^(c-1), NM/2) are the document's and
// are enough for that (a push into a full FIFO is dropped). Ties go to L0.
// The bypass, the tie rule and the stream signals are this design's.
//
// Interface: in_valid/in_first/in_llr/in_gf carry L(c-1); y is the
// channel sample of bit c-1 and must be valid in the cycle in_first is
// high. out_* carry L(c), registered, one cycle after the matching input.
module llr_pe #(
  parameter int C     = 1,    // position of this element, 1..M
  parameter int M     = 6,    // bits per GF symbol
  parameter int NM    = 16,   // couples kept per symbol
  parameter int Y_W   = 6,
  parameter int LLR_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic [LLR_W-1:0]        in_llr,
  input  logic [M-1:0]            in_gf,
  input  logic signed [Y_W-1:0]   y,
  output logic                    out_valid,
  output logic                    out_first,
  output logic [LLR_W-1:0]        out_llr,
  output logic [M-1:0]            out_gf
);
  localparam int P2   = 1 << (C - 1);
  localparam int NOUT = (2 * P2 < NM) ? 2 * P2 : NM;
  localparam int D0   = (P2 < NM / 3) ? P2 : ((NM / 3 > 0) ? NM / 3 : 1);
  localparam int D1   = (P2 < NM / 2) ? P2 : ((NM / 2 > 0) ? NM / 2 : 1);
  localparam int CW   = $clog2(NOUT + 1);

  typedef struct packed {
    logic [LLR_W-1:0] llr;
    logic [M-1:0]     gf;
  } cpl_t;

  cpl_t fifo0 [D0];
  cpl_t fifo1 [D1];
  logic [$clog2(D0+1)-1:0] n0;
  logic [$clog2(D1+1)-1:0] n1;
  logic [CW-1:0] ocnt;
  logic          d_q;
  logic [Y_W-1:0] mag_q;

  // ---- Expansion ----
  logic           d;
  logic [Y_W-1:0] mag;
  cpl_t           cand0, cand1;
  logic [LLR_W:0] s1;
  always_comb begin
    d     = in_first ? !y[Y_W-1] : d_q;
    mag   = in_first ? (y[Y_W-1] ? Y_W'(-y) : Y_W'(y)) : mag_q;
    s1    = {1'b0, in_llr} + (LLR_W+1)'(mag);
    cand0 = '{llr: in_llr, gf: {in_gf[M-2:0], d}};
    cand1 = '{llr: (s1[LLR_W] ? '1 : s1[LLR_W-1:0]), gf: {in_gf[M-2:0], !d}};
  end

  // ---- Merging ----
  logic [$clog2(D0+1)-1:0] e0;    // occupancy seen this cycle
  logic [$clog2(D1+1)-1:0] e1;
  logic [CW-1:0] ecnt;
  logic   have0, have1, take0, take1, emit;
  cpl_t   h0, h1;
  always_comb begin
    e0    = in_first ? '0 : n0;
    e1    = in_first ? '0 : n1;
    ecnt  = in_first ? '0 : ocnt;
    have0 = (e0 != 0) || in_valid;
    have1 = (e1 != 0) || in_valid;
    h0    = (e0 != 0) ? fifo0[0] : cand0;
    h1    = (e1 != 0) ? fifo1[0] : cand1;
    emit  = (ecnt < CW'(NOUT)) && (have0 || have1);
    take0 = emit && have0 && (!have1 || h0.llr <= h1.llr);
    take1 = emit && !take0;
  end

  // ---- Memorization ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n0 <= '0; n1 <= '0; ocnt <= '0; d_q <= 1'b0; mag_q <= '0;
      out_valid <= 1'b0; out_first <= 1'b0; out_llr <= '0; out_gf <= '0;
      for (int i = 0; i < D0; i++) fifo0[i] <= '0;
      for (int i = 0; i < D1; i++) fifo1[i] <= '0;
    end else begin
      if (in_first) begin
        d_q   <= d;
        mag_q <= mag;
      end
      out_valid <= emit;
      out_first <= emit && (ecnt == 0);
      if (emit) begin
        out_llr <= take0 ? h0.llr : h1.llr;
        out_gf  <= take0 ? h0.gf  : h1.gf;
        ocnt    <= ecnt + 1'b1;
      end else ocnt <= ecnt;
      // FIFO L0: pop the head if it was taken, push the new couple unless it
      // bypassed the empty FIFO
      begin
        automatic int n = int'(e0);
        if (take0 && e0 != 0) begin
          for (int i = 0; i < D0 - 1; i++) fifo0[i] <= fifo0[i+1];
          n = n - 1;
        end
        if (in_valid && !(take0 && e0 == 0) && n < D0) begin
          fifo0[n] <= cand0;
          n = n + 1;
        end
        n0 <= ($clog2(D0+1))'(n);
      end
      begin
        automatic int n = int'(e1);
        if (take1 && e1 != 0) begin
          for (int i = 0; i < D1 - 1; i++) fifo1[i] <= fifo1[i+1];
          n = n - 1;
        end
        if (in_valid && !(take1 && e1 == 0) && n < D1) begin
          fifo1[n] <= cand1;
          n = n + 1;
        end
        n1 <= ($clog2(D1+1))'(n);
      end
    end
  end
endmodule
