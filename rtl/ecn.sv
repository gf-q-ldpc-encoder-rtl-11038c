// ecn: elementary check node of the extended min-sum check node.
//
// Given two messages A and B, each NM (LLR, GF) couples sorted by
// increasing LLR, the output E holds the NM most reliable distinct symbols
// of A + B: couples (A[i].llr + B[j].llr, A[i].gf xor B[j].gf) in increasing
// LLR order, a symbol that is already in E being discarded (redundancy
// elimination). The document names this unit and its function only. This
// design scans the NM x NM sum matrix with one bubble per row of A: bubble
// i points at column p[i], all bubbles are compared each cycle, the
// smallest is examined and its row pointer advances. One candidate is
// examined per cycle, so a run takes NM cycles plus one per discarded
// duplicate (at most NM*NM). Ties go to the lower row.
//
// Interface: pulse start with a and b valid (they are registered); busy
// stays high during the run; done pulses when e holds the NM couples,
// which stay until the next start.
module ecn #(
  parameter int NM = gf_pkg::NM
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  gf_pkg::msg_t [NM-1:0]  a,
  input  gf_pkg::msg_t [NM-1:0]  b,
  output logic                   busy,
  output logic                   done,
  output gf_pkg::msg_t [NM-1:0]  e
);
  import gf_pkg::*;

  localparam int PW = $clog2(NM + 1);
  localparam int IW = $clog2(NM);

  msg_t [NM-1:0] a_q, b_q;
  logic [PW-1:0] p [NM];
  logic [PW-1:0] ocnt;

  // smallest bubble
  logic          found;
  logic [IW-1:0] imin;
  llr_t          smin;
  gf_t           gmin;
  logic          dup;
  llr_t          s;
  always_comb begin
    s     = '0;
    found = 1'b0;
    imin  = '0;
    smin  = LLR_MAX;
    for (int i = 0; i < NM; i++) begin
      if (p[i] < PW'(NM)) begin
        s = llr_add(a_q[i].llr, b_q[p[i][IW-1:0]].llr);
        if (!found || s < smin) begin
          found = 1'b1;
          smin  = s;
          imin  = IW'(i);
        end
      end
    end
    gmin = a_q[imin].gf ^ b_q[p[imin][IW-1:0]].gf;
    dup  = 1'b0;
    for (int k = 0; k < NM; k++)
      if (PW'(k) < ocnt && e[k].gf == gmin) dup = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; e <= '0; ocnt <= '0; busy <= 1'b0; done <= 1'b0;
      for (int i = 0; i < NM; i++) p[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q  <= a;
        b_q  <= b;
        ocnt <= '0;
        busy <= 1'b1;
        for (int i = 0; i < NM; i++) p[i] <= '0;
      end else if (busy) begin
        if (found) p[imin] <= p[imin] + 1'b1;
        if (found && !dup) begin
          e[ocnt[IW-1:0]] <= '{llr: smin, gf: gmin};
          ocnt <= ocnt + 1'b1;
        end
        if (!found || (!dup && ocnt == PW'(NM - 1))) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
