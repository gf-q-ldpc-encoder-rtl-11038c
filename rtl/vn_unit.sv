// vn_unit: variable node update for a degree-2 variable node.
//
// Adds two truncated messages, the intrinsic list L (from the LLR
// memory) and the check-to-variable list V, symbol by symbol, and returns
// the NM most reliable sums in increasing order. A symbol missing from a
// truncated list is given that list's offset value, the LLR of its last
// (least reliable) entry plus OFFSET. The walk has the document's two
// stages: stage 1 visits every entry of L and adds the V entry with the
// same symbol when there is one (Match) or the offset Y_V; stage 2 visits
// only the entries of V whose symbol is absent from L (found by a priority
// encoder that yields the next index) and adds the offset Y_L. Every sum
// goes to the sorter (vn_sorter). The result is normalised so that its
// first LLR is 0. When v_valid is low (no check-to-variable message yet,
// first iteration) V counts as all zeros and L is passed through.
// The two-stage walk with its matching and offsets follows the document;
// OFFSET, the normalisation and the handshake are this design's choices.
//
// Interface: pulse start with l_msg, v_msg, v_valid valid (registered);
// done pulses 2 + NM + max(1, number of unmatched V entries) cycles later
// with out_msg valid; out_msg holds until the next start.
module vn_unit #(
  parameter int NM = gf_pkg::NM,
  parameter int OFFSET = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  gf_pkg::msg_t [NM-1:0] l_msg,
  input  gf_pkg::msg_t [NM-1:0] v_msg,
  input  logic                  v_valid,
  output logic                  busy,
  output logic                  done,
  output gf_pkg::msg_t [NM-1:0] out_msg
);
  import gf_pkg::*;

  localparam int IW = $clog2(NM);

  typedef enum logic [1:0] {S_IDLE, S_STAGE1, S_STAGE2, S_OUT} state_t;
  state_t state;

  msg_t [NM-1:0] l_q, v_q;
  logic          vv_q;
  logic [IW-1:0] idx;
  logic [NM-1:0] v_used;      // V entries matched in stage 1
  llr_t          y_l, y_v;

  // offsets
  always_comb begin
    y_l = llr_add(l_q[NM-1].llr, llr_t'(OFFSET));
    y_v = vv_q ? llr_add(v_q[NM-1].llr, llr_t'(OFFSET)) : '0;
  end

  // stage 1: find the V entry matching L[idx]
  logic          match;
  logic [IW-1:0] mj;
  always_comb begin
    match = 1'b0;
    mj    = '0;
    for (int j = NM - 1; j >= 0; j--)
      if (vv_q && v_q[j].gf == l_q[idx].gf) begin
        match = 1'b1;
        mj    = IW'(j);
      end
  end

  // stage 2: next unmatched V entry at or after idx (i_next)
  logic          have_next, have_after;
  logic [IW-1:0] i_next;
  always_comb begin
    have_next = 1'b0;
    i_next    = '0;
    for (int j = NM - 1; j >= 0; j--)
      if (32'(j) >= 32'(idx) && !v_used[j]) begin
        have_next = 1'b1;
        i_next    = IW'(j);
      end
    have_after = 1'b0;
    for (int j = 0; j < NM; j++)
      if (32'(j) > 32'(i_next) && !v_used[j]) have_after = 1'b1;
  end

  // candidate sum LLRV(S_m) and its symbol GF(S_m)
  logic cand_valid;
  msg_t cand;
  always_comb begin
    cand_valid = 1'b0;
    cand       = '0;
    if (state == S_STAGE1) begin
      cand_valid = 1'b1;
      cand.gf    = l_q[idx].gf;
      cand.llr   = llr_add(l_q[idx].llr, match ? v_q[mj].llr : y_v);
    end else if (state == S_STAGE2 && have_next) begin
      cand_valid = 1'b1;
      cand.gf    = v_q[i_next].gf;
      cand.llr   = llr_add(y_l, v_q[i_next].llr);
    end
  end

  msg_t [NM-1:0] srt;
  logic [$clog2(NM+1)-1:0] srt_n;
  vn_sorter #(.NM(NM)) u_sorter (
    .clk, .rst_n, .clear(start), .in_valid(cand_valid), .in_msg(cand),
    .list(srt), .count(srt_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; l_q <= '0; v_q <= '0; vv_q <= 1'b0; idx <= '0;
      v_used <= '0; busy <= 1'b0; done <= 1'b0; out_msg <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          l_q    <= l_msg;
          v_q    <= v_msg;
          vv_q   <= v_valid;
          idx    <= '0;
          v_used <= v_valid ? '0 : '1;
          busy   <= 1'b1;
          state  <= S_STAGE1;
        end
        S_STAGE1: begin
          if (match) v_used[mj] <= 1'b1;
          if (idx == IW'(NM - 1)) begin
            idx   <= '0;
            state <= S_STAGE2;
          end else idx <= idx + 1'b1;
        end
        S_STAGE2: begin
          if (!have_next || !have_after) state <= S_OUT;
          else idx <= i_next + 1'b1;
        end
        default: begin   // S_OUT: normalise
          for (int k = 0; k < NM; k++) begin
            out_msg[k].gf  <= srt[k].gf;
            out_msg[k].llr <= srt[k].llr - srt[0].llr;
          end
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
