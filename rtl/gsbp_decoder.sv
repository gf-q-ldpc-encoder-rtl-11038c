// gsbp_decoder: non-binary LDPC decoder over GF(64) with a shuffled
// (check-by-check) belief propagation schedule and truncated min-sum
// messages.
//
// The code is the (2,4)-regular code of gf_pkg: N = 2*M_CHK symbols,
// M_CHK checks of degree 4, every symbol in two checks. Messages are lists
// of NM (LLR, symbol) couples. One check node processor (cnp) serves four
// variable node units (vn_unit), one per edge of the check being
// processed, as in the document's top-level figure. For each check i in
// turn (one group), the control unit
//   1. VN:  forms V2C_k = intrinsic(j_k) + C2V(other edge of j_k) in the
//           four vn_units (the C2V of the other check is the most recent
//           one, so every update is used at once by the following groups);
//   2. CN:  multiplies the V2C symbols by h_ik (Form), runs the cnp;
//   3. WB:  divides the results by h_ik (Form*) and stores them as the new
//           C2V messages of check i;
//   4. DEC: adds V2C_k and the new C2V_k in the vn_units again; the most
//           reliable symbol is the new hard decision of j_k.
// After all M_CHK checks (one iteration) the syndrome H*x is evaluated one
// check per cycle. Decoding stops when it is zero or after KMAX
// iterations. Before a check has produced a C2V message the variable node
// passes the intrinsic message through.
// The memories, the Form/Form* placement, the CN/VN split and the
// iteration count follow the document; the sequential schedule of the four
// steps, the decision step and the stop rule are this design's.
//
// Interface. Loading: the intrinsic messages arrive as a stream of (LLR,
// GF) couples, NM per symbol in symbol order, in_first marking the first
// couple of a symbol (directly from llr_gen). When the last couple of
// symbol N-1 has been written, decoding starts; in_ready is low until it
// ends. Result: done pulses; success tells whether the syndrome was zero,
// iters the number of iterations run; dec_data is the decided symbol at
// dec_addr.
module gsbp_decoder #(
  parameter int M_CHK  = gf_pkg::M_CHK,
  parameter int NM     = gf_pkg::NM,
  parameter int KMAX   = gf_pkg::KMAX,
  parameter int OFFSET = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // intrinsic message stream
  input  logic                      in_valid,
  input  logic                      in_first,
  input  gf_pkg::llr_t              in_llr,
  input  gf_pkg::gf_t               in_gf,
  output logic                      in_ready,
  // result
  output logic                      done,
  output logic                      success,
  output logic [7:0]                iters,
  input  logic [$clog2(2*M_CHK)-1:0] dec_addr,
  output gf_pkg::gf_t               dec_data
);
  import gf_pkg::*;

  localparam int N  = 2 * M_CHK;
  localparam int E  = 4 * M_CHK;
  localparam int SW = $clog2(N);
  localparam int CW = $clog2(M_CHK);
  localparam int EW = $clog2(E);
  localparam int KW = $clog2(NM);

  // ---------------- parity-check tables (built at elaboration) ----------
  function automatic logic [E*SW-1:0] col_table();
    logic [E*SW-1:0] t;
    for (int e = 0; e < E; e++) t[e*SW +: SW] = SW'(h_col(e / 4, e % 4, M_CHK));
    return t;
  endfunction
  function automatic logic [E*GF_M-1:0] coef_table();
    logic [E*GF_M-1:0] t;
    for (int e = 0; e < E; e++) t[e*GF_M +: GF_M] = h_coef(e / 4, e % 4);
    return t;
  endfunction
  function automatic logic [E*EW-1:0] other_table();
    logic [E*EW-1:0] t;
    for (int e = 0; e < E; e++) t[e*EW +: EW] = EW'(other_edge(e, M_CHK));
    return t;
  endfunction
  localparam logic [E*SW-1:0]   COL_TAB   = col_table();
  localparam logic [E*GF_M-1:0] COEF_TAB  = coef_table();
  localparam logic [E*EW-1:0]   OTHER_TAB = other_table();

  // ---------------- memories ----------------
  msg_t [NM-1:0] llr_mem [N];     // LLR memory (intrinsic messages)
  msg_t [NM-1:0] c2v_mem [E];     // C2V memory, one list per edge
  logic [E-1:0]  c2v_ok;          // the edge has a C2V message
  msg_t [NM-1:0] v2c_q [DC];      // V2C memory of the four VN lanes
  gf_t           dec_mem [N];     // hard decisions

  assign dec_data = dec_mem[dec_addr];

  // ---------------- control unit ----------------
  typedef enum logic [3:0] {
    S_LOAD, S_VN_GO, S_VN_WAIT, S_CN_GO, S_CN_WAIT, S_WB, S_DEC_WAIT,
    S_NEXT, S_SYN, S_END
  } state_t;
  state_t state;

  logic [CW-1:0] chk;         // check (group) being processed
  logic [7:0]    iter;
  logic          syn_bad;
  logic [SW-1:0] ld_sym;
  logic [KW-1:0] ld_k;
  logic          ld_any;         // a couple of this frame has arrived
  logic [DC-1:0] vn_seen;

  // edges and columns of the current check
  logic [EW-1:0] edge_k  [DC];
  logic [EW-1:0] oedge_k [DC];
  logic [SW-1:0] col_k   [DC];
  gf_t           h_k     [DC];
  always_comb
    for (int k = 0; k < DC; k++) begin
      edge_k[k]  = EW'(chk) * EW'(4) + EW'(k);
      oedge_k[k] = OTHER_TAB[edge_k[k]*EW +: EW];
      col_k[k]   = COL_TAB[edge_k[k]*SW +: SW];
      h_k[k]     = COEF_TAB[edge_k[k]*GF_M +: GF_M];
    end

  // ---------------- CN ----------------
  logic          cn_start, cn_busy_unused, cn_done;
  msg_t [NM-1:0] cn_a [DC];
  msg_t [NM-1:0] cn_e [DC];

  // ---------------- VN lanes ----------------
  logic          vn_start;
  logic          vn_dec;           // decision pass
  logic [DC-1:0] vn_done;
  msg_t [NM-1:0] vn_out  [DC];
  msg_t [NM-1:0] c2v_new [DC];

  for (genvar k = 0; k < DC; k++) begin : g_vn
    logic vn_busy_unused;
    msg_t [NM-1:0] l_in, v_in, cn_in;
    logic          vv_in;
    always_comb begin
      l_in  = vn_dec ? v2c_q[k]   : llr_mem[col_k[k]];
      v_in  = vn_dec ? c2v_new[k] : c2v_mem[oedge_k[k]];
      vv_in = vn_dec ? 1'b1       : c2v_ok[oedge_k[k]];
    end
    vn_unit #(.NM(NM), .OFFSET(OFFSET)) u_vn (
      .clk, .rst_n, .start(vn_start), .l_msg(l_in), .v_msg(v_in), .v_valid(vv_in),
      .busy(vn_busy_unused), .done(vn_done[k]), .out_msg(vn_out[k]));
    // Form: V2C symbols times h_ik on the way to the check node
    msg_form #(.NM(NM)) u_form (.in_msg(v2c_q[k]), .h(h_k[k]), .inv(1'b0), .out_msg(cn_in));
    // Form*: C2V symbols divided by h_ik on the way back
    msg_form #(.NM(NM)) u_form_inv (.in_msg(cn_e[k]), .h(h_k[k]), .inv(1'b1), .out_msg(c2v_new[k]));
    assign cn_a[k] = cn_in;
  end

  // ---------------- CN ----------------
  cnp #(.DC(DC), .NM(NM)) u_cnp (
    .clk, .rst_n, .start(cn_start), .a(cn_a), .busy(cn_busy_unused), .done(cn_done), .e(cn_e));

  // ---------------- syndrome of check chk ----------------
  gf_t syn;
  always_comb begin
    syn = '0;
    for (int k = 0; k < DC; k++) syn ^= gf_mul(h_k[k], dec_mem[col_k[k]]);
  end

  assign in_ready = (state == S_LOAD);

  // ---------------- memory writes (no reset: every entry is written
  // before it is read; C2V entries are only used once c2v_ok is set) ----
  logic [SW-1:0] ld_s;
  logic [KW-1:0] ld_kk;
  logic          ld_we, dec_we, c2v_we;
  always_comb begin
    ld_kk  = in_first ? '0 : ld_k;
    ld_s   = in_first ? (ld_any ? ld_sym + 1'b1 : '0) : ld_sym;
    ld_we  = (state == S_LOAD) && in_valid;
    dec_we = (state == S_VN_WAIT) && vn_dec && &(vn_seen | vn_done);
    c2v_we = (state == S_WB);
  end

  always_ff @(posedge clk) begin
    if (ld_we) llr_mem[ld_s][ld_kk] <= '{llr: in_llr, gf: in_gf};
  end

  always_ff @(posedge clk) begin
    if (c2v_we) for (int k = 0; k < DC; k++) c2v_mem[edge_k[k]] <= c2v_new[k];
  end

  // hard decisions: the most reliable intrinsic symbol at load time, then
  // the result of every decision pass
  always_ff @(posedge clk) begin
    if (ld_we && ld_kk == '0) dec_mem[ld_s] <= in_gf;
    if (dec_we) for (int k = 0; k < DC; k++) dec_mem[col_k[k]] <= vn_out[k][0].gf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD; chk <= '0; iter <= '0; syn_bad <= 1'b0;
      ld_sym <= '0; ld_k <= '0; ld_any <= 1'b0; vn_seen <= '0;
      vn_start <= 1'b0; vn_dec <= 1'b0; cn_start <= 1'b0;
      done <= 1'b0; success <= 1'b0; iters <= '0;
      c2v_ok <= '0;
      for (int k = 0; k < DC; k++) v2c_q[k] <= '0;
    end else begin
      vn_start <= 1'b0;
      cn_start <= 1'b0;
      done     <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          ld_sym <= ld_s;
          ld_k   <= ld_kk + 1'b1;
          ld_any <= 1'b1;
          if (ld_s == SW'(N - 1) && ld_kk == KW'(NM - 1)) begin
            c2v_ok <= '0;
            chk    <= '0;
            iter   <= '0;
            state  <= S_VN_GO;
          end
        end
        S_VN_GO: begin
          vn_dec   <= 1'b0;
          vn_start <= 1'b1;
          vn_seen  <= '0;
          state    <= S_VN_WAIT;
        end
        S_VN_WAIT: begin
          automatic logic [DC-1:0] seen = vn_seen | vn_done;
          vn_seen <= seen;
          if (&seen) begin
            // vn_out holds after done, so all lanes are read together
            if (!vn_dec) for (int k = 0; k < DC; k++) v2c_q[k] <= vn_out[k];
            state <= vn_dec ? S_NEXT : S_CN_GO;
          end
        end
        S_CN_GO: begin
          cn_start <= 1'b1;
          state    <= S_CN_WAIT;
        end
        S_CN_WAIT: if (cn_done) state <= S_WB;
        S_WB: begin
          for (int k = 0; k < DC; k++) c2v_ok[edge_k[k]] <= 1'b1;
          vn_dec   <= 1'b1;
          vn_start <= 1'b1;
          vn_seen  <= '0;
          state    <= S_VN_WAIT;
        end
        S_NEXT: begin
          if (chk == CW'(M_CHK - 1)) begin
            chk     <= '0;
            syn_bad <= 1'b0;
            state   <= S_SYN;
          end else begin
            chk   <= chk + 1'b1;
            state <= S_VN_GO;
          end
        end
        S_SYN: begin
          automatic logic bad = syn_bad || (syn != '0);
          syn_bad <= bad;
          if (chk == CW'(M_CHK - 1)) begin
            chk <= '0;
            if (!bad || iter == 8'(KMAX - 1)) begin
              success <= !bad;
              iters   <= iter + 1'b1;
              state   <= S_END;
            end else begin
              iter  <= iter + 1'b1;
              state <= S_VN_GO;
            end
          end else chk <= chk + 1'b1;
        end
        default: begin   // S_END
          done            <= 1'b1;
          ld_sym          <= '0;
          ld_k            <= '0;
          ld_any          <= 1'b0;
          state           <= S_LOAD;
        end
      endcase
    end
  end
endmodule
