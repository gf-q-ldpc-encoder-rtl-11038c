// cnp: check node processor for a check of degree DC.
//
// From the DC incoming messages A_0..A_{DC-1} (symbols already multiplied
// by the parity-check entries) it computes for every edge k the message
// E_k = sum of all A_j with j != k, with the elementary check node (ecn)
// as the two-input operator. Three rows of DC-2 ECNs, as in the document's
// check node figure: a forward row F_k = F_{k-1} + A_k (F_0 = A_0), a
// backward row B_k = B_{k+1} + A_k (B_{DC-1} = A_{DC-1}) and a merge row
// E_k = F_{k-1} + B_{k+1}; E_0 = B_1 and E_{DC-1} = F_{DC-2}. Every ECN
// starts as soon as both its operands are ready, so the forward and
// backward rows run side by side and each merge starts as soon as it can.
// The row structure follows the document's figure; its text also names a
// tree-shaped combination, which at DC = 4 has the same depth of two ECN
// stages per output. The self-timed start logic is this design's.
//
// Interface: pulse start with a valid (registered); done pulses when all
// DC outputs in e are valid; they stay until the next start.
module cnp #(
  parameter int DC = gf_pkg::DC,
  parameter int NM = gf_pkg::NM
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  gf_pkg::msg_t [NM-1:0] a [DC],
  output logic                  busy,
  output logic                  done,
  output gf_pkg::msg_t [NM-1:0] e [DC]
);
  import gf_pkg::*;

  localparam int R = DC - 2;   // ECNs per row

  msg_t [NM-1:0] a_q [DC];
  msg_t [NM-1:0] f_out [1:R];
  msg_t [NM-1:0] b_out [1:R];
  msg_t [NM-1:0] m_out [1:R];
  logic [R:1] f_done, b_done, m_done, f_busy, b_busy, m_busy;
  logic [R:1] f_rdy, b_rdy, m_rdy, m_go;
  logic       go;

  for (genvar k = 1; k <= R; k++) begin : g_row
    // forward
    logic f_start;
    assign f_start = (k == 1) ? go : f_done[(k == 1) ? 1 : k - 1];
    ecn #(.NM(NM)) u_f (
      .clk, .rst_n, .start(f_start),
      .a((k == 1) ? a_q[0] : f_out[(k == 1) ? 1 : k - 1]), .b(a_q[k]),
      .busy(f_busy[k]), .done(f_done[k]), .e(f_out[k]));
    // backward
    logic b_start;
    assign b_start = (k == R) ? go : b_done[(k == R) ? R : k + 1];
    ecn #(.NM(NM)) u_b (
      .clk, .rst_n, .start(b_start),
      .a((k == R) ? a_q[DC-1] : b_out[(k == R) ? R : k + 1]), .b(a_q[k]),
      .busy(b_busy[k]), .done(b_done[k]), .e(b_out[k]));
    // merge: F_{k-1} + B_{k+1}
    logic left_rdy, right_rdy;
    assign left_rdy  = (k == 1) ? 1'b1 : f_rdy[(k == 1) ? 1 : k - 1];
    assign right_rdy = (k == R) ? 1'b1 : b_rdy[(k == R) ? R : k + 1];
    assign m_go[k]   = busy && left_rdy && right_rdy && !m_rdy[k] && !m_busy[k] && !m_done[k];
    ecn #(.NM(NM)) u_m (
      .clk, .rst_n, .start(m_go[k]),
      .a((k == 1) ? a_q[0] : f_out[(k == 1) ? 1 : k - 1]),
      .b((k == R) ? a_q[DC-1] : b_out[(k == R) ? R : k + 1]),
      .busy(m_busy[k]), .done(m_done[k]), .e(m_out[k]));
  end

  always_comb begin
    e[0]    = b_out[1];
    e[DC-1] = f_out[R];
    for (int k = 1; k <= R; k++) e[k] = m_out[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go <= 1'b0; busy <= 1'b0; done <= 1'b0;
      f_rdy <= '0; b_rdy <= '0; m_rdy <= '0;
      for (int k = 0; k < DC; k++) a_q[k] <= '0;
    end else begin
      go   <= 1'b0;
      done <= 1'b0;
      if (start) begin
        for (int k = 0; k < DC; k++) a_q[k] <= a[k];
        go    <= 1'b1;
        busy  <= 1'b1;
        f_rdy <= '0; b_rdy <= '0; m_rdy <= '0;
      end else if (busy) begin
        f_rdy <= f_rdy | f_done;
        b_rdy <= b_rdy | b_done;
        m_rdy <= m_rdy | m_done;
        if (&(f_rdy | f_done) && &(b_rdy | b_done) && &(m_rdy | m_done)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
