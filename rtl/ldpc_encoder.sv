// ldpc_encoder: systematic shift-register encoder over GF(2^M).
//
// The codeword of K message symbols m_0..m_{K-1} is the K message symbols
// followed by K parity symbols P (rate 1/2). The parity is the remainder
// of m(x)*x^K divided by g(x) = x^K + sum eps_i x^i, formed by the
// division register of the document's encoder figure: a chain of K
// symbol registers R_0..R_{K-1} with an adder between each pair; the
// feedback symbol fb = m + R_{K-1} is multiplied by every coefficient
// eps_i and added into the chain. While the message is entered (Enable = 1)
// the output multiplexer passes the message symbols; afterwards the
// feedback is forced to 0 and the registers shift the parity out, R_{K-1}
// first. The K multipliers are the digit-serial Karatsuba multipliers, so
// each message symbol occupies the encoder for ceil(M/D) + 2 clock cycles.
// The structure follows the document; the coefficients eps_i, the stream
// handshake and emitting the message before the parity are this design's
// choices.
//
// Interface: in_valid/in_ready stream of message symbols, first symbol
// flagged by in_first; out_valid/out_sym stream of the N = 2K codeword
// symbols, out_parity high for the parity part, out_last on the final one.
module ldpc_encoder #(
  parameter int M = gf_pkg::GF_M,
  parameter int K = gf_pkg::K_SYM,
  parameter int D = 2,
  parameter logic [M*K-1:0] EPS = default_eps()
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic [M-1:0] in_sym,
  output logic         in_ready,
  output logic         out_valid,
  output logic [M-1:0] out_sym,
  output logic         out_parity,
  output logic         out_last
);
  // eps_i = 1 + ((13*i + 5) mod (2^M - 1)), never zero
  function automatic logic [M*K-1:0] default_eps();
    logic [M*K-1:0] e;
    for (int i = 0; i < K; i++) e[i*M +: M] = M'(1 + ((13 * i + 5) % ((1 << M) - 1)));
    return e;
  endfunction

  typedef enum logic [1:0] {S_MSG, S_MUL, S_PAR} state_t;
  state_t state;

  logic [M-1:0] r_q [K];
  logic [M-1:0] prod [K];
  logic [K-1:0] mdone;
  logic [M-1:0] fb;
  logic         mul_start;
  logic [$clog2(K+1)-1:0] cnt;

  assign in_ready  = (state == S_MSG);
  assign fb        = in_sym ^ r_q[K-1];
  assign mul_start = in_valid && in_ready;

  for (genvar g = 0; g < K; g++) begin : g_mul
    logic busy_unused;
    gf_mul_karatsuba #(.M(M), .D(D)) u_mul (
      .clk(clk), .rst_n(rst_n), .start(mul_start), .a(fb), .b(EPS[g*M +: M]),
      .busy(busy_unused), .done(mdone[g]), .c(prod[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_MSG;
      cnt        <= '0;
      out_valid  <= 1'b0;
      out_sym    <= '0;
      out_parity <= 1'b0;
      out_last   <= 1'b0;
      for (int i = 0; i < K; i++) r_q[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      case (state)
        S_MSG: if (in_valid) begin
          if (in_first) begin
            // a new frame: clear the division register, fb uses R = 0
            for (int i = 0; i < K; i++) r_q[i] <= '0;
            cnt <= '0;
          end
          out_valid  <= 1'b1;      // message symbol passes straight out
          out_sym    <= in_sym;
          out_parity <= 1'b0;
          state      <= S_MUL;
        end
        S_MUL: if (mdone[0]) begin
          r_q[0] <= prod[0];
          for (int i = 1; i < K; i++) r_q[i] <= r_q[i-1] ^ prod[i];
          if (cnt == ($clog2(K+1))'(K - 1)) begin
            cnt   <= '0;
            state <= S_PAR;
          end else begin
            cnt   <= cnt + 1'b1;
            state <= S_MSG;
          end
        end
        default: begin             // S_PAR: feedback forced to 0, shift out
          out_valid  <= 1'b1;
          out_sym    <= r_q[K-1];
          out_parity <= 1'b1;
          r_q[0]     <= '0;
          for (int i = 1; i < K; i++) r_q[i] <= r_q[i-1];
          if (cnt == ($clog2(K+1))'(K - 1)) begin
            out_last <= 1'b1;
            cnt      <= '0;
            state    <= S_MSG;
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end
endmodule
