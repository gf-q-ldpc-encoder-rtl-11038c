// tb_ldpc_encoder: encodes random frames of K = 80 GF(64) symbols and
// compares the codeword stream with a polynomial long division by
// g(x) = x^K + sum eps_i x^i done in the testbench. Also checks the
// message/parity flags, the frame end marker and the frame duration.
module tb_ldpc_encoder;
  import gf_pkg::*;
  localparam int M = GF_M, K = K_SYM, D = 2, T = (M + D - 1) / D;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_ready;
  logic [M-1:0] in_sym = '0;
  logic out_valid, out_parity, out_last;
  logic [M-1:0] out_sym;
  int checks = 0, failures = 0;

  ldpc_encoder #(.M(M), .K(K), .D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] eps(input int i);
    return M'(1 + ((13 * i + 5) % ((1 << M) - 1)));
  endfunction

  logic [M-1:0] msg [K];
  logic [M-1:0] expct [2*K];
  int ocount;
  int t_first, t_last, cyc;
  always @(posedge clk) cyc++;

  // monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_sym != expct[ocount] || out_parity != (ocount >= K) || out_last != (ocount == 2*K-1)) begin
      failures++;
      if (failures < 10) $display("FAIL symbol %0d: got %0d p=%0b l=%0b, expected %0d", ocount, out_sym, out_parity, out_last, expct[ocount]);
    end
    if (out_last) t_last = cyc;
    ocount++;
  end

  initial begin
    logic [M-1:0] rem [2*K];
    logic [M-1:0] q;
    for (int f = 0; f < 3; f++) begin
      // reference: remainder of m(x) x^K mod g(x); m_0 is the highest power
      for (int i = 0; i < K; i++) msg[i] = M'($urandom);
      if (f == 0) for (int i = 0; i < K; i++) msg[i] = '0;
      for (int i = 0; i < 2*K; i++) rem[i] = (i < K) ? msg[i] : '0;   // index 0 = x^(2K-1)
      for (int i = 0; i < K; i++) begin
        q = rem[i];
        // subtract q * g(x) aligned at x^(2K-1-i); g_K = 1, g_j = eps_j
        rem[i] = '0;
        for (int j = 0; j < K; j++) rem[i + K - j] ^= gf_mul_m(8'(q), 8'(eps(j)), M)[M-1:0];
      end
      for (int i = 0; i < K; i++) expct[i] = msg[i];
      for (int i = 0; i < K; i++) expct[K + i] = rem[K + i];
      ocount = 0;
      if (f == 0) begin repeat (2) @(posedge clk); rst_n = 1; end
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_sym = msg[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (i == 0) t_first = cyc;
        @(negedge clk);
        in_valid = 0;
        // idle gaps on the input must not matter
        if (f > 0 && $urandom % 4 == 0) repeat ($urandom % 5) @(negedge clk);
      end
      wait (ocount == 2*K);
      checks++;
      if (f == 0 && t_last - t_first != K * (T + 2) + K + 1) begin
        failures++;
        $display("FAIL frame took %0d cycles, expected %0d", t_last - t_first, K * (T + 2) + K + 1);
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
