// tb_gsbp_decoder: decodes random codewords of the (2,4)-regular GF(64)
// code sent over a simulated BPSK/AWGN channel.
//
// Codewords come from a Gaussian elimination of H done here. Every symbol's
// six bits become samples +-8 plus Gaussian noise, quantised to 6 bits;
// the intrinsic list is found by scoring all 64 symbols and sorting, and
// streamed into the decoder. Checks: success is reported exactly when the
// decided word has a zero syndrome (computed here), a successful frame
// equals the codeword sent, a noiseless frame decodes in one iteration,
// the iteration count never exceeds KMAX and a hopeless frame runs all
// KMAX iterations.
module tb_gsbp_decoder;
  import gf_pkg::*;
  localparam int MC = M_CHK, N = 2 * MC, E = 4 * MC, NMX = NM;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_ready, done, success;
  llr_t in_llr = '0;
  gf_t  in_gf = '0;
  logic [7:0] iters;
  logic [$clog2(N)-1:0] dec_addr = '0;
  gf_t dec_data;
  int checks = 0, failures = 0;

  gsbp_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int H [MC][N];
  int R [MC][N];
  int pcol [MC];
  int nrank;
  bit is_piv [N];

  task automatic build_h();
    foreach (H[i, j]) H[i][j] = 0;
    for (int i = 0; i < MC; i++)
      for (int k = 0; k < 4; k++) H[i][h_col(i, k, MC)] = int'(h_coef(i, k));
    R = H;
    nrank = 0;
    foreach (is_piv[j]) is_piv[j] = 0;
    for (int c = 0; c < N && nrank < MC; c++) begin
      int p = -1;
      for (int r = nrank; r < MC; r++) if (R[r][c] != 0) begin p = r; break; end
      if (p < 0) continue;
      for (int j = 0; j < N; j++) begin int t = R[p][j]; R[p][j] = R[nrank][j]; R[nrank][j] = t; end
      begin
        gf_t inv = gf_inv(gf_t'(R[nrank][c]));
        for (int j = 0; j < N; j++) R[nrank][j] = int'(gf_mul(gf_t'(R[nrank][j]), inv));
      end
      for (int r = 0; r < MC; r++) if (r != nrank && R[r][c] != 0) begin
        gf_t f = gf_t'(R[r][c]);
        for (int j = 0; j < N; j++) R[r][j] ^= int'(gf_mul(f, gf_t'(R[nrank][j])));
      end
      pcol[nrank] = c;
      is_piv[c] = 1;
      nrank++;
    end
  endtask

  function automatic void codeword(output int x [N], input bit zero);
    for (int j = 0; j < N; j++) x[j] = (is_piv[j] || zero) ? 0 : int'($urandom % GF_Q);
    for (int r = 0; r < nrank; r++) begin
      int s = 0;
      for (int j = 0; j < N; j++) if (!is_piv[j]) s ^= int'(gf_mul(gf_t'(R[r][j]), gf_t'(x[j])));
      x[pcol[r]] = s;
    end
  endfunction

  function automatic bit syndrome_zero(input int x [N]);
    for (int i = 0; i < MC; i++) begin
      int s = 0;
      for (int j = 0; j < N; j++) if (H[i][j] != 0) s ^= int'(gf_mul(gf_t'(H[i][j]), gf_t'(x[j])));
      if (s != 0) return 0;
    end
    return 1;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // sends one frame, returns the decoder's verdict
  task automatic run_frame(input int x [N], input real sigma, output bit ok, output int nit, output int y [N]);
    int samp [GF_M];
    for (int j = 0; j < N; j++) begin
      int sc [$];
      int sy [$];
      for (int b = 0; b < GF_M; b++) begin
        real v = (x[j] >> (GF_M - 1 - b)) & 1 ? 8.0 : -8.0;
        int q;
        v = v + 8.0 * sigma * gauss();
        q = int'(v);
        if (q > 31) q = 31;
        if (q < -31) q = -31;
        samp[b] = q;
      end
      // score all symbols, order by score (ties by symbol value)
      for (int s = 0; s < GF_Q; s++) begin
        int c = 0;
        for (int b = 0; b < GF_M; b++)
          if (((s >> (GF_M - 1 - b)) & 1) != (samp[b] >= 0 ? 1 : 0)) c += samp[b] < 0 ? -samp[b] : samp[b];
        sc.push_back(c * 64 + s);
      end
      sc.sort();
      for (int k = 0; k < NMX; k++) begin
        @(negedge clk);
        in_valid = 1; in_first = (k == 0);
        in_llr = llr_t'(sc[k] / 64); in_gf = gf_t'(sc[k] % 64);
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0;
    while (!done) @(negedge clk);
    ok = success;
    nit = int'(iters);
    for (int j = 0; j < N; j++) begin
      dec_addr = ($clog2(N))'(j);
      #1;
      y[j] = int'(dec_data);
    end
  endtask

  initial begin
    int x [N], y [N];
    bit ok;
    int nit, multi = 0, fails = 0;
    real sig;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_h();
    $display("H rank %0d of %0d checks", nrank, MC);
    for (int f = 0; f < 8; f++) begin
      sig = (f == 0) ? 0.0 : (f == 7) ? 1.6 : 0.62;   // Eb/N0 about 4.2 dB for the middle frames
      codeword(x, f == 1);
      checks++;
      if (!syndrome_zero(x)) begin failures++; $display("FAIL testbench codeword"); end
      run_frame(x, sig, ok, nit, y);
      $display("frame %0d: success=%0b iterations=%0d", f, ok, nit);
      checks++;
      if (ok != syndrome_zero(y)) begin failures++; $display("FAIL success flag %0b disagrees with syndrome", ok); end
      checks++;
      if (nit < 1 || nit > KMAX || (!ok && nit != KMAX)) begin failures++; $display("FAIL iteration count %0d", nit); end
      if (f < 7) begin
        checks++;
        if (!ok || y != x) begin failures++; $display("FAIL frame %0d not decoded to the codeword sent", f); end
      end
      if (f == 0) begin
        checks++;
        if (nit != 1) begin failures++; $display("FAIL noiseless frame took %0d iterations", nit); end
      end
      if (ok && nit > 1) multi++;
      if (!ok) fails++;
    end
    checks++;
    if (multi == 0) begin failures++; $display("FAIL no frame needed more than one iteration"); end
    checks++;
    if (fails == 0) begin failures++; $display("FAIL the hopeless frame was decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
