// tb_gsbp_iterations: average number of decoding iterations and frame
// errors of the (2,4)-regular GF(64) decoder over a sweep of noise levels.
//
// The document reports how the average number of iterations drops with
// layered decoding; this testbench measures that average on the built
// decoder. Codewords come from a Gaussian elimination of H done here; every
// symbol's six bits become samples +-8 plus Gaussian noise of standard
// deviation sigma times the amplitude, quantised to 6 bits; the intrinsic
// list is found by scoring all 64 symbols and sorting, and streamed in.
// For rate 1/2 with BPSK, Eb/N0 = 1 / sigma^2, so the three levels are
// about 4.2, 3.0 and 2.0 dB. Checks per frame: the success flag agrees
// with a syndrome computed here and the iteration count lies in 1..KMAX
// (KMAX on failure). A frame that converges to another codeword (an
// undetected error, possible at high noise) is counted as a frame error.
// Over the sweep: every frame at the lowest noise decodes to the codeword
// sent, and the average iteration count does not fall as the noise rises.
module tb_gsbp_iterations;
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
    repeat (20000000) @(posedge clk);
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

  localparam int LEVELS = 3, FRAMES = 24;
  localparam real SIGMA [LEVELS] = '{0.62, 0.71, 0.79};

  initial begin
    int x [N], y [N];
    bit ok;
    int nit, sum_it [LEVELS], fer [LEVELS], und [LEVELS];
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_h();
    for (int l = 0; l < LEVELS; l++) begin
      sum_it[l] = 0;
      fer[l]    = 0;
      und[l]    = 0;
      for (int f = 0; f < FRAMES; f++) begin
        codeword(x, 1'b0);
        run_frame(x, SIGMA[l], ok, nit, y);
        checks++;
        if (ok != syndrome_zero(y)) begin failures++; $display("FAIL success flag %0b disagrees with syndrome", ok); end
        checks++;
        if (nit < 1 || nit > KMAX || (!ok && nit != KMAX)) begin failures++; $display("FAIL iteration count %0d", nit); end
        sum_it[l] += nit;
        if (!ok) fer[l]++;
        else if (y != x) begin
          fer[l]++;
          und[l]++;
        end
      end
      $display("sigma %0.2f (Eb/N0 %0.1f dB): average iterations %0.2f, frame errors %0d of %0d (undetected %0d)",
               SIGMA[l], 10.0 * $log10(1.0 / (SIGMA[l] * SIGMA[l])),
               real'(sum_it[l]) / FRAMES, fer[l], FRAMES, und[l]);
    end
    checks++;
    if (fer[0] != 0) begin failures++; $display("FAIL frames lost at the lowest noise"); end
    for (int l = 1; l < LEVELS; l++) begin
      checks++;
      if (sum_it[l] < sum_it[l-1]) begin failures++; $display("FAIL average iterations fell as noise rose"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
