// tb_ldpc_codec_top: end-to-end run of the codec at its full size
// (GF(64), K = 80, N = 160, NM = 16, KMAX = 10).
//
// 1. Encoder: random and zero messages; every codeword symbol is checked
//    against a polynomial long division done here.
// 2. The zero codeword produced by the encoder is sent over a simulated
//    BPSK/AWGN channel into the receive chain (LLR generator + decoder)
//    and must come back as the encoder's output.
// 3. Random codewords of the decoder's code (found by Gaussian elimination
//    of H) are sent at moderate noise and must be decoded exactly; a frame
//    at very high noise must end unsuccessful after KMAX iterations.
// The samples of a symbol are sent on six consecutive cycles, one symbol
// every NM + 1 cycles as in the document's LLR timing. The testbench counts
// how often each mechanism happened and fails if one never did.
module tb_ldpc_codec_top;
  import gf_pkg::*;
  localparam int MC = M_CHK, N = N_SYM, K = K_SYM;
  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_in_first = 0, enc_in_ready;
  logic [GF_M-1:0] enc_in_sym = '0;
  logic enc_out_valid, enc_out_parity, enc_out_last;
  logic [GF_M-1:0] enc_out_sym;
  logic rx_start = 0, rx_load = 0;
  logic signed [Y_W-1:0] rx_y = '0;
  logic dec_in_ready, dec_done, dec_success;
  logic [7:0] dec_iters;
  logic [$clog2(N)-1:0] dec_addr = '0;
  logic [GF_M-1:0] dec_data;
  int checks = 0, failures = 0;

  ldpc_codec_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_parity, n_llr_l1, n_fifo_full, n_vn_pass, n_vn_offset, n_ecn_dup;
  int n_early, n_limit, n_multi;
  always @(posedge clk) if (rst_n) begin
    if (enc_out_valid && enc_out_parity) n_parity++;
    if (dut.u_llr.g_pe[GF_M].u_pe.out_valid && dut.u_llr.g_pe[GF_M].u_pe.take1) n_llr_l1++;
    if (dut.u_llr.g_pe[GF_M].u_pe.n0 == 3'(NM / 3)) n_fifo_full++;
    if (dut.u_dec.vn_start && !dut.u_dec.vn_dec && !dut.u_dec.g_vn[0].vv_in) n_vn_pass++;
    if (dut.u_dec.g_vn[0].u_vn.cand_valid && dut.u_dec.g_vn[0].u_vn.state == 2'd2) n_vn_offset++;
    if (dut.u_dec.u_cnp.g_row[1].u_f.busy && dut.u_dec.u_cnp.g_row[1].u_f.found &&
        dut.u_dec.u_cnp.g_row[1].u_f.dup) n_ecn_dup++;
  end

  // ---------------- encoder reference ----------------
  function automatic logic [GF_M-1:0] eps(input int i);
    return GF_M'(1 + ((13 * i + 5) % (GF_Q - 1)));
  endfunction

  int enc_cw [2*K];
  int enc_n;
  always @(posedge clk) if (rst_n && enc_out_valid) begin
    if (enc_n < 2*K) enc_cw[enc_n] = int'(enc_out_sym);
    enc_n++;
  end

  task automatic encode(input int msg [K]);
    int rem [2*K];
    int q;
    for (int i = 0; i < 2*K; i++) rem[i] = (i < K) ? msg[i] : 0;
    for (int i = 0; i < K; i++) begin
      q = rem[i];
      rem[i] = 0;
      for (int j = 0; j < K; j++) rem[i + K - j] ^= int'(gf_mul(gf_t'(q), eps(j)));
    end
    enc_n = 0;
    for (int i = 0; i < K; i++) begin
      @(negedge clk);
      enc_in_valid = 1; enc_in_first = (i == 0); enc_in_sym = GF_M'(msg[i]);
      @(posedge clk);
      while (!enc_in_ready) @(posedge clk);
      @(negedge clk);
      enc_in_valid = 0;
    end
    wait (enc_n == 2*K);
    for (int i = 0; i < 2*K; i++) begin
      checks++;
      if (enc_cw[i] != ((i < K) ? msg[i] : rem[i])) begin
        failures++;
        if (failures < 10) $display("FAIL codeword symbol %0d = %0d", i, enc_cw[i]);
      end
    end
  endtask

  // ---------------- decoder code ----------------
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

  function automatic void codeword(output int x [N]);
    for (int j = 0; j < N; j++) x[j] = is_piv[j] ? 0 : int'($urandom % GF_Q);
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

  // channel + receive chain for one frame
  task automatic receive(input int x [N], input real sigma, output bit ok, output int nit, output int y [N]);
    while (!dec_in_ready) @(negedge clk);
    for (int j = 0; j < N; j++) begin
      for (int b = 0; b < GF_M; b++) begin
        real v = ((x[j] >> (GF_M - 1 - b)) & 1) ? 8.0 : -8.0;
        int q;
        v = v + 8.0 * sigma * gauss();
        q = int'(v);
        if (q > 31) q = 31;
        if (q < -31) q = -31;
        @(negedge clk);
        rx_start = (b == 0); rx_load = 1; rx_y = Y_W'(q);
      end
      @(negedge clk);
      rx_start = 0; rx_load = 0; rx_y = '0;
      repeat (NM + 1 - GF_M - 1) @(negedge clk);
    end
    while (!dec_done) @(negedge clk);
    ok = dec_success;
    nit = int'(dec_iters);
    for (int j = 0; j < N; j++) begin
      dec_addr = ($clog2(N))'(j);
      #1;
      y[j] = int'(dec_data);
    end
  endtask

  task automatic check_frame(input string name, input int x [N], input real sigma, input bit expect_ok);
    int y [N];
    bit ok;
    int nit;
    int t0;
    t0 = $time;
    receive(x, sigma, ok, nit, y);
    $display("%s: success=%0b iterations=%0d (%0d cycles)", name, ok, nit, ($time - t0) / 10);
    checks++;
    if (ok != syndrome_zero(y)) begin failures++; $display("FAIL %s: success flag disagrees with syndrome", name); end
    checks++;
    if (nit < 1 || nit > KMAX || (!ok && nit != KMAX)) begin failures++; $display("FAIL %s: iteration count %0d", name, nit); end
    if (expect_ok) begin
      checks++;
      if (!ok || y != x) begin failures++; $display("FAIL %s: not decoded to the word sent", name); end
    end
    if (ok && nit < KMAX) n_early++;
    if (ok && nit > 1) n_multi++;
    if (!ok) n_limit++;
  endtask

  initial begin
    int msg [K];
    int x [N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_h();
    // 1. encoder
    for (int i = 0; i < K; i++) msg[i] = int'($urandom % GF_Q);
    encode(msg);
    for (int i = 0; i < K; i++) msg[i] = 0;
    encode(msg);
    // 2. encoder output through the channel into the receive chain
    for (int j = 0; j < N; j++) x[j] = enc_cw[j];
    check_frame("encoded zero frame", x, 0.62, 1);
    // 3. codewords of the decoder's code
    for (int f = 0; f < 3; f++) begin
      codeword(x);
      check_frame("random codeword", x, (f == 0) ? 0.0 : 0.7, 1);
    end
    codeword(x);
    check_frame("high-noise codeword", x, 1.6, 0);

    $display("mechanisms: parity-out=%0d llr-L1-pick=%0d llr-fifo-full=%0d vn-pass=%0d vn-offset=%0d ecn-dup=%0d early-stop=%0d iter-limit=%0d multi-iter=%0d",
             n_parity, n_llr_l1, n_fifo_full, n_vn_pass, n_vn_offset, n_ecn_dup, n_early, n_limit, n_multi);
    checks++; if (n_parity == 0)    begin failures++; $display("FAIL parity never shifted out"); end
    checks++; if (n_llr_l1 == 0)    begin failures++; $display("FAIL LLR merge never took L1"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("FAIL LLR FIFO never full"); end
    checks++; if (n_vn_pass == 0)   begin failures++; $display("FAIL VN pass-through never used"); end
    checks++; if (n_vn_offset == 0) begin failures++; $display("FAIL VN stage 2 never used"); end
    checks++; if (n_ecn_dup == 0)   begin failures++; $display("FAIL ECN never discarded a duplicate"); end
    checks++; if (n_early == 0)     begin failures++; $display("FAIL no early stop"); end
    checks++; if (n_limit == 0)     begin failures++; $display("FAIL iteration limit never reached"); end
    checks++; if (n_multi == 0)     begin failures++; $display("FAIL no multi-iteration decode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
