// tb_cnp: the check node processor for DC = 4 on random sorted messages.
// The expected outputs come from a software elementary check node applied
// in the same forward/backward/merge order (E_k = F_{k-1} + B_{k+1}). It
// also checks, without truncation effects, that E_k's most reliable symbol
// is the sum of the other inputs' most reliable symbols, and that the
// forward and backward rows overlap in time.
module tb_cnp;
  import gf_pkg::*;
  localparam int N = NM, D = DC;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  msg_t [N-1:0] a [D];
  msg_t [N-1:0] e [D];
  int checks = 0, failures = 0;

  cnp #(.DC(D), .NM(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic msg_t [N-1:0] rand_msg(input int spread);
    msg_t [N-1:0] m;
    int perm [GF_Q];
    int v = 0;
    foreach (perm[i]) perm[i] = i;
    perm.shuffle();
    for (int i = 0; i < N; i++) begin
      if (i > 0) v += $urandom % spread;
      m[i].llr = llr_t'(v > 255 ? 255 : v);
      m[i].gf  = gf_t'(perm[i]);
    end
    return m;
  endfunction

  // software ECN: per-symbol minimum of all sums, sorted, NM kept; equal
  // LLRs resolved like the hardware scan (row, then column order)
  function automatic msg_t [N-1:0] sw_ecn(input msg_t [N-1:0] x, input msg_t [N-1:0] y);
    msg_t [N-1:0] r;
    int p [N];
    bit used [GF_Q];
    int k = 0;
    foreach (used[i]) used[i] = 0;
    foreach (p[i]) p[i] = 0;
    while (k < N) begin
      int bi = -1, bs = 0;
      for (int i = 0; i < N; i++) if (p[i] < N) begin
        int s = int'(x[i].llr) + int'(y[p[i]].llr);
        if (s > 255) s = 255;
        if (bi < 0 || s < bs) begin bi = i; bs = s; end
      end
      if (bi < 0) break;
      begin
        int g = int'(x[bi].gf ^ y[p[bi]].gf);
        if (!used[g]) begin
          used[g] = 1;
          r[k].llr = llr_t'(bs);
          r[k].gf = gf_t'(g);
          k++;
        end
      end
      p[bi]++;
    end
    return r;
  endfunction

  int overlap;
  always @(posedge clk) if (dut.f_busy[1] && dut.b_busy[D-2]) overlap++;

  initial begin
    msg_t [N-1:0] f [D];
    msg_t [N-1:0] bk [D];
    msg_t [N-1:0] ex [D];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      for (int k = 0; k < D; k++) a[k] = rand_msg(t % 4 == 0 ? 2 : 25);
      f[0] = a[0];
      for (int k = 1; k <= D - 2; k++) f[k] = sw_ecn(f[k-1], a[k]);
      bk[D-1] = a[D-1];
      for (int k = D - 2; k >= 1; k--) bk[k] = sw_ecn(bk[k+1], a[k]);
      ex[0] = bk[1];
      ex[D-1] = f[D-2];
      for (int k = 1; k <= D - 2; k++) ex[k] = sw_ecn(f[k-1], bk[k+1]);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int k = 0; k < D; k++) begin
        automatic gf_t g0 = '0;
        for (int j = 0; j < D; j++) if (j != k) g0 ^= a[j][0].gf;
        checks++;
        if (e[k][0].gf != g0 || e[k][0].llr != 0) begin
          failures++;
          if (failures < 10) $display("FAIL test %0d E%0d head %0d, expected %0d", t, k, e[k][0].gf, g0);
        end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (e[k][i] != ex[k][i]) begin
            failures++;
            if (failures < 10) $display("FAIL test %0d E%0d[%0d] = %0d/%0d, expected %0d/%0d", t, k, i, e[k][i].llr, e[k][i].gf, ex[k][i].llr, ex[k][i].gf);
          end
        end
      end
    end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL forward and backward rows never ran together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
