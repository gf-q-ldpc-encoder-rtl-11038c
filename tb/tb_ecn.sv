// tb_ecn: random sorted input messages through the elementary check node.
// The expected result is formed by listing all NM x NM sums, keeping the
// smallest LLR of every symbol and sorting: the LLR sequence must match,
// every output symbol must be distinct and carry its smallest sum. Checks
// the run length against NM plus the discarded duplicates bound.
module tb_ecn;
  import gf_pkg::*;
  localparam int N = NM;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  msg_t [N-1:0] a, b, e;
  int checks = 0, failures = 0;

  ecn #(.NM(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  initial begin
    int best [GF_Q];
    int srt [$];
    int cyc;
    bit seen [GF_Q];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      a = rand_msg((t % 3 == 0) ? 2 : 40);
      b = rand_msg((t % 5 == 0) ? 3 : 30);
      foreach (best[x]) best[x] = 1 << 20;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          automatic int s = int'(a[i].llr) + int'(b[j].llr);
          automatic int x = int'(a[i].gf ^ b[j].gf);
          if (s > 255) s = 255;
          if (s < best[x]) best[x] = s;
        end
      srt.delete();
      foreach (best[x]) if (best[x] < (1 << 20)) srt.push_back(best[x]);
      srt.sort();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc < N + 1 || cyc > N * N + 1) begin failures++; $display("FAIL run of %0d cycles", cyc); end
      foreach (seen[x]) seen[x] = 0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(e[k].llr) != srt[k] || seen[e[k].gf] || int'(e[k].llr) != best[e[k].gf]) begin
          failures++;
          if (failures < 10) $display("FAIL test %0d entry %0d: llr %0d gf %0d, expected llr %0d", t, k, e[k].llr, e[k].gf, srt[k]);
        end
        seen[e[k].gf] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
