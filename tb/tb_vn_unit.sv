// tb_vn_unit: random intrinsic and check-to-variable messages with a
// random number of shared symbols. The expected list scores every symbol
// of either list (a missing symbol gets the list's last LLR), sorts and
// normalises; the LLR sequence must match and each output symbol must carry
// its own score. Also checks the pass-through when no C2V message exists
// yet and the run length 2 + NM + max(1, unmatched V entries).
module tb_vn_unit;
  import gf_pkg::*;
  localparam int N = NM;
  logic clk = 0, rst_n = 0, start = 0, busy, done, v_valid;
  msg_t [N-1:0] l_msg, v_msg, out_msg;
  int checks = 0, failures = 0;

  vn_unit #(.NM(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic msg_t [N-1:0] rand_msg(input int pool, input int spread);
    msg_t [N-1:0] m;
    int perm [$];
    int v = 0;
    for (int i = 0; i < pool; i++) perm.push_back(i);
    perm.shuffle();
    for (int i = 0; i < N; i++) begin
      if (i > 0) v += $urandom % spread;
      m[i].llr = llr_t'(v > 200 ? 200 : v);
      m[i].gf  = gf_t'(perm[i]);
    end
    return m;
  endfunction

  initial begin
    int score [GF_Q];
    bit inl [GF_Q], inv [GF_Q], seen [GF_Q];
    int srt [$];
    int cyc, unmatched, yl, yv, mn;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      // a small symbol pool gives many matches, a large one few
      l_msg = rand_msg((t % 2) ? 20 : GF_Q, 20);
      v_msg = rand_msg((t % 2) ? 20 : GF_Q, 20);
      v_valid = (t % 10 != 3);
      foreach (inl[x]) begin inl[x] = 0; inv[x] = 0; score[x] = -1; end
      for (int i = 0; i < N; i++) begin inl[l_msg[i].gf] = 1; if (v_valid) inv[v_msg[i].gf] = 1; end
      yl = l_msg[N-1].llr;
      yv = v_valid ? int'(v_msg[N-1].llr) : 0;
      unmatched = 0;
      for (int x = 0; x < GF_Q; x++) if (inl[x] || inv[x]) begin
        automatic int lv = yl, vv = yv;
        for (int i = 0; i < N; i++) begin
          if (l_msg[i].gf == gf_t'(x)) lv = l_msg[i].llr;
          if (v_valid && v_msg[i].gf == gf_t'(x)) vv = v_msg[i].llr;
        end
        score[x] = lv + vv > 255 ? 255 : lv + vv;
        if (!inl[x]) unmatched++;
      end
      srt.delete();
      foreach (score[x]) if (score[x] >= 0) srt.push_back(score[x]);
      srt.sort();
      mn = srt[0];
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2 + N + ((unmatched > 0) ? unmatched : 1)) begin
        failures++;
        if (failures < 10) $display("FAIL run of %0d cycles, expected %0d", cyc, 2 + N + unmatched);
      end
      foreach (seen[x]) seen[x] = 0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(out_msg[k].llr) != srt[k] - mn || seen[out_msg[k].gf] || score[out_msg[k].gf] - mn != int'(out_msg[k].llr)) begin
          failures++;
          if (failures < 10) $display("FAIL test %0d entry %0d: %0d/%0d expected llr %0d", t, k, out_msg[k].llr, out_msg[k].gf, srt[k] - mn);
        end
        seen[out_msg[k].gf] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
