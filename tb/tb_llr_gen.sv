// tb_llr_gen: checks the LLR generator in two configurations, GF(16) with
// NM = 10 (including the sample sequence -7, 8, 12, -3 of the document's
// timing diagram) and GF(64) with NM = 16. For random samples the expected
// list is worked out by scoring all 2^M symbols and sorting: the LLR
// sequence must match exactly, every symbol must be distinct and carry its
// own LLR. The latency (M cycles from start_in to start_out) is checked.
module tb_llr_gen;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- GF(16), NM = 10 ----------------
  logic s16, l16, so16, ov16; logic signed [5:0] y16; logic [7:0] ol16; logic [3:0] og16;
  llr_gen #(.M(4), .NM(10), .Y_W(6), .LLR_W(8)) dut16 (
    .clk, .rst_n, .start_in(s16), .load_y(l16), .y(y16),
    .start_out(so16), .out_valid(ov16), .out_llr(ol16), .out_gf(og16));
  // ---------------- GF(64), NM = 16 ----------------
  logic s64, l64, so64, ov64; logic signed [5:0] y64; logic [7:0] ol64; logic [5:0] og64;
  llr_gen #(.M(6), .NM(16), .Y_W(6), .LLR_W(8)) dut64 (
    .clk, .rst_n, .start_in(s64), .load_y(l64), .y(y64),
    .start_out(so64), .out_valid(ov64), .out_llr(ol64), .out_gf(og64));

  int cyc;
  always @(posedge clk) cyc++;

  // cost of symbol x given samples
  function automatic int cost(input int x, input int m, input int ys [8]);
    int c = 0;
    for (int i = 0; i < m; i++) begin
      bit bit_x = x[m-1-i];
      bit hard  = (ys[i] >= 0);
      if (bit_x != hard) c += (ys[i] < 0) ? -ys[i] : ys[i];
    end
    return c;
  endfunction

  // expected sorted LLRs
  function automatic void ref_list(input int m, input int nm, input int ys [8], output int r [16]);
    int all [$];
    int q = 1 << m;
    for (int x = 0; x < q; x++) all.push_back(cost(x, m, ys));
    all.sort();
    for (int i = 0; i < nm; i++) r[i] = all[i];
  endfunction

  task automatic run16(input int ys [8], input int gap, input bit fig);
    int r [16];
    int t0, n;
    bit seen [16];
    int fig_llr [10] = '{0, 3, 7, 8, 10, 11, 12, 15, 15, 18};
    ref_list(4, 10, ys, r);
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      s16 = (i == 0); l16 = 1; y16 = 6'(ys[i]);
      if (i == 0) t0 = cyc;
      @(negedge clk);
    end
    s16 = 0; l16 = 0; y16 = '0;
    while (!so16) @(negedge clk);
    checks++;
    if (cyc - t0 != 4) begin failures++; $display("FAIL GF16 latency %0d", cyc - t0); end
    n = 0;
    while (n < 10) begin
      checks++;
      if (!ov16 || ol16 != 8'(r[n]) || seen[og16] || cost(int'(og16), 4, ys) != int'(ol16) ||
          (fig && ol16 != 8'(fig_llr[n]))) begin
        failures++;
        if (failures < 10) $display("FAIL GF16 entry %0d: v=%0b llr=%0d gf=%0d expected llr %0d", n, ov16, ol16, og16, r[n]);
      end
      seen[og16] = 1;
      n++;
      @(negedge clk);
    end
    checks++;
    if (ov16) begin failures++; $display("FAIL GF16 emitted more than NM couples"); end
    repeat (gap) @(negedge clk);
  endtask

  task automatic run64(input int ys [8]);
    int r [16];
    int t0, n;
    bit seen [64];
    ref_list(6, 16, ys, r);
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      s64 = (i == 0); l64 = 1; y64 = 6'(ys[i]);
      if (i == 0) t0 = cyc;
      @(negedge clk);
    end
    s64 = 0; l64 = 0; y64 = '0;
    while (!so64) @(negedge clk);
    checks++;
    if (cyc - t0 != 6) begin failures++; $display("FAIL GF64 latency %0d", cyc - t0); end
    n = 0;
    while (n < 16) begin
      checks++;
      if (!ov64 || ol64 != 8'(r[n]) || seen[og64] || cost(int'(og64), 6, ys) != int'(ol64)) begin
        failures++;
        if (failures < 10) $display("FAIL GF64 entry %0d: llr=%0d gf=%0d expected llr %0d", n, ol64, og64, r[n]);
      end
      seen[og64] = 1;
      n++;
      @(negedge clk);
    end
  endtask

  initial begin
    int ys [8];
    s16 = 0; l16 = 0; y16 = '0; s64 = 0; l64 = 0; y64 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the document's example symbol
    ys = '{-7, 8, 12, -3, 0, 0, 0, 0};
    run16(ys, 0, 1);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 8; i++) ys[i] = int'($urandom % 63) - 31;
      if (t % 7 == 0) for (int i = 0; i < 8; i++) ys[i] = int'($urandom % 5) - 2;  // many ties
      run16(ys, $urandom % 3, 0);
      run64(ys);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
