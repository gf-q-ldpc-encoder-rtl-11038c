// tb_vn_sorter: streams of random couples (with many equal LLRs) into the
// sorter; the content must be the NM smallest in order, equal LLRs in
// arrival order, and count must saturate at NM.
module tb_vn_sorter;
  import gf_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  msg_t in_msg = '0;
  msg_t [NM-1:0] list;
  logic [$clog2(NM+1)-1:0] count;
  int checks = 0, failures = 0;

  vn_sorter #(.NM(NM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int keys [$];
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      keys.delete();
      len = 1 + $urandom % (2 * NM + 8);
      for (int i = 0; i < len; i++) begin
        int v = (t % 2) ? $urandom % 8 : $urandom % 256;
        // key: LLR, then arrival order; the symbol carries the arrival index
        keys.push_back(v * 4096 + i);
        in_valid = 1;
        in_msg.llr = llr_t'(v);
        in_msg.gf = gf_t'(i);
        @(negedge clk);
      end
      in_valid = 0;
      keys.sort();
      checks++;
      if (int'(count) != ((len < NM) ? len : NM)) begin failures++; $display("FAIL count %0d for %0d inputs", count, len); end
      for (int k = 0; k < NM && k < len; k++) begin
        checks++;
        if (int'(list[k].llr) != keys[k] / 4096 || int'(list[k].gf) != (keys[k] % 4096) % GF_Q) begin
          failures++;
          if (failures < 10) $display("FAIL test %0d slot %0d: %0d/%0d", t, k, list[k].llr, list[k].gf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
