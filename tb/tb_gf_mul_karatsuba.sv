// tb_gf_mul_karatsuba: exhaustive check of the digit-serial Karatsuba
// multiplier in GF(64) with 2-bit digits against a bit-serial shift-and-add
// reference product; also checks that done comes ceil(M/D) cycles after
// start.
module tb_gf_mul_karatsuba;
  import gf_pkg::*;
  localparam int M = 6, D = 2, T = (M + D - 1) / D;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] a, b, c;
  int checks = 0, failures = 0;

  gf_mul_karatsuba #(.M(M), .D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref_c;
    int lat;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int x = 0; x < (1 << M); x++) begin
      for (int y = 0; y < (1 << M); y++) begin
        @(negedge clk);
        a = M'(x); b = M'(y); start = 1;
        @(negedge clk);
        start = 0; a = '1; b = '1;   // operands are held inside
        lat = 1;
        while (!done) begin @(negedge clk); lat++; end
        ref_c = gf_mul_m(8'(x), 8'(y), M);
        checks++;
        if (c != ref_c[M-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d, expected %0d", x, y, c, ref_c);
        end
        checks++;
        if (lat != T + 1) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d, expected %0d", lat, T + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
