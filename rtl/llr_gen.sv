// llr_gen: intrinsic message generator for one GF(2^M) symbol.
//
// The M channel samples y_0..y_{M-1} of a symbol (one per bit, y_0 the
// most significant bit, a positive sample meaning bit 1) enter one per
// cycle. A chain of M processing elements (llr_pe) builds, bit by bit, the
// list of the NM most likely symbols in increasing order of
// LLR(x) = sum over the bits where x differs from the hard decision of
// |y_i|, so the most likely symbol has LLR 0 and all LLRs are >= 0.
// PE c receives L(c-1) from PE c-1 (L(0) is the single empty prefix with
// LLR 0) and uses sample y_{c-1}, which is on the input in the cycle its
// first couple arrives. The chain structure and the list arithmetic follow
// the document; the sample format and the bit order are this design's.
//
// Timing: start_in pulses with y_0, load_y stays high for the M samples.
// start_out pulses M cycles after start_in with the first (LLR, GF) couple;
// the NM couples follow on consecutive cycles with out_valid high. A new
// symbol may start NM cycles or more after the previous one (the
// document's timing diagram uses NM + 1, one initialisation cycle).
module llr_gen #(
  parameter int M     = gf_pkg::GF_M,
  parameter int NM    = gf_pkg::NM,
  parameter int Y_W   = gf_pkg::Y_W,
  parameter int LLR_W = gf_pkg::LLR_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_in,
  input  logic                  load_y,
  input  logic signed [Y_W-1:0] y,
  output logic                  start_out,
  output logic                  out_valid,
  output logic [LLR_W-1:0]      out_llr,
  output logic [M-1:0]          out_gf
);
  logic             v [M+1];
  logic             f [M+1];
  logic [LLR_W-1:0] l [M+1];
  logic [M-1:0]     g [M+1];

  // L(0) = (0, empty prefix)
  assign v[0] = start_in;
  assign f[0] = start_in;
  assign l[0] = '0;
  assign g[0] = '0;

  for (genvar c = 1; c <= M; c++) begin : g_pe
    llr_pe #(.C(c), .M(M), .NM(NM), .Y_W(Y_W), .LLR_W(LLR_W)) u_pe (
      .clk(clk), .rst_n(rst_n),
      .in_valid(v[c-1]), .in_first(f[c-1]), .in_llr(l[c-1]), .in_gf(g[c-1]),
      .y(y),
      .out_valid(v[c]), .out_first(f[c]), .out_llr(l[c]), .out_gf(g[c])
    );
  end

  assign start_out = f[M];
  assign out_valid = v[M];
  assign out_llr   = l[M];
  assign out_gf    = g[M];

  // y_{c-1} must be present when PE c starts
  a_load: assert property (@(posedge clk) disable iff (!rst_n) start_in |-> load_y);
endmodule
