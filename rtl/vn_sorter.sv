// vn_sorter: keeps the NM smallest of a stream of (LLR, GF) couples in
// increasing LLR order.
//
// Used by the variable node to order its candidate sums. Each cycle with
// in_valid one couple is inserted: every stored couple with a larger LLR
// moves one place down and the new couple takes the freed place; a couple
// larger than all NM stored ones is dropped once the sorter is full. Equal
// LLRs keep arrival order. The document's sorter merges the stream through
// stages of paired FIFOs and minimum selectors; this design uses this
// single-stage insertion register instead, which gives the same sorted
// list.
//
// Interface: clear empties the sorter; list/count give the content, valid
// from the cycle after the last insertion.
module vn_sorter #(
  parameter int NM = gf_pkg::NM
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  gf_pkg::msg_t           in_msg,
  output gf_pkg::msg_t [NM-1:0]  list,
  output logic [$clog2(NM+1)-1:0] count
);
  import gf_pkg::*;

  logic [NM-1:0] gt;   // stored entry k is larger than the new couple
  always_comb
    for (int k = 0; k < NM; k++)
      gt[k] = (32'(k) >= 32'(count)) || (list[k].llr > in_msg.llr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      list  <= '0;
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < NM; k++) begin
        if (gt[k]) begin
          if (k == 0 || !gt[k-1]) list[k] <= in_msg;   // insertion point
          else                    list[k] <= list[k-1];
        end
      end
      if (32'(count) < NM) count <= count + 1'b1;
    end
  end
endmodule
