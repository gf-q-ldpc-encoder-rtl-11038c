// msg_form: the Form / Form* permutation between the message memories and
// the check node.
//
// A V2C message travels from variable node j to check node i as a list of
// NM (LLR, GF) couples. Before the check node its symbols are multiplied
// by the non-zero parity-check entry h_ij (Form), and the check node's
// answer is divided by h_ij on the way back (Form*), so that the check
// node only has to add symbols. Multiplication keeps the list order, as it
// only relabels symbols. The function and placement follow the document;
// this design does it with a combinational GF(2^m) multiplier per couple,
// the divide being a multiply by the inverse from a constant table.
//
// Interface: combinational; inv = 0 multiplies by h, inv = 1 divides.
module msg_form #(
  parameter int NM = gf_pkg::NM
) (
  input  gf_pkg::msg_t [NM-1:0] in_msg,
  input  gf_pkg::gf_t           h,
  input  logic                  inv,
  output gf_pkg::msg_t [NM-1:0] out_msg
);
  import gf_pkg::*;
  gf_t f;
  always_comb begin
    f = inv ? GF_INV_TAB[h*GF_M +: GF_M] : h;
    for (int i = 0; i < NM; i++) begin
      out_msg[i].llr = in_msg[i].llr;
      out_msg[i].gf  = gf_mul(in_msg[i].gf, f);
    end
  end
endmodule
