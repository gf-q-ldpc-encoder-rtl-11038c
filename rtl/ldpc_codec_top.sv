// ldpc_codec_top: GF(64) LDPC transmit and receive chains.
//
// Transmit side: the systematic shift-register encoder (ldpc_encoder)
// turns K = 80 message symbols into a 160-symbol codeword stream.
// Receive side: the channel samples of each received symbol (six, one
// per bit) enter the LLR generator (llr_gen), whose list of the NM most
// likely symbols is written straight into the decoder's LLR memory
// (gsbp_decoder); after 160 symbols the decoder runs and its decisions
// can be read out. Modulation and the channel lie between the two sides
// and are not part of this design.
// The two chains follow the document's system model. The document prints
// neither the encoder's generator coefficients nor the decoder's
// parity-check matrix; the ones chosen here (see ldpc_encoder and gf_pkg)
// do not define the same code, so only the zero codeword is common to both.
//
// Interface: enc_* is the encoder's message and codeword streams; rx_*
// is the sample input of the LLR generator (rx_start with the first of a
// symbol's six samples, rx_load during all six; a new symbol at most every
// NM + 1 cycles and only while dec_in_ready is high); dec_* is the
// decoder's result port.
module ldpc_codec_top (
  input  logic                      clk,
  input  logic                      rst_n,
  // encoder
  input  logic                      enc_in_valid,
  input  logic                      enc_in_first,
  input  logic [gf_pkg::GF_M-1:0]   enc_in_sym,
  output logic                      enc_in_ready,
  output logic                      enc_out_valid,
  output logic [gf_pkg::GF_M-1:0]   enc_out_sym,
  output logic                      enc_out_parity,
  output logic                      enc_out_last,
  // received samples
  input  logic                      rx_start,
  input  logic                      rx_load,
  input  logic signed [gf_pkg::Y_W-1:0] rx_y,
  // decoder
  output logic                      dec_in_ready,
  output logic                      dec_done,
  output logic                      dec_success,
  output logic [7:0]                dec_iters,
  input  logic [$clog2(gf_pkg::N_SYM)-1:0] dec_addr,
  output logic [gf_pkg::GF_M-1:0]   dec_data
);
  import gf_pkg::*;

  ldpc_encoder #(.M(GF_M), .K(K_SYM)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_first(enc_in_first), .in_sym(enc_in_sym), .in_ready(enc_in_ready),
    .out_valid(enc_out_valid), .out_sym(enc_out_sym), .out_parity(enc_out_parity), .out_last(enc_out_last));

  logic llr_first, llr_valid;
  llr_t llr_val;
  gf_t  llr_gf;
  llr_gen #(.M(GF_M), .NM(NM), .Y_W(Y_W), .LLR_W(LLR_W)) u_llr (
    .clk, .rst_n, .start_in(rx_start), .load_y(rx_load), .y(rx_y),
    .start_out(llr_first), .out_valid(llr_valid), .out_llr(llr_val), .out_gf(llr_gf));

  gsbp_decoder #(.M_CHK(M_CHK), .NM(NM), .KMAX(KMAX)) u_dec (
    .clk, .rst_n,
    .in_valid(llr_valid), .in_first(llr_first), .in_llr(llr_val), .in_gf(llr_gf), .in_ready(dec_in_ready),
    .done(dec_done), .success(dec_success), .iters(dec_iters), .dec_addr(dec_addr), .dec_data(dec_data));
endmodule
