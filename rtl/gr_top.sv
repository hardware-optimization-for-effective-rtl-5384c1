// gr_top: the Golomb-Rice encoder family side by side. Four independent
// channels share clock and reset:
//   gr  - original Golomb-Rice code (plain unary prefix), any M >= 2
//   hs  - HSGRC, scheme 1: long prefixes (q = 5..7) re-coded to 2 bits
//   lp  - LPGRC, scheme 2: middle prefixes (q = 2..4) re-coded to 2 bits
//   ebr - EBRGC, scheme 3: q = 2..4 to 2 bits and q = 5..7 to 3 bits
// Each channel has an encoder (value in, code word, length and one-hot
// output-register select out, one clock later) and a decoder (code word and
// length in, value and error flag out, one clock later). The schemes are
// alternatives for different data distributions; no mode switch joins them.
// With the defaults (10-bit values, M = 128) the code words are at most
// 15 (gr), 12 (hs), 15 (lp) and 10 (ebr) bits. The re-coded schemes only
// exist for q = 0..7, so the hs, lp and ebr channels reject at elaboration
// any IN_W and M that do not give q = 0..7 with a power-of-two M; only the
// gr channel is meaningful at other sizes.
module gr_top #(
  parameter int unsigned  IN_W = 10,
  parameter int unsigned  M    = 128,
  localparam int unsigned W_GR = gr_pkg::gr_maxw(gr_pkg::SCHEME_GR,    IN_W, M),
  localparam int unsigned W_HS = gr_pkg::gr_maxw(gr_pkg::SCHEME_HSGRC, IN_W, M),
  localparam int unsigned W_LP = gr_pkg::gr_maxw(gr_pkg::SCHEME_LPGRC, IN_W, M),
  localparam int unsigned W_EB = gr_pkg::gr_maxw(gr_pkg::SCHEME_EBRGC, IN_W, M),
  localparam int unsigned L_GR = gr_pkg::gr_lw(W_GR),
  localparam int unsigned L_HS = gr_pkg::gr_lw(W_HS),
  localparam int unsigned L_LP = gr_pkg::gr_lw(W_LP),
  localparam int unsigned L_EB = gr_pkg::gr_lw(W_EB)
) (
  input  logic            clk,
  input  logic            rst_n,
  // original GR
  input  logic            gr_enc_valid_i,
  input  logic [IN_W-1:0] gr_enc_n_i,
  output logic            gr_enc_valid_o,
  output logic [W_GR-1:0] gr_enc_word_o,
  output logic [L_GR-1:0] gr_enc_len_o,
  output logic [W_GR:0]   gr_enc_sel_o,
  input  logic            gr_dec_valid_i,
  input  logic [W_GR-1:0] gr_dec_word_i,
  input  logic [L_GR-1:0] gr_dec_len_i,
  output logic            gr_dec_valid_o,
  output logic [IN_W-1:0] gr_dec_n_o,
  output logic            gr_dec_err_o,
  // HSGRC, scheme 1
  input  logic            hs_enc_valid_i,
  input  logic [IN_W-1:0] hs_enc_n_i,
  output logic            hs_enc_valid_o,
  output logic [W_HS-1:0] hs_enc_word_o,
  output logic [L_HS-1:0] hs_enc_len_o,
  output logic [W_HS:0]   hs_enc_sel_o,
  input  logic            hs_dec_valid_i,
  input  logic [W_HS-1:0] hs_dec_word_i,
  input  logic [L_HS-1:0] hs_dec_len_i,
  output logic            hs_dec_valid_o,
  output logic [IN_W-1:0] hs_dec_n_o,
  output logic            hs_dec_err_o,
  // LPGRC, scheme 2
  input  logic            lp_enc_valid_i,
  input  logic [IN_W-1:0] lp_enc_n_i,
  output logic            lp_enc_valid_o,
  output logic [W_LP-1:0] lp_enc_word_o,
  output logic [L_LP-1:0] lp_enc_len_o,
  output logic [W_LP:0]   lp_enc_sel_o,
  input  logic            lp_dec_valid_i,
  input  logic [W_LP-1:0] lp_dec_word_i,
  input  logic [L_LP-1:0] lp_dec_len_i,
  output logic            lp_dec_valid_o,
  output logic [IN_W-1:0] lp_dec_n_o,
  output logic            lp_dec_err_o,
  // EBRGC, scheme 3
  input  logic            ebr_enc_valid_i,
  input  logic [IN_W-1:0] ebr_enc_n_i,
  output logic            ebr_enc_valid_o,
  output logic [W_EB-1:0] ebr_enc_word_o,
  output logic [L_EB-1:0] ebr_enc_len_o,
  output logic [W_EB:0]   ebr_enc_sel_o,
  input  logic            ebr_dec_valid_i,
  input  logic [W_EB-1:0] ebr_dec_word_i,
  input  logic [L_EB-1:0] ebr_dec_len_i,
  output logic            ebr_dec_valid_o,
  output logic [IN_W-1:0] ebr_dec_n_o,
  output logic            ebr_dec_err_o
);
  import gr_pkg::*;

  gr_encoder #(.SCHEME(SCHEME_GR), .IN_W(IN_W), .M(M)) u_gr_enc (
    .clk, .rst_n, .valid_i(gr_enc_valid_i), .n_i(gr_enc_n_i),
    .valid_o(gr_enc_valid_o), .word_o(gr_enc_word_o), .len_o(gr_enc_len_o),
    .sel_o(gr_enc_sel_o));
  gr_decoder #(.SCHEME(SCHEME_GR), .IN_W(IN_W), .M(M)) u_gr_dec (
    .clk, .rst_n, .valid_i(gr_dec_valid_i), .word_i(gr_dec_word_i),
    .len_i(gr_dec_len_i), .valid_o(gr_dec_valid_o), .n_o(gr_dec_n_o),
    .err_o(gr_dec_err_o));

  gr_encoder #(.SCHEME(SCHEME_HSGRC), .IN_W(IN_W), .M(M)) u_hs_enc (
    .clk, .rst_n, .valid_i(hs_enc_valid_i), .n_i(hs_enc_n_i),
    .valid_o(hs_enc_valid_o), .word_o(hs_enc_word_o), .len_o(hs_enc_len_o),
    .sel_o(hs_enc_sel_o));
  gr_decoder #(.SCHEME(SCHEME_HSGRC), .IN_W(IN_W), .M(M)) u_hs_dec (
    .clk, .rst_n, .valid_i(hs_dec_valid_i), .word_i(hs_dec_word_i),
    .len_i(hs_dec_len_i), .valid_o(hs_dec_valid_o), .n_o(hs_dec_n_o),
    .err_o(hs_dec_err_o));

  gr_encoder #(.SCHEME(SCHEME_LPGRC), .IN_W(IN_W), .M(M)) u_lp_enc (
    .clk, .rst_n, .valid_i(lp_enc_valid_i), .n_i(lp_enc_n_i),
    .valid_o(lp_enc_valid_o), .word_o(lp_enc_word_o), .len_o(lp_enc_len_o),
    .sel_o(lp_enc_sel_o));
  gr_decoder #(.SCHEME(SCHEME_LPGRC), .IN_W(IN_W), .M(M)) u_lp_dec (
    .clk, .rst_n, .valid_i(lp_dec_valid_i), .word_i(lp_dec_word_i),
    .len_i(lp_dec_len_i), .valid_o(lp_dec_valid_o), .n_o(lp_dec_n_o),
    .err_o(lp_dec_err_o));

  gr_encoder #(.SCHEME(SCHEME_EBRGC), .IN_W(IN_W), .M(M)) u_ebr_enc (
    .clk, .rst_n, .valid_i(ebr_enc_valid_i), .n_i(ebr_enc_n_i),
    .valid_o(ebr_enc_valid_o), .word_o(ebr_enc_word_o), .len_o(ebr_enc_len_o),
    .sel_o(ebr_enc_sel_o));
  gr_decoder #(.SCHEME(SCHEME_EBRGC), .IN_W(IN_W), .M(M)) u_ebr_dec (
    .clk, .rst_n, .valid_i(ebr_dec_valid_i), .word_i(ebr_dec_word_i),
    .len_i(ebr_dec_len_i), .valid_o(ebr_dec_valid_o), .n_o(ebr_dec_n_o),
    .err_o(ebr_dec_err_o));
endmodule
