// gr_encoder: one complete Golomb-Rice encoder of the selected scheme
// (original GR, HSGRC scheme 1, LPGRC scheme 2 or EBRGC scheme 3). The input
// N is split into quotient and remainder (gr_quot_rem); the remainder is
// coded in binary, or truncated binary for an M that is not a power of two
// (gr_rem_code); the quotient is coded by the scheme's prefix table
// (gr_unary_code); the two are concatenated (gr_concat) and written into the
// register of matching length in the variable-length output bank
// (gr_vl_output). With the defaults (10-bit input, M = 128) the code word is
// 8..15 bits (GR), 8..12 (scheme 1), 8, 9, 13, 14, 15 (scheme 2) or 8..10
// (scheme 3). The block structure and tables follow the published schemes;
// the single register stage, the valid-only interface and the
// asynchronous active-low reset are this design's own choices.
// Timing: one input per clock, code word valid one clock after valid_i.
module gr_encoder #(
  parameter gr_pkg::scheme_e SCHEME = gr_pkg::SCHEME_GR,
  parameter int unsigned     IN_W   = 10,
  parameter int unsigned     M      = 128,
  localparam int unsigned    QMAX   = gr_pkg::gr_qmax(IN_W, M),
  localparam int unsigned    QW     = gr_pkg::gr_qw(IN_W, M),
  localparam int unsigned    RW     = gr_pkg::gr_rw(M),
  localparam int unsigned    UW     = gr_pkg::gr_umax(SCHEME, QMAX),
  localparam int unsigned    MAXW   = UW + RW,
  localparam int unsigned    LW     = gr_pkg::gr_lw(MAXW)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [IN_W-1:0] n_i,
  output logic            valid_o,
  output logic [MAXW-1:0] word_o,
  output logic [LW-1:0]   len_o,
  output logic [MAXW:0]   sel_o
);
  if (MAXW > gr_pkg::MAX_WORD) begin : g_too_wide
    $error("gr_encoder: code word wider than MAX_WORD; raise M");
  end

  localparam logic [gr_pkg::MAX_WORD:0] MASK_ALL = gr_pkg::gr_len_mask(SCHEME, IN_W, M);
  localparam logic [MAXW:0]             LEN_MASK = MASK_ALL[MAXW:0];

  logic [QW-1:0]   q;
  logic [RW-1:0]   r, r_code;
  logic [LW-1:0]   r_len, u_len, w_len;
  logic [UW-1:0]   u_code;
  logic [MAXW-1:0] word;

  gr_quot_rem #(.IN_W(IN_W), .M(M)) u_qr (
    .n_i(n_i), .q_o(q), .r_o(r));

  gr_rem_code #(.M(M), .LW(LW)) u_rc (
    .r_i(r), .code_o(r_code), .len_o(r_len));

  gr_unary_code #(.SCHEME(SCHEME), .QMAX(QMAX), .LW(LW)) u_uc (
    .q_i(q), .code_o(u_code), .len_o(u_len));

  gr_concat #(.UW(UW), .RW(RW), .LW(LW)) u_cat (
    .u_code_i(u_code), .u_len_i(u_len), .r_code_i(r_code), .r_len_i(r_len),
    .word_o(word), .len_o(w_len));

  gr_vl_output #(.MAXW(MAXW), .LW(LW), .LEN_MASK(LEN_MASK)) u_out (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .word_i(word), .len_i(w_len),
    .valid_o(valid_o), .word_o(word_o), .len_o(len_o), .sel_o(sel_o));
endmodule
