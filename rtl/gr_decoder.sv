// gr_decoder: recovers N from a code word and its length, for the original
// Golomb-Rice code and the three modified schemes. The length is known at the
// receiver because each length has its own output register (gr_vl_output),
// and the decoder relies on it: the modified prefixes are not prefix-free.
//   * The last RW bits are the remainder (for the original code with an M
//     that is not a power of two, x-1 or x bits of truncated binary).
//   * For a length whose prefix is plain unary, q is the number of ones
//     before the first zero ("finding the leading 0").
//   * For a length whose prefix was re-coded, the few prefix bits are looked
//     up directly: in scheme 1 the 9-bit words carry 10/00/01/11 for
//     q = 1/5/6/7; in schemes 2 and 3 the 9-bit words carry 10/00/01/11 for
//     q = 1/2/3/4; in scheme 3 the 10-bit words carry 000/001/010 for q = 5/6/7.
// err_o flags a word that no input value produces. The scheme-1 rule is the
// published one; schemes 2 and 3 are decoded by the same method, and err_o
// and the register stage are this design's own additions.
// Timing: result valid one clock after valid_i; asynchronous active-low reset.
module gr_decoder #(
  parameter gr_pkg::scheme_e SCHEME = gr_pkg::SCHEME_GR,
  parameter int unsigned     IN_W   = 10,
  parameter int unsigned     M      = 128,
  localparam int unsigned    QMAX   = gr_pkg::gr_qmax(IN_W, M),
  localparam int unsigned    RW     = gr_pkg::gr_rw(M),
  localparam int unsigned    UW     = gr_pkg::gr_umax(SCHEME, QMAX),
  localparam int unsigned    MAXW   = UW + RW,
  localparam int unsigned    LW     = gr_pkg::gr_lw(MAXW)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [MAXW-1:0] word_i,
  input  logic [LW-1:0]   len_i,
  output logic            valid_o,
  output logic [IN_W-1:0] n_o,
  output logic            err_o
);
  import gr_pkg::*;

  if (SCHEME != SCHEME_GR && (QMAX != 7 || !gr_pow2(M))) begin : g_bad_cfg
    $error("gr_decoder: the modified schemes need q = 0..7 and M a power of two");
  end

  localparam bit POW2 = gr_pow2(M);
  localparam int U    = (1 << RW) - M;   // truncated-binary threshold

  int              len, ulen, rlen, ones, q, r, t;
  logic [MAXW-1:0] aligned;              // word moved to the top bits
  logic            run, bad;
  logic [2:0]      pfx;                  // up to 3 re-coded prefix bits
  logic [IN_W:0]   n_full;

  always_comb begin
    len  = 32'(len_i);
    bad  = (len < 1 + RW - (POW2 ? 0 : 1)) || (len > MAXW);
    // Count the ones in front of the first zero, from the first bit sent.
    aligned = (len <= MAXW) ? word_i << (MAXW - len) : '0;
    ones = 0;
    run  = 1'b1;
    for (int i = MAXW - 1; i >= 0; i--) begin
      if (run && aligned[i] && (MAXW - 1 - i) < len) ones = ones + 1;
      else run = 1'b0;
    end
    // Remainder field length and value.
    rlen = RW;
    if (SCHEME == SCHEME_GR && !POW2 && (len - ones - 1) == RW - 1) rlen = RW - 1;
    ulen = len - rlen;
    t    = 32'(word_i & MAXW'((1 << rlen) - 1));
    r    = t;
    if (!POW2) begin
      if (rlen == RW - 1) bad = bad || (t >= U);
      else begin
        bad = bad || (t < 2 * U);
        r   = t - U;
      end
    end
    pfx = 3'(word_i >> RW);
    // Prefix: plain unary unless the length marks a re-coded prefix.
    q = ones;
    if (ones != ulen - 1) bad = 1'b1;
    case (SCHEME)
      SCHEME_HSGRC:
        if (ulen == 2) begin
          bad = (len > MAXW);
          case (pfx[1:0])
            2'b10: q = 1;
            2'b00: q = 5;
            2'b01: q = 6;
            default: q = 7;
          endcase
        end
      SCHEME_LPGRC:
        if (ulen == 2) begin
          bad = (len > MAXW);
          case (pfx[1:0])
            2'b10: q = 1;
            2'b00: q = 2;
            2'b01: q = 3;
            default: q = 4;
          endcase
        end else if (ulen >= 3 && ulen <= 5) bad = 1'b1;
      SCHEME_EBRGC:
        if (ulen == 2) begin
          bad = (len > MAXW);
          case (pfx[1:0])
            2'b10: q = 1;
            2'b00: q = 2;
            2'b01: q = 3;
            default: q = 4;
          endcase
        end else if (ulen == 3) begin
          bad = (len > MAXW);
          case (pfx)
            3'b000: q = 5;
            3'b001: q = 6;
            3'b010: q = 7;
            default: begin q = 0; bad = 1'b1; end
          endcase
        end
      default: ;
    endcase
    if (q > QMAX) bad = 1'b1;
    n_full = (IN_W + 1)'(q * M + r);
    if (n_full > (IN_W + 1)'((1 << IN_W) - 1)) bad = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      n_o     <= '0;
      err_o   <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        n_o   <= bad ? '0 : IN_W'(n_full);
        err_o <= bad;
      end
    end
  end
endmodule
