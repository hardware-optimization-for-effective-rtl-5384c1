// gr_pkg: shared types and sizing functions for the Golomb-Rice (GR) encoder
// family. A GR encoder with divisor M splits a value N into q = N / M and
// r = N mod M, sends q as a unary-style prefix and r as a binary suffix. The
// three modified schemes keep the suffix and re-code only the prefix:
//   SCHEME_GR    plain unary prefix (q ones, then a zero)
//   SCHEME_HSGRC scheme 1, high speed: q = 5, 6, 7 become the 2-bit codes 00, 01, 11
//   SCHEME_LPGRC scheme 2, low power:  q = 2, 3, 4 become 00, 01, 11
//   SCHEME_EBRGC scheme 3, bit reduction: q = 2..4 as scheme 2, q = 5..7 become 000, 001, 010
// The modified prefixes are not prefix-free on their own; a code word is
// decoded together with its length, which the output register bank carries.
// The functions below size every block from (SCHEME, IN_W, M) at elaboration
// time. Code words are limited to 63 bits (MAX_WORD) so the length mask fits
// in one 64-bit constant.
package gr_pkg;

  typedef enum logic [1:0] {
    SCHEME_GR    = 2'd0,
    SCHEME_HSGRC = 2'd1,
    SCHEME_LPGRC = 2'd2,
    SCHEME_EBRGC = 2'd3
  } scheme_e;

  localparam int unsigned MAX_WORD = 63;

  // Largest quotient for an IN_W-bit input.
  function automatic int unsigned gr_qmax(int unsigned in_w, int unsigned m);
    return ((1 << in_w) - 1) / m;
  endfunction

  // Width of a quotient signal (at least 1).
  function automatic int unsigned gr_qw(int unsigned in_w, int unsigned m);
    int unsigned qm = gr_qmax(in_w, m);
    return (qm < 2) ? 1 : $clog2(qm + 1);
  endfunction

  // Remainder field width x = ceil(log2 M); M >= 2.
  function automatic int unsigned gr_rw(int unsigned m);
    return $clog2(m);
  endfunction

  // True when M is a power of two (plain binary remainder, no truncation).
  function automatic bit gr_pow2(int unsigned m);
    return (1 << $clog2(m)) == m;
  endfunction

  // Length in bits of the prefix sent for quotient q.
  function automatic int unsigned gr_ulen(scheme_e s, int unsigned q);
    case (s)
      SCHEME_HSGRC: return (q >= 5) ? 2 : q + 1;
      SCHEME_LPGRC: return (q >= 2 && q <= 4) ? 2 : q + 1;
      SCHEME_EBRGC: return (q == 0) ? 1 : (q <= 4) ? 2 : 3;
      default:      return q + 1;
    endcase
  endfunction

  // Longest prefix over q = 0 .. qmax.
  function automatic int unsigned gr_umax(scheme_e s, int unsigned qmax);
    int unsigned mx = 1;
    for (int unsigned q = 0; q <= qmax; q++)
      if (gr_ulen(s, q) > mx) mx = gr_ulen(s, q);
    return mx;
  endfunction

  // Widest code word.
  function automatic int unsigned gr_maxw(scheme_e s, int unsigned in_w, int unsigned m);
    return gr_umax(s, gr_qmax(in_w, m)) + gr_rw(m);
  endfunction

  // Width of a length field able to hold 0 .. maxw.
  function automatic int unsigned gr_lw(int unsigned maxw);
    return $clog2(maxw + 1);
  endfunction

  // Bit L set when a code word of exactly L bits can occur.
  function automatic logic [MAX_WORD:0] gr_len_mask(scheme_e s, int unsigned in_w,
                                                     int unsigned m);
    logic [MAX_WORD:0] mask = '0;
    int unsigned x = gr_rw(m);
    for (int unsigned q = 0; q <= gr_qmax(in_w, m); q++) begin
      mask[gr_ulen(s, q) + x] = 1'b1;
      if (!gr_pow2(m)) mask[gr_ulen(s, q) + x - 1] = 1'b1;
    end
    return mask;
  endfunction

endpackage
