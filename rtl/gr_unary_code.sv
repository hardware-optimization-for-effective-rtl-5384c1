// gr_unary_code: prefix ("unary encoding") stage of the Golomb-Rice encoder
// family. It maps the quotient q to the prefix code word of one scheme:
//   SCHEME_GR    q ones followed by a zero (any QMAX)
//   SCHEME_HSGRC q = 0..4 as plain unary, q = 5, 6, 7 -> 00, 01, 11
//   SCHEME_LPGRC q = 0, 1 and 5..7 as plain unary, q = 2, 3, 4 -> 00, 01, 11
//   SCHEME_EBRGC q = 0 -> 0, q = 1 -> 10, q = 2, 3, 4 -> 00, 01, 11,
//                q = 5, 6, 7 -> 000, 001, 010
// The three re-coded tables are defined for q = 0..7 only (10-bit input,
// M = 128), which is checked at elaboration.
// Interface: q_i in; code_o right-aligned (first bit at index len_o-1),
// len_o its length. Purely combinational.
module gr_unary_code #(
  parameter gr_pkg::scheme_e SCHEME = gr_pkg::SCHEME_GR,
  parameter int unsigned     QMAX   = 7,
  parameter int unsigned     LW     = 4,
  localparam int unsigned    QW     = (QMAX < 2) ? 1 : $clog2(QMAX + 1),
  localparam int unsigned    UW     = gr_pkg::gr_umax(SCHEME, QMAX)
) (
  input  logic [QW-1:0] q_i,
  output logic [UW-1:0] code_o,
  output logic [LW-1:0] len_o
);
  import gr_pkg::*;

  if (SCHEME != SCHEME_GR && QMAX != 7) begin : g_bad_qmax
    $error("gr_unary_code: the modified schemes are defined for q = 0..7 only");
  end

  // Plain unary code of q: bits q..1 set, bit 0 clear.
  function automatic logic [UW-1:0] plain(logic [QW-1:0] q);
    logic [UW-1:0] c = '0;
    for (int unsigned i = 1; i < UW; i++)
      if (i <= 32'(q)) c[i] = 1'b1;
    return c;
  endfunction

  always_comb begin
    code_o = plain(q_i);
    len_o  = LW'(32'(q_i) + 1);
    case (SCHEME)
      SCHEME_HSGRC:
        case (32'(q_i))
          5: begin code_o = UW'(2'b00); len_o = LW'(2); end
          6: begin code_o = UW'(2'b01); len_o = LW'(2); end
          7: begin code_o = UW'(2'b11); len_o = LW'(2); end
          default: ;
        endcase
      SCHEME_LPGRC:
        case (32'(q_i))
          2: begin code_o = UW'(2'b00); len_o = LW'(2); end
          3: begin code_o = UW'(2'b01); len_o = LW'(2); end
          4: begin code_o = UW'(2'b11); len_o = LW'(2); end
          default: ;
        endcase
      SCHEME_EBRGC:
        case (32'(q_i))
          2: begin code_o = UW'(2'b00);  len_o = LW'(2); end
          3: begin code_o = UW'(2'b01);  len_o = LW'(2); end
          4: begin code_o = UW'(2'b11);  len_o = LW'(2); end
          5: begin code_o = UW'(3'b000); len_o = LW'(3); end
          6: begin code_o = UW'(3'b001); len_o = LW'(3); end
          7: begin code_o = UW'(3'b010); len_o = LW'(3); end
          default: ;
        endcase
      default: ;
    endcase
  end
endmodule
