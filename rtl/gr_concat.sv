// gr_concat: joins the prefix (unary-part) code and the remainder code into
// one code word, <prefix><remainder>, as in the "concatenation {}" stage.
// Both parts arrive right-aligned with their lengths; the word is
// (prefix << r_len) | remainder, again right-aligned with its first bit at
// index len_o-1, and len_o = u_len + r_len.
// Purely combinational.
module gr_concat #(
  parameter int unsigned UW  = 8,
  parameter int unsigned RW  = 7,
  parameter int unsigned LW  = 4,
  localparam int unsigned WW = UW + RW
) (
  input  logic [UW-1:0] u_code_i,
  input  logic [LW-1:0] u_len_i,
  input  logic [RW-1:0] r_code_i,
  input  logic [LW-1:0] r_len_i,
  output logic [WW-1:0] word_o,
  output logic [LW-1:0] len_o
);
  always_comb begin
    word_o = (WW'(u_code_i) << r_len_i) | WW'(r_code_i);
    len_o  = u_len_i + r_len_i;
  end
endmodule
