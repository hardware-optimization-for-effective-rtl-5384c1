// gr_rem_code: remainder code of a Golomb encoder (the "different code"
// stage). For M a power of two, as in the main configuration (M = 128), the
// remainder is sent in plain binary on log2(M) bits. For other M it uses the
// truncated binary rule of the general Golomb algorithm: with x = ceil(log2 M)
// and U = 2^x - M, a remainder r < U is sent on x-1 bits, any other r is sent
// as r + U on x bits.
// With a power-of-two M (the default) the code is the remainder itself and
// the length a constant; the comparison and the adder exist only for other M.
// Interface: r_i in; code_o holds the code right-aligned (first bit sent at
// index len_o-1) and len_o its length. Purely combinational.
module gr_rem_code #(
  parameter int unsigned M   = 128,
  parameter int unsigned LW  = 4,
  localparam int unsigned RW = gr_pkg::gr_rw(M)
) (
  input  logic [RW-1:0] r_i,
  output logic [RW-1:0] code_o,
  output logic [LW-1:0] len_o
);
  localparam bit          POW2 = gr_pkg::gr_pow2(M);
  localparam logic [RW:0] U    = (RW + 1)'((1 << RW) - M);

  always_comb begin
    if (POW2) begin
      code_o = r_i;
      len_o  = LW'(RW);
    end else if ({1'b0, r_i} < U) begin
      code_o = r_i;
      len_o  = LW'(RW - 1);
    end else begin
      code_o = RW'({1'b0, r_i} + U);
      len_o  = LW'(RW);
    end
  end
endmodule
