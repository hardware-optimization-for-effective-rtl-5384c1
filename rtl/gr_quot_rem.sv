// gr_quot_rem: quotient and remainder of a Golomb-Rice encoder (the "%" and
// "remainder calculation" stages). It computes q = N / M and r = N mod M.
// M is an elaboration-time constant, so the division is a constant divide:
// for the default M = 128 it is a 3-bit shift and a 7-bit mask, and for any
// other M >= 2 the synthesizer builds a constant divider. Support for M that
// is not a power of two follows the general Golomb algorithm; the defaults
// (10-bit input, M = 128, q in 0..7) are the main configuration.
// For a power-of-two M the stage costs no logic: q is the top bits of N and
// r the low log2(M) bits, which is why Rice codes restrict M to powers of
// two. The divider only becomes logic for other M.
// Interface: n_i in, q_o and r_o out. Purely combinational, no latency.
module gr_quot_rem #(
  parameter int unsigned IN_W = 10,
  parameter int unsigned M    = 128,
  localparam int unsigned QW  = gr_pkg::gr_qw(IN_W, M),
  localparam int unsigned RW  = gr_pkg::gr_rw(M)
) (
  input  logic [IN_W-1:0] n_i,
  output logic [QW-1:0]   q_o,
  output logic [RW-1:0]   r_o
);
  if (M < 2 || M > (1 << IN_W)) begin : g_bad_m
    $error("gr_quot_rem: M must lie in 2 .. 2**IN_W");
  end

  localparam logic [IN_W:0] DIV = (IN_W + 1)'(M);

  logic [IN_W:0] quot, rem;

  always_comb begin
    quot = {1'b0, n_i} / DIV;
    rem  = {1'b0, n_i} % DIV;
    q_o  = QW'(quot);
    r_o  = RW'(rem);
  end
endmodule
