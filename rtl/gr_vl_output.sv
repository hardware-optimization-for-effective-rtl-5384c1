// gr_vl_output: variable-length output stage. Instead of one register as wide
// as the longest code word, it holds one register per code length that the
// scheme can produce, each exactly that many bits wide (for scheme 1: 8, 9,
// 10, 11 and 12 bits; for scheme 3: 8, 9 and 10 bits). A word is written only
// into the register of its own length, so the other registers keep their
// contents and do not toggle; which register holds the current word is shown
// by the one-hot sel_o, and that length is what lets a receiver decode the
// schemes whose prefixes are not prefix-free.
// LEN_MASK bit L set creates the L-bit register. A word whose length has no
// register is dropped (valid_o stays low).
// Timing: a word presented with valid_i is on word_o/len_o/sel_o one clock
// later with valid_o high. Reset is asynchronous, active low, and clears all
// registers. One word per cycle, no back-pressure.
module gr_vl_output #(
  parameter int unsigned     MAXW     = 15,
  parameter int unsigned     LW       = 4,
  parameter logic [MAXW:0]   LEN_MASK = {8'hFF, 8'h00}  // lengths 8..15
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [MAXW-1:0] word_i,
  input  logic [LW-1:0]   len_i,
  output logic            valid_o,
  output logic [MAXW-1:0] word_o,
  output logic [LW-1:0]   len_o,
  output logic [MAXW:0]   sel_o
);
  logic [MAXW-1:0] held [MAXW+1];  // register L, zero-extended

  for (genvar L = 0; L <= MAXW; L++) begin : g_len
    if (L > 0 && LEN_MASK[L]) begin : g_reg
      logic [L-1:0] r;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                                  r <= '0;
        else if (valid_i && 32'(len_i) == L)         r <= word_i[L-1:0];
      end
      assign held[L] = MAXW'(r);
    end else begin : g_none
      assign held[L] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      sel_o   <= '0;
      len_o   <= '0;
    end else begin
      valid_o <= valid_i && (32'(len_i) <= MAXW) && LEN_MASK[len_i];
      if (valid_i) begin
        sel_o <= '0;
        if (32'(len_i) <= MAXW && LEN_MASK[len_i]) sel_o[len_i] <= 1'b1;
        len_o <= len_i;
      end
    end
  end

  always_comb begin
    word_o = '0;
    for (int L = 0; L <= MAXW; L++)
      if (sel_o[L]) word_o = held[L];
  end
endmodule
