// tb_gr_decoder: every 10-bit value is coded by the reference model and fed,
// with its length, to the decoders of the four schemes (M = 128) and of the
// original code with M = 100; the decoded value must come back one clock
// later with no error. Then words that no value produces (an unused scheme-3
// prefix, a scheme-2 length that does not exist, a unary run without its
// closing zero, a truncated-binary field out of range) must raise err_o.
module tb_gr_decoder;
  import gr_pkg::*;
  import tb_gr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        vi [5];
  logic [14:0] w0; logic [3:0] l0;
  logic [11:0] w1; logic [3:0] l1;
  logic [14:0] w2; logic [3:0] l2;
  logic [9:0]  w3; logic [3:0] l3;
  logic [17:0] w4; logic [4:0] l4;
  logic        vo [5], eo [5];
  logic [9:0]  no [5];

  gr_decoder #(.SCHEME(SCHEME_GR))    d0 (.clk, .rst_n, .valid_i(vi[0]), .word_i(w0), .len_i(l0), .valid_o(vo[0]), .n_o(no[0]), .err_o(eo[0]));
  gr_decoder #(.SCHEME(SCHEME_HSGRC)) d1 (.clk, .rst_n, .valid_i(vi[1]), .word_i(w1), .len_i(l1), .valid_o(vo[1]), .n_o(no[1]), .err_o(eo[1]));
  gr_decoder #(.SCHEME(SCHEME_LPGRC)) d2 (.clk, .rst_n, .valid_i(vi[2]), .word_i(w2), .len_i(l2), .valid_o(vo[2]), .n_o(no[2]), .err_o(eo[2]));
  gr_decoder #(.SCHEME(SCHEME_EBRGC)) d3 (.clk, .rst_n, .valid_i(vi[3]), .word_i(w3), .len_i(l3), .valid_o(vo[3]), .n_o(no[3]), .err_o(eo[3]));
  gr_decoder #(.SCHEME(SCHEME_GR), .M(100)) d4 (.clk, .rst_n, .valid_i(vi[4]), .word_i(w4), .len_i(l4), .valid_o(vo[4]), .n_o(no[4]), .err_o(eo[4]));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_word(int ch, string s);
    longint unsigned v = str2val(s);
    case (ch)
      0: begin w0 = 15'(v); l0 = 4'(s.len()); end
      1: begin w1 = 12'(v); l1 = 4'(s.len()); end
      2: begin w2 = 15'(v); l2 = 4'(s.len()); end
      3: begin w3 = 10'(v); l3 = 4'(s.len()); end
      default: begin w4 = 18'(v); l4 = 5'(s.len()); end
    endcase
  endtask

  // Present one word on one channel and check the result a clock later.
  task automatic one(int ch, string s, bit want_err, int want_n);
    @(negedge clk);
    for (int c = 0; c < 5; c++) vi[c] = 1'b0;
    vi[ch] = 1'b1;
    set_word(ch, s);
    @(posedge clk);
    #1;
    checks++;
    if (!vo[ch] || eo[ch] !== want_err || (!want_err && int'(no[ch]) != want_n)) begin
      failures++;
      $display("FAIL ch%0d word %s: valid=%b err=%b n=%0d, want err=%b n=%0d",
               ch, s, vo[ch], eo[ch], no[ch], want_err, want_n);
    end
  endtask

  initial begin
    for (int c = 0; c < 5; c++) vi[c] = 1'b0;
    w0 = '0; w1 = '0; w2 = '0; w3 = '0; w4 = '0;
    l0 = '0; l1 = '0; l2 = '0; l3 = '0; l4 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // all channels at once, every value
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      for (int c = 0; c < 5; c++) vi[c] = 1'b1;
      for (int c = 0; c < 4; c++) set_word(c, code_str(c, i, 128));
      set_word(4, code_str(0, i, 100));
      @(posedge clk);
      #1;
      for (int c = 0; c < 5; c++) begin
        checks++;
        if (!vo[c] || eo[c] || int'(no[c]) != i) begin
          failures++;
          $display("FAIL ch%0d n=%0d: valid=%b err=%b got %0d", c, i, vo[c], eo[c], no[c]);
        end
      end
    end
    // words no value produces
    one(3, "0111111111", 1'b1, 0);     // scheme 3: 10-bit word, prefix 011 unused
    one(3, "1100000000", 1'b1, 0);     // scheme 3: 10-bit word, prefix 110 unused
    one(2, "1110000000", 1'b1, 0);     // scheme 2: no 10-bit words
    one(0, "111111110000000", 1'b1, 0);// GR: 8 ones, no closing zero
    one(1, "101000000", 1'b0, 128 + 64); // scheme 1: 9-bit word, prefix 10 -> q=1
    one(1, "110000000", 1'b0, 7 * 128);  // scheme 1: 9-bit word, prefix 11 -> q=7
    // M = 100: x = 7, U = 28; 6-bit fields must be below 28, 7-bit fields at least 56
    one(4, "00000000", 1'b1, 0);       // 7-bit field 0
    one(4, "0011100", 1'b1, 0);        // 6-bit field 28
    one(4, "0011011", 1'b0, 27);       // 6-bit field 27 -> r = 27
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
