// tb_gr_unary_code: checks the prefix code of every quotient 0..7 for the
// four schemes against the published tables, and the plain unary code for a
// larger range (QMAX = 12).
module tb_gr_unary_code;
  import gr_pkg::*;
  import tb_gr_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0] q;
  logic [3:0] q4;
  logic [7:0]  c_gr;  logic [3:0] l_gr;
  logic [4:0]  c_hs;  logic [3:0] l_hs;
  logic [7:0]  c_lp;  logic [3:0] l_lp;
  logic [2:0]  c_eb;  logic [3:0] l_eb;
  logic [12:0] c_big; logic [3:0] l_big;

  gr_unary_code #(.SCHEME(SCHEME_GR))    d_gr (.q_i(q), .code_o(c_gr), .len_o(l_gr));
  gr_unary_code #(.SCHEME(SCHEME_HSGRC)) d_hs (.q_i(q), .code_o(c_hs), .len_o(l_hs));
  gr_unary_code #(.SCHEME(SCHEME_LPGRC)) d_lp (.q_i(q), .code_o(c_lp), .len_o(l_lp));
  gr_unary_code #(.SCHEME(SCHEME_EBRGC)) d_eb (.q_i(q), .code_o(c_eb), .len_o(l_eb));
  gr_unary_code #(.SCHEME(SCHEME_GR), .QMAX(12)) d_big (.q_i(q4), .code_o(c_big), .len_o(l_big));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(int scheme, int qv, longint unsigned code, int len);
    string s = prefix_str(scheme, qv);
    checks++;
    if (len != s.len() || code != str2val(s)) begin
      failures++;
      $display("FAIL scheme %0d q=%0d: got %0d bits %0h, want %s", scheme, qv, len, code, s);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      q = 3'(i);
      #1;
      cmp(0, i, c_gr, int'(l_gr));
      cmp(1, i, c_hs, int'(l_hs));
      cmp(2, i, c_lp, int'(l_lp));
      cmp(3, i, c_eb, int'(l_eb));
    end
    for (int i = 0; i <= 12; i++) begin
      q4 = 4'(i);
      #1;
      cmp(0, i, c_big, int'(l_big));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
