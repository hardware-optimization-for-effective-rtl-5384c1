// tb_gr_concat: random prefix and remainder fields of random lengths are
// joined by the block; the expected word is built as a bit string.
module tb_gr_concat;
  import tb_gr_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  u_code;  logic [3:0] u_len;
  logic [6:0]  r_code;  logic [3:0] r_len;
  logic [14:0] word;    logic [3:0] len;

  gr_concat dut (.u_code_i(u_code), .u_len_i(u_len), .r_code_i(r_code),
                 .r_len_i(r_len), .word_o(word), .len_o(len));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ul, rl, uv, rv;
    string s;
    for (int k = 0; k < 2000; k++) begin
      ul = 1 + int'($urandom_range(7));
      rl = 1 + int'($urandom_range(6));
      uv = int'($urandom_range((1 << ul) - 1));
      rv = int'($urandom_range((1 << rl) - 1));
      s  = {val2str(uv, ul), val2str(rv, rl)};
      u_code = 8'(uv);  u_len = 4'(ul);
      r_code = 7'(rv);  r_len = 4'(rl);
      #1;
      checks++;
      if (int'(len) != s.len() || longint'(word) != str2val(s)) begin
        failures++;
        $display("FAIL %s: got %0d bits %0h", s, len, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
