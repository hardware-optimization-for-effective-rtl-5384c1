// tb_gr_rem_code: checks the remainder code for every remainder with M = 128
// (plain 7-bit binary) and with M = 100 and M = 5 (truncated binary), against
// the string reference model.
module tb_gr_rem_code;
  import tb_gr_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [6:0] r7;   logic [6:0] c_a, c_b;  logic [3:0] l_a, l_b;
  logic [2:0] r3;   logic [2:0] c_c;       logic [3:0] l_c;

  gr_rem_code                 dut_a (.r_i(r7), .code_o(c_a), .len_o(l_a));
  gr_rem_code #(.M(100))      dut_b (.r_i(r7), .code_o(c_b), .len_o(l_b));
  gr_rem_code #(.M(5))        dut_c (.r_i(r3), .code_o(c_c), .len_o(l_c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(int m, int r, longint unsigned code, int len);
    string s = rem_str(r, m);
    checks++;
    if (len != s.len() || code != str2val(s)) begin
      failures++;
      $display("FAIL M=%0d r=%0d: got %0d bits %0h, want %s", m, r, len, code, s);
    end
  endtask

  initial begin
    for (int r = 0; r < 128; r++) begin
      r7 = 7'(r);
      r3 = 3'(r % 5);
      #1;
      cmp(128, r, c_a, int'(l_a));
      if (r < 100) cmp(100, r, c_b, int'(l_b));
      if (r < 5)   cmp(5, r, c_c, int'(l_c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
