// tb_gr_encoder: every 10-bit value, one per clock, through the four encoders
// (M = 128) and through the original code with M = 100. Each code word and
// length is compared with the reference model one clock after the input, the
// one-hot select must mark the word's length, and the bits used over all
// 1024 values must equal 11776 (original), 9856 (scheme 1), 11008 (scheme 2)
// and 9472 (scheme 3). Finally a 5-bit encoder with M = 4 is checked against
// the published M = 4 example table (values 0..16).
module tb_gr_encoder;
  import gr_pkg::*;
  import tb_gr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       valid_i;
  logic [9:0] n;
  logic v0, v1, v2, v3, v4;
  logic [14:0] w0; logic [3:0] l0; logic [15:0] s0;
  logic [11:0] w1; logic [3:0] l1; logic [12:0] s1;
  logic [14:0] w2; logic [3:0] l2; logic [15:0] s2;
  logic [9:0]  w3; logic [3:0] l3; logic [10:0] s3;
  logic [17:0] w4; logic [4:0] l4; logic [18:0] s4;   // M = 100: q <= 10

  gr_encoder #(.SCHEME(SCHEME_GR))    e0 (.clk, .rst_n, .valid_i, .n_i(n), .valid_o(v0), .word_o(w0), .len_o(l0), .sel_o(s0));
  gr_encoder #(.SCHEME(SCHEME_HSGRC)) e1 (.clk, .rst_n, .valid_i, .n_i(n), .valid_o(v1), .word_o(w1), .len_o(l1), .sel_o(s1));
  gr_encoder #(.SCHEME(SCHEME_LPGRC)) e2 (.clk, .rst_n, .valid_i, .n_i(n), .valid_o(v2), .word_o(w2), .len_o(l2), .sel_o(s2));
  gr_encoder #(.SCHEME(SCHEME_EBRGC)) e3 (.clk, .rst_n, .valid_i, .n_i(n), .valid_o(v3), .word_o(w3), .len_o(l3), .sel_o(s3));
  gr_encoder #(.SCHEME(SCHEME_GR), .M(100)) e4 (.clk, .rst_n, .valid_i, .n_i(n), .valid_o(v4), .word_o(w4), .len_o(l4), .sel_o(s4));

  // 5-bit input, M = 4: q <= 7, 8-bit prefix + 2-bit remainder
  logic       v5, valid5;
  logic [4:0] n5;
  logic [9:0] w5; logic [3:0] l5; logic [10:0] s5;
  gr_encoder #(.SCHEME(SCHEME_GR), .IN_W(5), .M(4)) e5 (.clk, .rst_n, .valid_i(valid5), .n_i(n5), .valid_o(v5), .word_o(w5), .len_o(l5), .sel_o(s5));
  // rows of the M = 4 example table: code word as printed, '_' between the parts
  string table1 [17] = '{"0_00", "0_01", "0_10", "0_11", "10_00", "10_01", "10_10", "10_11",
                         "110_00", "110_01", "110_10", "110_11", "1110_00", "1110_01",
                         "1110_10", "1110_11", "11110_00"};

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int total [5];

  task automatic cmp(int ch, int scheme, int m, int nv, logic v, longint unsigned w,
                     int l, longint unsigned sel);
    string s = code_str(scheme, nv, m);
    checks++;
    if (!v || l != s.len() || w != str2val(s) || sel != (64'd1 << l)) begin
      failures++;
      $display("FAIL ch%0d n=%0d: valid=%b %0d bits %0h sel %0h, want %s", ch, nv, v, l, w, sel, s);
    end
    total[ch] += l;
  endtask

  initial begin
    valid_i = 1'b0; n = '0; valid5 = 1'b0; n5 = '0;
    for (int c = 0; c < 5; c++) total[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      valid_i = 1'b1;
      n = 10'(i);
      @(posedge clk);
      #1;   // one clock after the input was presented
      cmp(0, 0, 128, i, v0, w0, int'(l0), s0);
      cmp(1, 1, 128, i, v1, w1, int'(l1), s1);
      cmp(2, 2, 128, i, v2, w2, int'(l2), s2);
      cmp(3, 3, 128, i, v3, w3, int'(l3), s3);
      cmp(4, 0, 100, i, v4, w4, int'(l4), s4);
    end
    @(negedge clk);
    valid_i = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (v0 | v1 | v2 | v3 | v4) begin failures++; $display("FAIL valid_o without input"); end
    checks += 4;
    if (total[0] != 11776) begin failures++; $display("FAIL GR total %0d", total[0]); end
    if (total[1] != 9856)  begin failures++; $display("FAIL HSGRC total %0d", total[1]); end
    if (total[2] != 11008) begin failures++; $display("FAIL LPGRC total %0d", total[2]); end
    if (total[3] != 9472)  begin failures++; $display("FAIL EBRGC total %0d", total[3]); end
    for (int i = 0; i <= 16; i++) begin
      string row;
      row = "";
      for (int c = 0; c < table1[i].len(); c++) if (table1[i][c] != "_") row = {row, table1[i].substr(c, c)};
      @(negedge clk);
      valid5 = 1'b1;
      n5 = 5'(i);
      @(posedge clk);
      #1;
      checks++;
      if (!v5 || int'(l5) != row.len() || longint'(w5) != str2val(row)) begin
        failures++;
        $display("FAIL M=4 n=%0d: %0d bits %0h, want %s", i, l5, w5, table1[i]);
      end
    end
    $display("bits used: GR %0d HSGRC %0d LPGRC %0d EBRGC %0d", total[0], total[1], total[2], total[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
