// tb_gr_top: end-to-end test of the whole encoder family at its default size
// (10-bit values, M = 128). Every value 0..1023, one per clock, enters all
// four encoders; each encoder output is looped back into the decoder of the
// same scheme, so a value comes back two clocks after it went in. The test
// checks every code word against the reference model, every decoded value,
// the latencies (1 clock encode, 1 clock decode), and the bits used over the
// whole linear data set against 11776 / 9856 / 11008 / 9472 (original,
// scheme 1, 2, 3), i.e. 16.30 %, 6.52 % and 19.57 % fewer bits. It counts how
// often each mechanism happened and fails any that never did: each length
// register of every output bank, each re-coded prefix, and the decoder's
// rejection of a word no value produces (one injected per channel).
module tb_gr_top;
  import tb_gr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       enc_v;
  logic [9:0] n;
  logic        gr_ev, hs_ev, lp_ev, ebr_ev;
  logic [14:0] gr_ew;  logic [3:0] gr_el;  logic [15:0] gr_es;
  logic [11:0] hs_ew;  logic [3:0] hs_el;  logic [12:0] hs_es;
  logic [14:0] lp_ew;  logic [3:0] lp_el;  logic [15:0] lp_es;
  logic [9:0]  ebr_ew; logic [3:0] ebr_el; logic [10:0] ebr_es;
  logic        gr_dv, hs_dv, lp_dv, ebr_dv, gr_de, hs_de, lp_de, ebr_de;
  logic [9:0]  gr_dn, hs_dn, lp_dn, ebr_dn;
  // decoder inputs: the encoder outputs, or an injected word
  logic        inj;
  logic [14:0] inj_w15; logic [11:0] inj_w12; logic [9:0] inj_w10;
  logic [3:0]  inj_l;
  logic        gr_di_v, hs_di_v, lp_di_v, ebr_di_v;
  logic [14:0] gr_di_w, lp_di_w; logic [11:0] hs_di_w; logic [9:0] ebr_di_w;
  logic [3:0]  gr_di_l, hs_di_l, lp_di_l, ebr_di_l;

  assign gr_di_v  = inj ? 1'b1 : gr_ev;   assign gr_di_w  = inj ? inj_w15 : gr_ew;  assign gr_di_l  = inj ? inj_l : gr_el;
  assign hs_di_v  = inj ? 1'b1 : hs_ev;   assign hs_di_w  = inj ? inj_w12 : hs_ew;  assign hs_di_l  = inj ? inj_l : hs_el;
  assign lp_di_v  = inj ? 1'b1 : lp_ev;   assign lp_di_w  = inj ? inj_w15 : lp_ew;  assign lp_di_l  = inj ? inj_l : lp_el;
  assign ebr_di_v = inj ? 1'b1 : ebr_ev;  assign ebr_di_w = inj ? inj_w10 : ebr_ew; assign ebr_di_l = inj ? inj_l : ebr_el;

  gr_top dut (
    .clk, .rst_n,
    .gr_enc_valid_i(enc_v), .gr_enc_n_i(n), .gr_enc_valid_o(gr_ev), .gr_enc_word_o(gr_ew),
    .gr_enc_len_o(gr_el), .gr_enc_sel_o(gr_es),
    .gr_dec_valid_i(gr_di_v), .gr_dec_word_i(gr_di_w), .gr_dec_len_i(gr_di_l),
    .gr_dec_valid_o(gr_dv), .gr_dec_n_o(gr_dn), .gr_dec_err_o(gr_de),
    .hs_enc_valid_i(enc_v), .hs_enc_n_i(n), .hs_enc_valid_o(hs_ev), .hs_enc_word_o(hs_ew),
    .hs_enc_len_o(hs_el), .hs_enc_sel_o(hs_es),
    .hs_dec_valid_i(hs_di_v), .hs_dec_word_i(hs_di_w), .hs_dec_len_i(hs_di_l),
    .hs_dec_valid_o(hs_dv), .hs_dec_n_o(hs_dn), .hs_dec_err_o(hs_de),
    .lp_enc_valid_i(enc_v), .lp_enc_n_i(n), .lp_enc_valid_o(lp_ev), .lp_enc_word_o(lp_ew),
    .lp_enc_len_o(lp_el), .lp_enc_sel_o(lp_es),
    .lp_dec_valid_i(lp_di_v), .lp_dec_word_i(lp_di_w), .lp_dec_len_i(lp_di_l),
    .lp_dec_valid_o(lp_dv), .lp_dec_n_o(lp_dn), .lp_dec_err_o(lp_de),
    .ebr_enc_valid_i(enc_v), .ebr_enc_n_i(n), .ebr_enc_valid_o(ebr_ev), .ebr_enc_word_o(ebr_ew),
    .ebr_enc_len_o(ebr_el), .ebr_enc_sel_o(ebr_es),
    .ebr_dec_valid_i(ebr_di_v), .ebr_dec_word_i(ebr_di_w), .ebr_dec_len_i(ebr_di_l),
    .ebr_dec_valid_o(ebr_dv), .ebr_dec_n_o(ebr_dn), .ebr_dec_err_o(ebr_de));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int total [4];
  int len_hits [4][16];   // per channel, per code length: output register used
  int recoded [4][8];     // per channel, per quotient: re-coded prefix sent and decoded
  int rejected [4];

  function automatic bit is_recoded(int ch, int q);
    case (ch)
      1: return q >= 5;
      2: return q >= 2 && q <= 4;
      3: return q >= 2;
      default: return 1'b0;
    endcase
  endfunction

  task automatic cmp_enc(int ch, int nv, logic v, longint unsigned w, int l,
                         longint unsigned sel);
    string s = code_str(ch, nv, 128);
    checks++;
    if (!v || l != s.len() || w != str2val(s) || sel != (64'd1 << l)) begin
      failures++;
      $display("FAIL enc ch%0d n=%0d: valid=%b %0d bits %0h, want %s", ch, nv, v, l, w, s);
    end else begin
      len_hits[ch][l]++;
    end
    total[ch] += l;
  endtask

  task automatic cmp_dec(int ch, int nv, logic v, logic e, int got);
    checks++;
    if (!v || e || got != nv) begin
      failures++;
      $display("FAIL dec ch%0d: valid=%b err=%b n=%0d, want %0d", ch, v, e, got, nv);
    end else if (is_recoded(ch, nv / 128)) begin
      recoded[ch][nv / 128]++;
    end
  endtask

  initial begin
    enc_v = 1'b0; n = '0; inj = 1'b0;
    inj_w15 = '0; inj_w12 = '0; inj_w10 = '0; inj_l = '0;
    for (int c = 0; c < 4; c++) begin
      total[c] = 0; rejected[c] = 0;
      for (int l = 0; l < 16; l++) len_hits[c][l] = 0;
      for (int q = 0; q < 8; q++) recoded[c][q] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // cycle k presents value k; encoder output for k at k+1, decoded at k+2
    for (int k = 0; k < 1024 + 2; k++) begin
      @(negedge clk);
      enc_v = (k < 1024);
      n     = 10'(k);
      @(posedge clk);
      #1;
      if (k >= 0 && k < 1024) begin
        cmp_enc(0, k, gr_ev,  gr_ew,  int'(gr_el),  gr_es);
        cmp_enc(1, k, hs_ev,  hs_ew,  int'(hs_el),  hs_es);
        cmp_enc(2, k, lp_ev,  lp_ew,  int'(lp_el),  lp_es);
        cmp_enc(3, k, ebr_ev, ebr_ew, int'(ebr_el), ebr_es);
      end
      if (k >= 1 && k <= 1024) begin
        cmp_dec(0, k - 1, gr_dv,  gr_de,  int'(gr_dn));
        cmp_dec(1, k - 1, hs_dv,  hs_de,  int'(hs_dn));
        cmp_dec(2, k - 1, lp_dv,  lp_de,  int'(lp_dn));
        cmp_dec(3, k - 1, ebr_dv, ebr_de, int'(ebr_dn));
      end
    end
    // inject the 10-bit word 0111111111 on all four decoders: its 3-bit
    // prefix 011 is no code of any scheme (plain unary needs 110, scheme 3
    // has only 000/001/010, scheme 2 has no 10-bit words)
    @(negedge clk);
    inj = 1'b1; inj_l = 4'd10;
    inj_w10 = 10'b0111111111;
    inj_w12 = 12'b0111111111;
    inj_w15 = 15'b0111111111;
    @(posedge clk);
    #1;
    if (gr_dv && gr_de)   rejected[0]++;
    if (hs_dv && hs_de)   rejected[1]++;
    if (lp_dv && lp_de)   rejected[2]++;
    if (ebr_dv && ebr_de) rejected[3]++;
    @(negedge clk);
    inj = 1'b0;
    // bits used over the linear data set
    checks += 4;
    if (total[0] != 11776) begin failures++; $display("FAIL GR bits %0d", total[0]); end
    if (total[1] != 9856)  begin failures++; $display("FAIL HSGRC bits %0d", total[1]); end
    if (total[2] != 11008) begin failures++; $display("FAIL LPGRC bits %0d", total[2]); end
    if (total[3] != 9472)  begin failures++; $display("FAIL EBRGC bits %0d", total[3]); end
    for (int c = 1; c < 4; c++)
      $display("channel %0d: %0d bits, %0.2f %% fewer than the original code", c, total[c],
               100.0 * real'(total[0] - total[c]) / real'(total[0]));
    // mechanisms
    for (int c = 0; c < 4; c++) begin
      for (int l = 0; l < 16; l++) begin
        bit exists;
        exists = (c == 0) ? (l >= 8 && l <= 15) :
                     (c == 1) ? (l >= 8 && l <= 12) :
                     (c == 2) ? (l == 8 || l == 9 || l >= 13) : (l >= 8 && l <= 10);
        if (exists) begin
          checks++;
          if (len_hits[c][l] == 0) begin failures++; $display("FAIL ch%0d: %0d-bit register never used", c, l); end
          else $display("ch%0d: %0d-bit output register used %0d times", c, l, len_hits[c][l]);
        end
      end
      for (int q = 0; q < 8; q++) if (is_recoded(c, q)) begin
        checks++;
        if (recoded[c][q] == 0) begin failures++; $display("FAIL ch%0d: re-coded prefix q=%0d never seen", c, q); end
      end
      checks++;
      if (rejected[c] == 0) begin failures++; $display("FAIL ch%0d: invalid word not rejected", c); end
      else $display("ch%0d: invalid word rejected %0d time(s)", c, rejected[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
