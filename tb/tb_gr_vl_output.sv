// tb_gr_vl_output: output register bank with the scheme-1 lengths (8..12
// bits in a 12-bit word). Random words of random lengths 6..14 are written;
// the test checks the one-clock latency, the word and one-hot select of a
// held length, that a length without a register is dropped, and that a write
// leaves the registers of the other lengths unchanged.
module tb_gr_vl_output;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam logic [12:0] MASK = 13'b1_1111_0000_0000;  // 8..12
  logic        valid_i, valid_o;
  logic [11:0] word_i, word_o;
  logic [3:0]  len_i, len_o;
  logic [12:0] sel_o;
  logic [11:0] model [13];     // expected content of each register

  gr_vl_output #(.MAXW(12), .LW(4), .LEN_MASK(MASK)) dut (
    .clk, .rst_n, .valid_i, .word_i, .len_i, .valid_o, .word_o, .len_o, .sel_o);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l;
    logic [11:0] w;
    logic        kept;
    valid_i = 1'b0; word_i = '0; len_i = '0;
    for (int i = 0; i < 13; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    checks++;
    if (valid_o !== 1'b0 || sel_o !== '0) begin failures++; $display("FAIL after reset"); end
    for (int k = 0; k < 3000; k++) begin
      l = 6 + int'($urandom_range(8));
      w = 12'($urandom) & 12'((1 << l) - 1);
      @(negedge clk);
      valid_i = ($urandom_range(3) != 0);
      word_i  = w;
      len_i   = 4'(l);
      @(posedge clk);
      #1;
      if (valid_i && l >= 8 && l <= 12) model[l] = w;
      checks++;
      if (valid_i && l >= 8 && l <= 12) begin
        if (!valid_o || word_o !== w || int'(len_o) != l || sel_o !== 13'(1 << l)) begin
          failures++;
          $display("FAIL k=%0d len=%0d: valid=%b word=%h len=%0d sel=%b want %h",
                   k, l, valid_o, word_o, len_o, sel_o, w);
        end
      end else if (valid_o) begin
        failures++;
        $display("FAIL k=%0d: valid_o for len=%0d valid_i=%b", k, l, valid_i);
      end
      // registers of the other lengths hold their contents
      kept = (dut.g_len[8].g_reg.r  === model[8][7:0])  &&
             (dut.g_len[9].g_reg.r  === model[9][8:0])  &&
             (dut.g_len[10].g_reg.r === model[10][9:0]) &&
             (dut.g_len[11].g_reg.r === model[11][10:0]) &&
             (dut.g_len[12].g_reg.r === model[12][11:0]);
      checks++;
      if (!kept) begin failures++; $display("FAIL k=%0d: a length register changed", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
