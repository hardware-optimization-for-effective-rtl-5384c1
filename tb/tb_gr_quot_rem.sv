// tb_gr_quot_rem: exhaustive check of the quotient/remainder stage for every
// 10-bit input, with the default divisor 128 and with 100 (not a power of
// two). The expected values come from repeated subtraction.
module tb_gr_quot_rem;
  int checks = 0, failures = 0;
  logic [9:0] n;
  logic [2:0] q_a;  logic [6:0] r_a;   // M = 128
  logic [3:0] q_b;  logic [6:0] r_b;   // M = 100

  gr_quot_rem dut_a (.n_i(n), .q_o(q_a), .r_o(r_a));
  gr_quot_rem #(.IN_W(10), .M(100)) dut_b (.n_i(n), .q_o(q_b), .r_o(r_b));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_qr(int nv, int m, int q, int r);
    int eq = 0, er = nv;
    while (er >= m) begin er -= m; eq++; end
    checks++;
    if (q !== eq || r !== er) begin
      failures++;
      $display("FAIL M=%0d n=%0d: got q=%0d r=%0d, want q=%0d r=%0d", m, nv, q, r, eq, er);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      n = 10'(i);
      #1;
      expect_qr(i, 128, int'(q_a), int'(r_a));
      expect_qr(i, 100, int'(q_b), int'(r_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
