// tb_gr_ref_pkg: reference model for the testbenches, written independently
// of the RTL. Prefix codes are kept as the bit strings of the published
// tables and turned into numbers here; the remainder follows the general
// Golomb rule (binary for a power-of-two M, truncated binary otherwise).
// A code word is returned right-aligned with its length.
package tb_gr_ref_pkg;

  // Prefix tables as strings, index = quotient (schemes: 0 GR, 1 HSGRC,
  // 2 LPGRC, 3 EBRGC).
  function automatic string prefix_str(int scheme, int q);
    string hs[8]  = '{"0", "10", "110", "1110", "11110", "00", "01", "11"};
    string lp[8]  = '{"0", "10", "00", "01", "11", "111110", "1111110", "11111110"};
    string ebr[8] = '{"0", "10", "00", "01", "11", "000", "001", "010"};
    string s = "";
    case (scheme)
      1: return hs[q];
      2: return lp[q];
      3: return ebr[q];
      default: begin
        for (int i = 0; i < q; i++) s = {s, "1"};
        return {s, "0"};
      end
    endcase
  endfunction

  // Bit string to number.
  function automatic longint unsigned str2val(string s);
    longint unsigned v = 0;
    for (int i = 0; i < s.len(); i++) v = (v << 1) | ((s[i] == "1") ? 1 : 0);
    return v;
  endfunction

  // Number to bit string of width w.
  function automatic string val2str(longint unsigned v, int w);
    string s = "";
    for (int i = w - 1; i >= 0; i--) s = {s, ((v >> i) & 1) ? "1" : "0"};
    return s;
  endfunction

  function automatic int ceil_log2(int m);
    int x = 0;
    while ((1 << x) < m) x++;
    return x;
  endfunction

  // Remainder code string for divisor m.
  function automatic string rem_str(int r, int m);
    int x = ceil_log2(m);
    int u = (1 << x) - m;
    if (u == 0)   return val2str(r, x);
    if (r < u)    return val2str(r, x - 1);
    return val2str(r + u, x);
  endfunction

  // Whole code word string for value n.
  function automatic string code_str(int scheme, int n, int m);
    int q = 0, r = n;
    while (r >= m) begin r -= m; q++; end
    return {prefix_str(scheme, q), rem_str(r, m)};
  endfunction

endpackage
