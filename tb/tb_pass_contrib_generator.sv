// tb_pass_contrib_generator: random windows with all rho known.  The
// reference decides "scanned before" from the stripe scan order on a grid and
// applies the significance rules of the one-scan coder: pass 1 for an
// insignificant sample with a contributing neighbour, pass 2 for a
// significant one, pass 3 otherwise; a neighbour counts as significant if it
// already was, or if its bit is 1 and it was coded in a pass that comes
// before c is coded.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_pass_contrib_generator;
  import ebc_pkg::*;
  col_t left, cur, right;
  logic [1:0] row;
  pass_t pass;
  logic [7:0] nsig;
  int checks = 0, failures = 0;
  int npass[4];
  pass_contrib_generator dut (.*);

  function automatic samp_t rnd_samp();
    samp_t s;
    s = samp_t'($urandom);
    s.sig = ($urandom % 5) == 0;
    s.mu  = ($urandom % 3) == 0;
    s.rho = ($urandom % 3) == 0;
    return s;
  endfunction

  initial begin
    for (int it = 0; it < 30000; it++) begin
      samp_t g [3][6];
      int    key [3][6];
      int    r, p, k;
      bit    any;
      logic [7:0] e;
      for (int i = 0; i < 5; i++) begin
        left[i] = rnd_samp(); cur[i] = rnd_samp(); right[i] = rnd_samp();
      end
      row = 2'($urandom);
      for (int c = 0; c < 3; c++)
        for (int x = 0; x < 6; x++) begin
          g[c][x] = (x == 5) ? samp_t'('0) : (c == 0) ? left[x] : (c == 1) ? cur[x] : right[x];
          key[c][x] = (x == 0) ? -100 : c * 4 + x;
        end
      #1;
      r = int'(row) + 1;
      any = 0;
      for (int dr = -1; dr <= 1; dr++)
        for (int dc = -1; dc <= 1; dc++) begin
          samp_t s;
          if (dc == 0 && dr == 0) continue;
          s = g[1+dc][r+dr];
          any |= (key[1+dc][r+dr] < key[1][r]) ? (s.sig | (s.rho & s.mu)) : s.sig;
        end
      p = g[1][r].sig ? 2 : any ? 1 : 3;
      // expected nsig, order {nw, n, ne, w, e, sw, s, se}
      k = 7;
      for (int dr = -1; dr <= 1; dr++)
        for (int dc = -1; dc <= 1; dc++) begin
          samp_t s;
          bit pre;
          if (dc == 0 && dr == 0) continue;
          s = g[1+dc][r+dr];
          pre = key[1+dc][r+dr] < key[1][r];
          if (pre) e[k] = (p == 3) ? (s.sig | s.mu) : (s.sig | (s.mu & s.rho));
          else     e[k] = (p == 1) ? s.sig : (s.sig | (s.mu & s.rho));
          k--;
        end
      npass[p]++;
      checks++;
      if (int'(pass) != p || nsig !== e) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d: pass %0d/%0d nsig %b/%b", it, pass, p, nsig, e);
      end
    end
    checks++;
    if (npass[1] == 0 || npass[2] == 0 || npass[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
