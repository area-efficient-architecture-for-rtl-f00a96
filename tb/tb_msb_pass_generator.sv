// tb_msb_pass_generator: random three-column windows.  The reference places
// the samples on a grid, decides "scanned before" from the stripe scan order
// (row above the stripe first, then column by column, top to bottom) and
// resolves rho row by row.  The rho inputs of entries whose rho is unknown
// are randomised to show they are ignored.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_msb_pass_generator;
  import ebc_pkg::*;
  col_t left, cur, right;
  logic [3:0] rho;
  int checks = 0, failures = 0;
  msb_pass_generator dut (.*);

  function automatic samp_t rnd_samp();
    samp_t s;
    s = samp_t'($urandom);
    s.sig = ($urandom % 5) == 0;
    s.mu  = ($urandom % 3) == 0;
    return s;
  endfunction

  initial begin
    for (int it = 0; it < 20000; it++) begin
      samp_t g [3][6];        // [column][entry], entry 5 = next stripe
      bit    rk [3][6];       // rho known
      int    key [3][6];
      for (int i = 0; i < 5; i++) begin
        left[i] = rnd_samp(); cur[i] = rnd_samp(); right[i] = rnd_samp();
      end
      for (int c = 0; c < 3; c++)
        for (int e = 0; e < 6; e++) begin
          g[c][e] = (e == 5) ? samp_t'('0) : (c == 0) ? left[e] : (c == 1) ? cur[e] : right[e];
          key[c][e] = (e == 0) ? -100 : c * 4 + e;
          rk[c][e]  = (c == 0) || (e == 0);
        end
      #1;
      for (int r = 1; r <= 4; r++) begin
        bit any;
        bit exp_rho;
        any = 0;
        for (int dc = -1; dc <= 1; dc++)
          for (int dr = -1; dr <= 1; dr++) begin
            samp_t s;
            if (dc == 0 && dr == 0) continue;
            s = g[1+dc][r+dr];
            if (key[1+dc][r+dr] < key[1][r]) begin
              if (!rk[1+dc][r+dr]) $fatal(1, "rho needed but unknown");
              any |= s.sig | (s.rho & s.mu);
            end else any |= s.sig;
          end
        exp_rho = !g[1][r].sig && any;
        g[1][r].rho = exp_rho;
        rk[1][r] = 1;
        checks++;
        if (rho[r-1] !== exp_rho) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d row %0d", it, r - 1);
        end
      end
    end
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
