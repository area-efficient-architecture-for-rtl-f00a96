// tb_zero_coding: every neighbourhood of eight significance bits in every
// subband against the zero-coding tables of JPEG 2000 written from the
// (h, v, d) counts.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_zero_coding;
  import ebc_pkg::*;
  logic [7:0] nsig;
  band_t band;
  logic [3:0] cx;
  int checks = 0, failures = 0;
  zero_coding dut (.*);

  function automatic int ref_zc(int h, int v, int d, int b);
    int t;
    if (b == 1) begin t = h; h = v; v = t; end
    if (b == 3) begin
      if (d >= 3) return 8;
      if (d == 2) return (h + v >= 1) ? 7 : 6;
      if (d == 1) return (h + v >= 2) ? 5 : (h + v == 1) ? 4 : 3;
      return (h + v >= 2) ? 2 : (h + v);
    end
    case (h)
      2: return 8;
      1: return (v != 0) ? 7 : (d != 0) ? 6 : 5;
      default: return (v == 2) ? 4 : (v == 1) ? 3 : (d >= 2) ? 2 : d;
    endcase
  endfunction

  initial begin
    for (int b = 0; b < 4; b++)
      for (int n = 0; n < 256; n++) begin
        int h, v, d;
        nsig = 8'(n); band = band_t'(b);
        // {nw, n, ne, w, e, sw, s, se}
        h = nsig[4] + nsig[3];
        v = nsig[6] + nsig[1];
        d = nsig[7] + nsig[5] + nsig[2] + nsig[0];
        #1;
        checks++;
        if (int'(cx) != ref_zc(h, v, d, b)) begin
          failures++;
          if (failures < 10) $display("FAIL band %0d nsig %b got %0d", b, nsig, cx);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
