// tb_mq_code_update: the code-register stage driven by an interval (A) model
// written in the testbench.  Random skewed symbols in 16 contexts give the
// C offset and shift of each symbol; the stage's C, CT and byte register are
// fed back, and the bytes it writes out, including the flush at the end of
// each codeword, must equal those of the bit-serial reference coder.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_mq_code_update;
  import ebc_ref_pkg::*;
  logic [27:0] c_in, c_out;
  logic [3:0] ct_in, ct_out, nshift;
  logic [7:0] b_in, b_out;
  logic bvalid_in, bvalid_out, flush, last;
  logic [15:0] add;
  logic [1:0] nbytes;
  logic [2:0][7:0] bytes;
  int checks = 0, failures = 0, n3 = 0, nff = 0;
  mq_code_update dut (.*);

  initial begin
    for (int cw = 0; cw < 60; cw++) begin
      mq_ref r;
      int unsigned A;
      int I[16], M[16];
      byte unsigned got[$];
      int len, skew;
      r = new(1);
      got.delete();
      for (int k = 0; k < 16; k++) begin I[k] = r.I[k]; M[k] = r.M[k]; end
      A = 'h8000;
      c_in = 0; ct_in = 12; b_in = 0; bvalid_in = 0;
      len = 1 + $urandom % 3000;
      skew = 1 + $urandom % 60;
      for (int i = 0; i < len; i++) begin
        int cx, d;
        int unsigned q, an, ad;
        int n;
        cx = $urandom % 16;
        d  = (($urandom % 64) < skew) ? 1 - M[cx] : M[cx];
        r.encode(cx, d);
        // interval update, as the first stage does it
        q  = QE[I[cx]];
        an = A - q;
        ad = q;
        n  = 0;
        if (d == M[cx]) begin
          if ((an & 'h8000) == 0) begin
            if (an < q) begin an = q; ad = 0; end
            I[cx] = NMPS[I[cx]];
          end
        end else begin
          if (an < q) ad = q; else begin an = q; ad = 0; end
          if (SWT[I[cx]]) M[cx] = 1 - M[cx];
          I[cx] = NLPS[I[cx]];
        end
        while ((an & 'h8000) == 0) begin an = an << 1; n++; end
        A = an;
        add = 16'(ad); nshift = 4'(n); flush = 0;
        #1;
        for (int k = 0; k < int'(nbytes); k++) got.push_back(bytes[k]);
        if (nbytes == 3) n3++;
        c_in = c_out; ct_in = ct_out; b_in = b_out; bvalid_in = bvalid_out;
      end
      void'(r.flush());
      add = 16'(A); nshift = 0; flush = 1;
      #1;
      if (nbytes == 3) n3++;
      for (int k = 0; k < int'(nbytes); k++) got.push_back(bytes[k]);
      checks++;
      if (got.size() != r.out.size() || !last || ct_out != 12 || bvalid_out) begin
        failures++;
        $display("FAIL codeword %0d: %0d bytes, expected %0d", cw, got.size(), r.out.size());
      end else
        foreach (got[i]) begin
          checks++;
          if (got[i] != r.out[i]) begin failures++; if (failures < 5) $display("cw %0d byte %0d: %02x exp %02x of %0d", cw, i, got[i], r.out[i], got.size()); end
          if (got[i] == 8'hFF) nff++;
        end
    end
    checks++;
    if (n3 == 0 || nff == 0) begin
      failures++;
      $display("FAIL: no three-byte step (%0d) or no 0xFF byte (%0d)", n3, nff);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
