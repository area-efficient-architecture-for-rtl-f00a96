// mq_code_update: second pipeline stage of the MQ coder for one coding-status
// suite.  It adds the interval offset to the code register C, then performs
// the renormalisation shift of nshift bits with byte-out, all in one cycle.
// Since the counter CT is at least 1 on entry and 7 or 8 after a byte-out,
// a shift of up to 15 bits ends in at most three byte-outs, so three byte
// lanes leave per cycle.  With flush set it terminates the codeword instead
// (set the low bits of C, two shift/byte-out steps, then the last byte
// unless it is 0xFF) and the suite returns to its initial state.
// Byte-out with bit stuffing: after a 0xFF byte only 7 bits are taken and a
// carry into a 0xFF byte is absorbed there.  The byte register B is written
// out when the next byte is started; the dummy byte before the first one
// (bvalid = 0) is never written.  Combinational.
// Renormalisation and byte-out in one cycle follow the published
// architecture; doing the whole shift with up to three byte boundaries as
// one combinational step is this design's own way of meeting that. Bit
// stuffing, carry handling and the flush are those of the JPEG 2000 MQ
// coder.
module mq_code_update (
  input  logic [27:0] c_in,
  input  logic [3:0]  ct_in,
  input  logic [7:0]  b_in,
  input  logic        bvalid_in,
  input  logic [15:0] add,       // Qe to add to C, or 0; A when flushing
  input  logic [3:0]  nshift,    // renormalisation shift
  input  logic        flush,
  output logic [27:0] c_out,
  output logic [3:0]  ct_out,
  output logic [7:0]  b_out,
  output logic        bvalid_out,
  output logic [1:0]  nbytes,    // bytes emitted, in lanes 0..nbytes-1
  output logic [2:0][7:0] bytes,
  output logic        last       // with flush: the last lane ends the codeword
);
  typedef struct packed {
    logic [27:0]     c;
    logic [3:0]      ct;
    logic [7:0]      b;
    logic            bv;
    logic [1:0]      nb;
    logic [2:0][7:0] by;
  } st_t;

  // One BYTEOUT step; writes out the old B when it is a real byte.
  function automatic st_t byteout(input st_t s);
    logic [7:0] binc, commit;
    binc   = s.b + 8'd1;
    commit = (s.b != 8'hFF && s.c[27]) ? binc : s.b;   // carry into B
    if (s.bv) begin s.by[s.nb] = commit; s.nb = s.nb + 2'd1; end
    s.bv = 1'b1;
    if (s.b == 8'hFF) begin
      s.b = s.c[27:20]; s.c = {8'b0, s.c[19:0]}; s.ct = 4'd7;
    end else if (!s.c[27]) begin
      s.b = s.c[26:19]; s.c = {9'b0, s.c[18:0]}; s.ct = 4'd8;
    end else if (binc == 8'hFF) begin
      // the carry made B 0xFF: drop the carry bit, 7 bits follow
      s.b = {1'b0, s.c[26:20]}; s.c = {8'b0, s.c[19:0]}; s.ct = 4'd7;
    end else begin
      s.b = s.c[26:19]; s.c = {9'b0, s.c[18:0]}; s.ct = 4'd8;
    end
    return s;
  endfunction

  st_t  s;
  always_comb begin
    logic [4:0]  n;
    logic [4:0]  sh;
    logic [27:0] tempc;
    s  = '{c: c_in, ct: ct_in, b: b_in, bv: bvalid_in, nb: 2'd0, by: '0};
    n  = {1'b0, nshift};
    sh = '0;
    tempc = c_in + {12'b0, add};
    last  = 1'b0;
    if (!flush) begin
      s.c = tempc;
      for (int it = 0; it < 3; it++) begin
        if (n != 5'd0) begin
          sh   = (n < {1'b0, s.ct}) ? n : {1'b0, s.ct};
          s.c  = s.c << sh;
          s.ct = s.ct - sh[3:0];
          n    = n - sh;
          if (s.ct == 4'd0) s = byteout(s);
        end
      end
      c_out = s.c; ct_out = s.ct; b_out = s.b; bvalid_out = s.bv;
    end else begin
      s.c = s.c | 28'hFFFF;
      if (s.c >= tempc) s.c = s.c - 28'h8000;
      s.c = s.c << s.ct;
      s   = byteout(s);
      s.c = s.c << s.ct;
      s   = byteout(s);
      if (s.b != 8'hFF) begin s.by[s.nb] = s.b; s.nb = s.nb + 2'd1; end
      last = 1'b1;
      c_out = '0; ct_out = 4'd12; b_out = '0; bvalid_out = 1'b0;
    end
    nbytes = s.nb;
    bytes  = s.by;
  end
endmodule
