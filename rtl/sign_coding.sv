// sign_coding: sign-coding context (9..13) and decision of a sample that has
// just become significant.  Each horizontal (vertical) neighbour adds +1 if
// significant and positive, -1 if significant and negative; the sums are
// clipped to -1..1 and select the context and an XOR bit; the decision is
// the sign XOR that bit.  Combinational.
// The contexts and XOR bits are those of JPEG 2000; the local numbering
// 9..13 is this design's own.
module sign_coding
  import ebc_pkg::*;
(
  input  logic [3:0]      nsig,   // significance {w, e, n, s}
  input  logic [3:0]      nsgn,   // signs        {w, e, n, s}, 1 = negative
  input  logic            sgn,    // sign of the coded sample
  output logic [CX_W-1:0] cx,
  output logic            d
);
  function automatic logic signed [2:0] contrib(input logic s, input logic neg);
    return s ? (neg ? -3'sd1 : 3'sd1) : 3'sd0;
  endfunction
  logic signed [2:0] hs, vs;
  logic xbit;
  always_comb begin
    hs = contrib(nsig[3], nsgn[3]) + contrib(nsig[2], nsgn[2]);
    vs = contrib(nsig[1], nsgn[1]) + contrib(nsig[0], nsgn[0]);
    if (hs > 0) hs = 3'sd1;
    if (hs < 0) hs = -3'sd1;
    if (vs > 0) vs = 3'sd1;
    if (vs < 0) vs = -3'sd1;
    xbit = 1'b0;
    if (hs == 0) begin
      cx   = (vs == 0) ? 4'd9 : 4'd10;
      xbit = (vs < 0);
    end else begin
      cx   = (vs == 0) ? 4'd12 : (vs == hs) ? 4'd13 : 4'd11;
      xbit = (hs < 0);
    end
    d = sgn ^ xbit;
  end
endmodule
