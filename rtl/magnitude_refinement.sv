// magnitude_refinement: refinement context of a significant sample, as an
// index local to pass 2: 0 = first refinement, no significant neighbour;
// 1 = first refinement, some neighbour significant; 2 = later refinement.
// The first refinement is recognised by gamma^k.  The decision is mu^k.
// Combinational.
// The contexts are those of JPEG 2000; the local numbering 0..2 is this
// design's own.
module magnitude_refinement
  import ebc_pkg::*;
(
  input  logic            gam,
  input  logic [7:0]      nsig,
  output logic [CX_W-1:0] cx
);
  always_comb begin
    if (!gam)       cx = 4'd2;
    else if (|nsig) cx = 4'd1;
    else            cx = 4'd0;
  end
endmodule
