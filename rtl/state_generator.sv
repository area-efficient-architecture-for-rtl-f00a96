// state_generator: derives the per-sample state variables of bit-plane k
// on the fly from the sign-magnitude coefficient, so no significance memory
// is kept between bit-planes.
//   sig = sigma~^k = OR of magnitude bits above k
//   gam = gamma^k  = sigma~^k & ~sigma~^(k+1)
//   mu  = magnitude bit k,  sgn = sign bit
// Purely combinational.  rho is not produced here; it comes from the MSB pass
// generator and is left 0.
// The two formulas follow the published algorithm; the packed word layout is
// this design's own.
module state_generator
  import ebc_pkg::*;
#(
  parameter int unsigned MW = MAG_W
) (
  input  logic [MW-1:0]         mag,    // coefficient magnitude
  input  logic                  sign,   // coefficient sign, 1 = negative
  input  logic [$clog2(MW)-1:0] plane,  // current bit-plane k
  output samp_t                 st
);
  logic [MW-1:0] above_k, above_k1;
  always_comb begin
    above_k  = mag >> (plane + 1);
    above_k1 = mag >> (plane + 2);
    st.rho = 1'b0;
    st.sig = |above_k;
    st.gam = (|above_k) & ~(|above_k1);
    st.sgn = sign;
    st.mu  = mag[plane];
  end
endmodule
