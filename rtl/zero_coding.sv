// zero_coding: zero-coding context (0..8) of an insignificant sample from
// the significance of its eight neighbours, with the JPEG 2000 tables for
// the LL/LH, HL and HH subbands.  h, v and d count significant horizontal,
// vertical and diagonal neighbours; for HL h and v swap roles.
// Combinational.
// The contexts are those of JPEG 2000 for each subband; the published
// architecture names the block without giving its insides.
module zero_coding
  import ebc_pkg::*;
(
  input  logic [7:0]      nsig,   // {nw, n, ne, w, e, sw, s, se}
  input  band_t           band,
  output logic [CX_W-1:0] cx
);
  logic [1:0] h, v, hh, vv;
  logic [2:0] d, hv;
  always_comb begin
    h = 2'(nsig[4]) + 2'(nsig[3]);
    v = 2'(nsig[6]) + 2'(nsig[1]);
    d = 3'(nsig[7]) + 3'(nsig[5]) + 3'(nsig[2]) + 3'(nsig[0]);
    hh = (band == BAND_HL) ? v : h;
    vv = (band == BAND_HL) ? h : v;
    hv = 3'(h) + 3'(v);
    if (band == BAND_HH) begin
      if (d >= 3)      cx = 4'd8;
      else if (d == 2) cx = (hv >= 1) ? 4'd7 : 4'd6;
      else if (d == 1) cx = (hv >= 2) ? 4'd5 : (hv == 1) ? 4'd4 : 4'd3;
      else             cx = (hv >= 2) ? 4'd2 : (hv == 1) ? 4'd1 : 4'd0;
    end else begin
      if (hh == 2)      cx = 4'd8;
      else if (hh == 1) cx = (vv >= 1) ? 4'd7 : (d >= 1) ? 4'd6 : 4'd5;
      else if (vv == 2) cx = 4'd4;
      else if (vv == 1) cx = 4'd3;
      else              cx = (d >= 2) ? 4'd2 : (d == 1) ? 4'd1 : 4'd0;
    end
  end
endmodule
