// pass_contrib_generator: for the sample c in row r of the centre column it
// returns the coding pass of c in this bit-plane and whether each of
// its eight neighbours is significant at the moment c is coded:
//   scanned before c: P=3 -> sigma~|mu,        else sigma~|(mu&rho)
//   scanned after  c: P=1 -> sigma~,           else sigma~|(mu&rho)
// Neighbour order in nsig: {nw, n, ne, w, e, sw, s, se}.  Samples below row 3
// are in the next stripe and count as insignificant.  Combinational.
// The pass rule and the contribution rules follow the published algorithm;
// treating the row above as already coded and the row below as insignificant
// (the causal context window) is this design's reading of a design that
// stores only the previous stripe's last row.
module pass_contrib_generator
  import ebc_pkg::*;
(
  input  col_t       left,
  input  col_t       cur,
  input  col_t       right,   // all three with rho valid
  input  logic [1:0] row,     // r, 0..3
  output pass_t      pass,
  output logic [7:0] nsig     // {nw, n, ne, w, e, sw, s, se}
);
  samp_t nb [8];
  logic  prec [8];
  always_comb begin
    int i;
    logic any;
    i = int'(row) + 1;
    nb[0] = left[i-1];  prec[0] = 1'b1;
    nb[1] = cur[i-1];   prec[1] = 1'b1;
    nb[2] = right[i-1]; prec[2] = (row == 2'd0);
    nb[3] = left[i];    prec[3] = 1'b1;
    nb[4] = right[i];   prec[4] = 1'b0;
    nb[5] = (i < 4) ? left[i+1]  : '0;  prec[5] = 1'b1;
    nb[6] = (i < 4) ? cur[i+1]   : '0;  prec[6] = 1'b0;
    nb[7] = (i < 4) ? right[i+1] : '0;  prec[7] = 1'b0;
    any = 1'b0;
    for (int n = 0; n < 8; n++)
      any |= prec[n] ? (nb[n].sig | (nb[n].rho & nb[n].mu)) : nb[n].sig;
    if (cur[i].sig) pass = PASS_MRP;
    else if (any)   pass = PASS_SPP;
    else            pass = PASS_CUP;
    for (int n = 0; n < 8; n++) begin
      if (prec[n])
        nsig[7-n] = (pass == PASS_CUP) ? (nb[n].sig | nb[n].mu)
                                       : (nb[n].sig | (nb[n].mu & nb[n].rho));
      else
        nsig[7-n] = (pass == PASS_SPP) ? nb[n].sig
                                       : (nb[n].sig | (nb[n].mu & nb[n].rho));
    end
  end
endmodule
