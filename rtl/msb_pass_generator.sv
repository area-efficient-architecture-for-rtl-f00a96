// msb_pass_generator: computes rho, the coding pass of the current bit of
// each sample of one stripe column (1 = pass 1), one column ahead of the
// context formation.  A sample is in pass 1 when it is insignificant and at
// least one neighbour contributes:
//   neighbour scanned before c:  phi = sigma~ | (rho & mu)
//   neighbour scanned after c:   phi = sigma~
// The rows of the column are chained top to bottom, so row r sees the rho
// just computed for row r-1.  Rows of the next stripe count as insignificant
// (vertically causal context window).  Combinational.
// The rule, and running it one column ahead of coding, follow the published
// algorithm; computing a whole column at once is this design's own.
module msb_pass_generator
  import ebc_pkg::*;
(
  input  col_t       left,   // column j-1, rho valid in every entry
  input  col_t       cur,    // column j, rho valid only in entry 0 (row above)
  input  col_t       right,  // column j+1, rho valid only in entry 0
  output logic [3:0] rho     // rho of rows 0..3 of column j
);
  function automatic logic pre(input samp_t s);
    return s.sig | (s.rho & s.mu);
  endfunction

  logic [4:0] rho_c;   // rho of cur entries 0..4 (0 = row above)
  always_comb begin
    rho_c    = '0;
    rho_c[0] = cur[0].rho;
    for (int i = 1; i <= 4; i++) begin
      logic any;
      samp_t up;
      up     = cur[i-1];
      up.rho = rho_c[i-1];
      // scanned before: whole left column, the sample above
      any = pre(left[i-1]) | pre(left[i]) | pre(up);
      if (i < 4) any |= pre(left[i+1]) | cur[i+1].sig | right[i+1].sig;
      // right column: the entry above row 0 belongs to the previous stripe
      if (i == 1) any |= pre(right[0]);
      else        any |= right[i-1].sig;
      any |= right[i].sig;
      rho_c[i] = ~cur[i].sig & any;
    end
    rho = rho_c[4:1];
  end
endmodule
