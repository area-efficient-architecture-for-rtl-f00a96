// shift_reg_2d: the 2D shift register bank of the context formation.  Four
// stripe columns of five 5-bit state words (the sample above the stripe and
// rows 0..3) slide one column left per shift:
//   xn  column j+2: newest, sigma~/mu known, rho not yet
//   xr  column j+1: rho known (written by the MSB pass generator on shift)
//   x0  column j  : being coded
//   xl  column j-1: left neighbours
// A 4-word staging column collects the incoming samples of column j+3, one
// per cycle; on a shift it becomes xn with the line-buffer word on top.  In
// the shift cycle the first sample of the next column may already be
// loaded.  clear empties the bank (bit-plane start); load_pad fills the staging
// column with insignificant samples (columns beyond the code-block).
// Four columns of five 5-bit words and the rho write-back follow the
// published architecture; the separate staging column is this design's own.
module shift_reg_2d
  import ebc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       shift,
  input  logic [3:0] rho_xn,    // rho of xn rows, from the MSB pass generator
  input  samp_t      top_s,     // word above the staging column
  input  logic       load,      // load one sample into the staging column
  input  samp_t      load_data,
  input  logic       load_pad,  // after this shift the staging column is padding
  output col_t       xl, x0, xr, xn,
  output col_t       s_col,     // staging column with top_s on top
  output logic       s_full,
  output logic [2:0] s_cnt      // samples held in the staging column
);
  samp_t [3:0] s_rows;

  assign s_full = (s_cnt == 3'd4);
  always_comb begin
    s_col    = {s_rows, top_s};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {xl, x0, xr, xn} <= '0;
      s_rows <= '0;
      s_cnt  <= '0;
    end else if (clear) begin
      {xl, x0, xr, xn} <= '0;
      s_rows <= '0;
      s_cnt  <= '0;
    end else begin
      if (shift) begin
        xl <= x0;
        x0 <= xr;
        xr <= xn;
        for (int r = 0; r < 4; r++) xr[r+1].rho <= rho_xn[r];
        xn <= s_col;
        s_rows <= '0;
        if (load_pad) s_cnt <= 3'd4;
        else if (load) begin
          s_rows[0] <= load_data;
          s_cnt     <= 3'd1;
        end else s_cnt <= 3'd0;
      end else if (load && s_cnt < 3'd4) begin
        s_rows[s_cnt[1:0]] <= load_data;
        s_cnt              <= s_cnt + 3'd1;
      end
    end
  end
endmodule
