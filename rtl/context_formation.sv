// context_formation: the CF module.  For one bit-plane it reads every
// coefficient of the code-block once, in stripe order (stripes of four rows,
// column by column, top to bottom), derives the state variables on the fly
// and produces the CXD pairs of all three coding passes in that single scan.
//
// Pipeline: state generator -> staging column -> 2D shift register bank.
// When a column moves from xn to xr its rho is computed by the MSB pass
// generator, which needs the sigma~ of the staging column (one column ahead
// of coding).  The centre column x0 is coded one row per cycle: the pass and
// contribution generator feeds the ZC, MR and SC context logic, and the
// run-length block emits 0..4 CXD pairs into the FIFO.  Row 3 of each column
// is written to the line buffer for the next stripe when its rho is known.
//
// Interface: start (pulse, with plane and band stable until done) begins a
// bit-plane; coef_req/coef_row/coef_col ask for one coefficient, returned in
// the same cycle on coef_mag/coef_sign.  The pairs of a cycle are written
// only if fifo_free >= out_count, otherwise coding stalls.  busy drops after
// the last pair of the plane has been handed over.
// Timing: four cycles per column when the FIFO does not stall.  Stripes
// follow each other without draining the pipeline: the first column of the
// next stripe enters right behind the last column of the current one, and
// the neighbour column across that boundary is replaced by zeros.  Filling
// the pipeline at the start of a bit-plane and draining it at the end add 13
// cycles, so a bit-plane takes (H/4)*4*W+13 cycles plus one for every cycle
// the FIFO lacked room.
// The single-scan algorithm, the column look-ahead for rho, the 64 x 5 line
// buffer and the 0..4 pairs per cycle follow the published architecture; the
// staging column, the column-wide shift and the masking at stripe boundaries
// are this design's own.
module context_formation
  import ebc_pkg::*;
#(
  parameter int unsigned W  = 64,     // code-block width
  parameter int unsigned H  = 64,     // code-block height, multiple of 4
  parameter int unsigned MW = MAG_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [$clog2(MW)-1:0] plane,
  input  band_t                 band,
  output logic                  busy,
  output logic                  coef_req,
  output logic [$clog2(H)-1:0]  coef_row,
  output logic [$clog2(W)-1:0]  coef_col,
  input  logic [MW-1:0]         coef_mag,
  input  logic                  coef_sign,
  input  logic [2:0]            fifo_free,
  output logic [2:0]            out_count,
  output pass_t                 out_pass,
  output logic [3:0][CX_W:0]    out_cxd
);
  localparam int unsigned NSTRIPE = H / 4;
  localparam int unsigned CW = $clog2(W + 4) + 1;

  logic [$clog2(NSTRIPE+1)-1:0] stripe;
  logic [CW-1:0] scol;        // column index of the staging column
  logic [1:0]    crow;        // row of x0 being coded
  logic          cdone;       // x0 fully coded, waiting for the shift

  col_t  xl, x0, xr, xn, s_col;
  logic  s_full;
  samp_t st_in, top_s, lb_rd;
  samp_t xr_next_row3;      // row 3 of the column entering xr, with its rho
  logic [3:0] rho_xn;

  // ---- control --------------------------------------------------------
  logic coding, code_fire, shift, load, load_pad, last_col, clear;
  logic [2:0] rl_count;
  logic [CW-1:0] lcol;
  logic [2:0]    lrow;

  logic last_stripe, wrap, x0_real;
  logic [$clog2(NSTRIPE+1)-1:0] lstripe;

  // The columns form one stream across stripes: x0 holds column scol-3 of
  // the staging column's stripe, or, just after the wrap, column W-3+scol of
  // the previous stripe.  Only in stripe 0 are the first three positions
  // empty.
  assign last_stripe = stripe == $bits(stripe)'(NSTRIPE - 1);
  assign x0_real  = (scol >= CW'(3)) || (stripe != '0);
  assign coding   = busy && x0_real && !cdone;
  assign code_fire = coding && (rl_count <= fifo_free);
  assign shift    = busy && s_full && (!coding || (code_fire && crow == 2'd3));
  assign wrap     = shift && !last_stripe && scol == CW'(W - 1);
  assign last_col = shift && last_stripe && scol == CW'(W + 2);
  assign clear    = last_col;
  assign lcol     = wrap ? '0 : shift ? scol + CW'(1) : scol;
  assign lstripe  = wrap ? stripe + 1'b1 : stripe;
  assign load_pad = shift && !wrap && (scol + CW'(1) >= CW'(W));
  assign load     = busy && !clear && (lcol < CW'(W)) && (shift || !s_full);
  logic [2:0] s_cnt;    // samples already in the staging column
  assign lrow     = shift ? 3'd0 : s_cnt;

  assign coef_req = load;
  assign coef_row = $clog2(H)'(lstripe * 4 + lrow);
  assign coef_col = lcol[$clog2(W)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; stripe <= '0; scol <= '0; crow <= '0; cdone <= 1'b0;
    end else if (start && !busy) begin
      busy <= 1'b1; stripe <= '0; scol <= '0; crow <= '0; cdone <= 1'b0;
    end else if (busy) begin
      if (shift) begin
        crow  <= '0;
        cdone <= 1'b0;
        scol  <= lcol;
        stripe <= lstripe;
        if (last_col) busy <= 1'b0;
      end else if (code_fire) begin
        if (crow == 2'd3) cdone <= 1'b1;
        else              crow  <= crow + 2'd1;
      end
    end
  end

  // ---- datapath -------------------------------------------------------
  state_generator #(.MW(MW)) u_sg (
    .mag(coef_mag), .sign(coef_sign), .plane(plane), .st(st_in));

  line_buffer #(.DEPTH(W)) u_lb (
    .clk, .we(shift && ((scol >= CW'(1) && scol <= CW'(W)) || (scol == '0 && stripe != '0))),
    .waddr((scol == '0) ? ($clog2(W))'(W - 1) : ($clog2(W))'(scol - CW'(1))),
    .wdata(xr_next_row3),
    .raddr(scol[$clog2(W)-1:0]), .rdata(lb_rd));

  always_comb begin
    xr_next_row3     = xn[4];
    xr_next_row3.rho = rho_xn[3];
  end
  assign top_s = (stripe == '0 || scol >= CW'(W)) ? samp_t'('0) : lb_rd;

  shift_reg_2d u_sr (
    .clk, .rst_n, .clear(clear || (start && !busy)), .shift,
    .rho_xn, .top_s, .load, .load_data(st_in), .load_pad,
    .xl, .x0, .xr, .xn, .s_col, .s_full, .s_cnt);

  // Where a stripe ends, the next stripe's first column follows directly in
  // the stream.  The neighbour column across that boundary is replaced by
  // zeros: for xn when it is the first (scol 1) or last (scol 0, W) column of
  // its stripe, for x0 when it is the first (scol 3) or last (scol 2, W+2).
  col_t xl_m, xr_m, xr_mp, s_col_m;
  always_comb begin
    xr_mp   = (scol == CW'(1)) ? col_t'('0) : xr;
    s_col_m = (scol == '0 || scol == CW'(W)) ? col_t'('0) : s_col;
    xl_m    = (scol == CW'(3)) ? col_t'('0) : xl;
    xr_m    = (scol == CW'(2) || scol == CW'(W + 2)) ? col_t'('0) : xr;
  end

  msb_pass_generator u_mpg (.left(xr_mp), .cur(xn), .right(s_col_m), .rho(rho_xn));

  // ---- coding of x0 row crow -----------------------------------------
  pass_t      pass;
  logic [7:0] nsig;
  logic [CX_W-1:0] zc_cx, mr_cx, sc_cx;
  logic       sc_d;
  logic       rl_col;
  logic       c_gam, c_sgn;   // state of the sample being coded

  pass_contrib_generator u_pcg (
    .left(xl_m), .cur(x0), .right(xr_m), .row(crow), .pass, .nsig);

  always_comb begin
    c_gam = x0[crow + 1].gam;
    c_sgn = x0[crow + 1].sgn;
  end

  zero_coding u_zc (.nsig, .band, .cx(zc_cx));
  magnitude_refinement u_mr (.gam(c_gam), .nsig, .cx(mr_cx));
  sign_coding u_sc (
    .nsig({nsig[4], nsig[3], nsig[6], nsig[1]}),
    .nsgn({xl_m[crow+1].sgn, xr_m[crow+1].sgn, x0[crow].sgn,
           (crow == 2'd3) ? 1'b0 : x0[crow+2].sgn}),
    .sgn(c_sgn), .cx(sc_cx), .d(sc_d));

  // Run-length qualification of x0: every row in pass 3 (insignificant and
  // no pass-1 neighbour) and nothing significant around the column.
  always_comb begin
    rl_col = 1'b1;
    for (int r = 1; r <= 4; r++) begin
      rl_col &= ~x0[r].sig & ~x0[r].rho;
      rl_col &= ~(xl_m[r].sig | xl_m[r].mu);
      rl_col &= ~(xr_m[r].sig | (xr_m[r].mu & xr_m[r].rho));
    end
    rl_col &= ~(xl_m[0].sig | xl_m[0].mu) & ~(x0[0].sig | x0[0].mu) &
              ~(xr_m[0].sig | xr_m[0].mu);
  end

  logic [3:0] col_mu;
  always_comb for (int r = 0; r < 4; r++) col_mu[r] = x0[r+1].mu;

  run_length_coding u_rl (
    .row(crow), .pass, .rl_col, .col_mu, .zc_cx, .mr_cx, .sc_cx, .sc_d,
    .count(rl_count), .out_pass, .cxd(out_cxd));

  assign out_count = code_fire ? rl_count : 3'd0;
endmodule
