// run_length_coding: assembles the context/decision (CXD) pairs of the sample
// being coded, 0 to 4 per cycle, and applies the run-length mode of the
// cleanup pass.  A column is run-length coded when all four samples are in
// pass 3 and none has a significant neighbour outside the column (rl_col).
// In such a column:
//   all four bits zero  -> row 0 emits RL(0)
//   first 1 at row f    -> row f emits RL(1), UNI(f[1]), UNI(f[0]), SC(f);
//                          rows above f emit nothing, rows below are coded
//                          normally
// Otherwise pass 1 and pass 3 samples emit ZC and, when the bit is 1, SC;
// pass 2 samples emit MR.  All pairs of one cycle share one pass.
// Combinational; the whole column is visible, so no delay line is needed.
// Up to four pairs in one cycle and the pass tag follow the published
// architecture; run-length mode itself is JPEG 2000's. Emitting the pairs of
// a failed run in the cycle of its first 1 is this design's own.
module run_length_coding
  import ebc_pkg::*;
(
  input  logic [1:0]      row,
  input  pass_t           pass,
  input  logic            rl_col,   // column qualifies for run-length coding
  input  logic [3:0]      col_mu,   // mu^k of rows 0..3
  input  logic [CX_W-1:0] zc_cx,
  input  logic [CX_W-1:0] mr_cx,
  input  logic [CX_W-1:0] sc_cx,
  input  logic            sc_d,
  output logic [2:0]      count,
  output pass_t           out_pass,
  output logic [3:0][CX_W:0] cxd    // {cx, d}, cxd[0] first
);
  logic [1:0] f;
  logic       mu;
  always_comb begin
    f = 2'd3;
    for (int r = 3; r >= 0; r--) if (col_mu[r]) f = 2'(r);
    mu       = col_mu[row];
    count    = 3'd0;
    cxd      = '0;
    out_pass = pass;
    if (pass == PASS_MRP) begin
      count  = 3'd1;
      cxd[0] = {mr_cx, mu};
    end else if (pass == PASS_CUP && rl_col && (col_mu == 4'b0 || row <= f)) begin
      if (col_mu == 4'b0) begin
        if (row == 2'd0) begin
          count  = 3'd1;
          cxd[0] = {CX_RL, 1'b0};
        end
      end else if (row == f) begin
        count  = 3'd4;
        cxd[0] = {CX_RL, 1'b1};
        cxd[1] = {CX_UNI, f[1]};
        cxd[2] = {CX_UNI, f[0]};
        cxd[3] = {sc_cx, sc_d};
      end
    end else if (pass != PASS_NONE) begin
      count  = mu ? 3'd2 : 3'd1;
      cxd[0] = {zc_cx, mu};
      cxd[1] = {sc_cx, sc_d};
    end
  end
endmodule
