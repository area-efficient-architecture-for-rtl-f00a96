// ebc_top: embedded block coder (tier-1 of JPEG 2000) for one code-block.
// Context formation (CF) -> 4-entry CXD FIFO -> pass-switching MQ arithmetic
// encoder (AE) -> 7-entry output buffer (OB), sequenced by the controller.
// All three coding passes of a bit-plane are formed in one scan of the
// code-block, so a code-block with N non-zero bit-planes is read N times,
// about four cycles per stripe column each time.
//
// Interface: pulse start with num_planes and band held until done.  The coder
// fetches coefficients itself: while coef_req is high, coef_mag/coef_sign
// must give the sign-magnitude coefficient at (coef_row, coef_col) in the
// same cycle.  Bytes leave on out_byte when out_valid && out_ready, tagged
// with their pass (1, 2, 3); out_last marks the last byte of the codeword of
// one pass of one bit-plane.  done pulses after the last byte.
// The four modules (context formation, FIFO, arithmetic encoder, output
// buffer) and their sizes follow the published architecture; the coefficient
// read port, the control and status ports and the back-pressure chain are
// this design's own.
module ebc_top
  import ebc_pkg::*;
#(
  parameter int unsigned W  = 64,
  parameter int unsigned H  = 64,
  parameter int unsigned MW = MAG_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(MW+1)-1:0] num_planes,
  input  band_t                   band,
  output logic                    coef_req,
  output logic [$clog2(H)-1:0]    coef_row,
  output logic [$clog2(W)-1:0]    coef_col,
  input  logic [MW-1:0]           coef_mag,
  input  logic                    coef_sign,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [7:0]              out_byte,
  output pass_t                   out_pass,
  output logic                    out_last,
  output logic                    busy,
  output logic                    done
);
  logic cf_start, cf_busy, ae_init, ae_flush, ae_idle, ob_empty;
  logic [$clog2(MW)-1:0] plane;
  logic [2:0] cf_count, fifo_free, ob_free;
  pass_t      cf_pass;
  logic [3:0][CX_W:0] cf_cxd;
  logic       f_valid, f_pop;
  cxd_t       f_out;
  logic [1:0] ae_nb;
  logic [2:0][7:0] ae_bytes;
  pass_t      ae_pass;
  logic       ae_last;

  ebc_controller #(.MW(MW)) u_ctl (
    .clk, .rst_n, .start, .num_planes, .cf_busy, .fifo_empty(!f_valid),
    .ae_idle, .ob_empty, .cf_start, .plane, .ae_init, .ae_flush, .busy, .done);

  context_formation #(.W(W), .H(H), .MW(MW)) u_cf (
    .clk, .rst_n, .start(cf_start), .plane, .band, .busy(cf_busy),
    .coef_req, .coef_row, .coef_col, .coef_mag, .coef_sign,
    .fifo_free, .out_count(cf_count), .out_pass(cf_pass), .out_cxd(cf_cxd));

  cxd_fifo u_fifo (
    .clk, .rst_n, .in_count(cf_count), .in_pass(cf_pass), .in_cxd(cf_cxd),
    .free(fifo_free), .out_valid(f_valid), .out_pop(f_pop), .out(f_out));

  arith_encoder u_ae (
    .clk, .rst_n, .init(ae_init), .in_valid(f_valid), .in(f_out), .in_pop(f_pop),
    .flush_req(ae_flush), .idle(ae_idle), .ob_free,
    .out_nbytes(ae_nb), .out_bytes(ae_bytes), .out_pass(ae_pass), .out_last(ae_last));

  output_buffer u_ob (
    .clk, .rst_n, .in_nbytes(ae_nb), .in_bytes(ae_bytes), .in_pass(ae_pass),
    .in_last(ae_last), .free(ob_free), .empty(ob_empty),
    .out_valid, .out_ready, .out_byte, .out_pass, .out_last);
endmodule
