// ebc_controller: sequences the coding of one code-block.  On start it
// resets the coder's context states, then for each bit-plane from
// num_planes-1 down to 0 it starts a context-formation scan, waits until the
// scan, the FIFO and the arithmetic encoder are empty, and has the encoder
// terminate the codewords of the passes used in that bit-plane.  done pulses
// once the last byte has left the output buffer.
// The published architecture gives only the existence and size of a control
// block; the sequence here (bit-plane loop, drain, flush, done) is this
// design's own.
module ebc_controller #(
  parameter int unsigned MW = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [$clog2(MW+1)-1:0] num_planes,  // non-zero magnitude bit-planes
  input  logic                  cf_busy,
  input  logic                  fifo_empty,
  input  logic                  ae_idle,
  input  logic                  ob_empty,
  output logic                  cf_start,
  output logic [$clog2(MW)-1:0] plane,
  output logic                  ae_init,
  output logic                  ae_flush,
  output logic                  busy,
  output logic                  done
);
  typedef enum logic [2:0] {S_IDLE, S_GO, S_RUN, S_FLUSH, S_FWAIT, S_DRAIN} state_t;
  state_t st;

  assign cf_start = (st == S_GO);
  assign ae_flush = (st == S_FLUSH);
  assign ae_init  = (st == S_IDLE) && start;
  assign busy     = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; plane <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE:  if (start) begin
                   if (num_planes == '0) st <= S_DRAIN;
                   else begin
                     plane <= $bits(plane)'(num_planes - 1'b1);
                     st    <= S_GO;
                   end
                 end
        S_GO:    st <= S_RUN;
        S_RUN:   if (!cf_busy && fifo_empty && ae_idle) st <= S_FLUSH;
        S_FLUSH: st <= S_FWAIT;
        S_FWAIT: if (ae_idle) begin
                   if (plane == '0) st <= S_DRAIN;
                   else begin
                     plane <= plane - 1'b1;
                     st    <= S_GO;
                   end
                 end
        S_DRAIN: if (ob_empty) begin
                   st   <= S_IDLE;
                   done <= 1'b1;
                 end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
