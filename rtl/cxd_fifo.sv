// cxd_fifo: four-entry shift FIFO between the context formation and the
// arithmetic encoder.  Each entry is 7 bits: 2-bit pass, 4-bit context,
// decision.  Up to four entries are written per cycle (in_count, entries
// in_cxd[0..in_count-1], all with in_pass); one entry is read per cycle from
// R0.  The writer must keep in_count <= free, where free already counts the
// entry popped in the same cycle.  R0 shifts down on a pop and new entries
// land right behind the remaining ones.
// Four 7-bit entries with 0..4 writes and one read per cycle follow the
// published architecture; the free count handed back to the writer and the
// all-or-nothing write are this design's own.
module cxd_fifo
  import ebc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          in_count,
  input  pass_t               in_pass,
  input  logic [3:0][CX_W:0]  in_cxd,
  output logic [2:0]          free,
  output logic                out_valid,
  input  logic                out_pop,
  output cxd_t                out
);
  cxd_t        r [DEPTH];
  logic [2:0]  cnt;
  logic        pop;

  assign out_valid = (cnt != 3'd0);
  assign out       = r[0];
  assign pop       = out_pop && out_valid;
  assign free      = 3'(DEPTH) - cnt + {2'b0, pop};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
    end else begin
      logic [2:0] base;
      base = cnt - {2'b0, pop};
      for (int i = 0; i < DEPTH; i++) begin
        if (pop && i < DEPTH - 1) r[i] <= r[i+1];
        for (int k = 0; k < 4; k++)
          if (k < int'(in_count) && int'(base) + k == i)
            r[i] <= '{pass: in_pass, cx: in_cxd[k][CX_W:1], d: in_cxd[k][0]};
      end
      cnt <= base + in_count;
    end
  end

  // The writer never offers more than there is room for.
  assert property (@(posedge clk) disable iff (!rst_n) in_count <= free);
endmodule
