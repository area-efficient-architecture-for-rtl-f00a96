// output_buffer: seven-entry byte FIFO between the arithmetic encoder and the
// single byte output.  The encoder may deliver up to three bytes in a cycle
// (lanes 0..in_nbytes-1, one pass for all, in_last marking the final lane as
// the end of a codeword); one byte leaves per cycle when out_ready is high.
// free counts the empty entries including the one freed by this cycle's
// output, and the writer must not deliver more.  Each entry holds the byte,
// its pass and the end-of-codeword flag.
// Seven entries, 1 byte out per cycle, follow the published architecture;
// the pass tag, the end-of-codeword mark (11-bit entries) and the
// ready/valid output are this design's own.
module output_buffer
  import ebc_pkg::*;
#(
  parameter int unsigned DEPTH = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      in_nbytes,
  input  logic [2:0][7:0] in_bytes,
  input  pass_t           in_pass,
  input  logic            in_last,
  output logic [$clog2(DEPTH+1)-1:0] free,
  output logic            empty,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [7:0]      out_byte,
  output pass_t           out_pass,
  output logic            out_last
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  typedef struct packed {
    logic [7:0] b;
    pass_t      p;
    logic       l;
  } ent_t;

  ent_t    r [DEPTH];
  logic [CW-1:0] cnt;
  logic    pop;

  assign out_valid = (cnt != '0);
  assign empty     = (cnt == '0);
  assign pop       = out_valid && out_ready;
  assign free      = CW'(DEPTH) - cnt + CW'(pop);
  assign out_byte  = r[0].b;
  assign out_pass  = r[0].p;
  assign out_last  = r[0].l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
    end else begin
      logic [CW-1:0] base;
      base = cnt - CW'(pop);
      for (int i = 0; i < DEPTH; i++) begin
        if (pop && i < DEPTH - 1) r[i] <= r[i+1];
        for (int k = 0; k < 3; k++)
          if (k < int'(in_nbytes) && int'(base) + k == i)
            r[i] <= '{b: in_bytes[k], p: in_pass,
                      l: in_last && (k == int'(in_nbytes) - 1)};
      end
      cnt <= base + CW'(in_nbytes);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) CW'(in_nbytes) <= free);
endmodule
