// mq_prob_table: probability estimation table of the MQ arithmetic coder
// (the 47 states of JPEG 2000 / JBIG2).  For a state index it returns the
// LPS probability Qe, the next state after an MPS, the next state after an
// LPS, and whether an LPS swaps the MPS sense.  Combinational ROM.
// The 47 entries are the JPEG 2000 MQ-coder table; the published
// architecture places the table in the first stage.
module mq_prob_table
  import ebc_pkg::*;
(
  input  logic [5:0] idx,
  output qe_entry_t  e
);
  always_comb begin
    unique case (idx)
      6'd0 : e = '{16'h5601, 6'd1, 6'd1, 1'b1};
      6'd1 : e = '{16'h3401, 6'd2, 6'd6, 1'b0};
      6'd2 : e = '{16'h1801, 6'd3, 6'd9, 1'b0};
      6'd3 : e = '{16'h0AC1, 6'd4, 6'd12, 1'b0};
      6'd4 : e = '{16'h0521, 6'd5, 6'd29, 1'b0};
      6'd5 : e = '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : e = '{16'h5601, 6'd7, 6'd6, 1'b1};
      6'd7 : e = '{16'h5401, 6'd8, 6'd14, 1'b0};
      6'd8 : e = '{16'h4801, 6'd9, 6'd14, 1'b0};
      6'd9 : e = '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: e = '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: e = '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: e = '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: e = '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: e = '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: e = '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: e = '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: e = '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: e = '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: e = '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: e = '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: e = '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: e = '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: e = '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: e = '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: e = '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: e = '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: e = '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: e = '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: e = '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: e = '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: e = '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: e = '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: e = '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: e = '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: e = '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: e = '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: e = '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: e = '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: e = '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: e = '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: e = '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: e = '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: e = '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: e = '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: e = '{16'h0001, 6'd45, 6'd43, 1'b0};
      6'd46: e = '{16'h5601, 6'd46, 6'd46, 1'b0};
      default: e = '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
  end
endmodule
