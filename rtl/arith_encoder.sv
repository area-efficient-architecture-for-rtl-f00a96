// arith_encoder: pass-switching MQ arithmetic encoder.  The three coding
// passes of a bit-plane are coded at the same time, so there are three
// suites of coding-status registers (A, C, CT, byte register and a 16-entry
// context state table each) and one set of processing elements that
// switches suite with the pass of every CXD pair.
//   Stage 1: read the context state, look up Qe, update the interval A,
//            the context state (index and MPS) and find the renormalisation
//            shift.  The state is written back here, so a following pair in
//            the same context needs no look-ahead.
//   Stage 2: add to C, renormalise and byte-out in one cycle (mq_code_update).
// One pair is accepted per cycle.  flush_req terminates the codeword of
// every suite that coded a pair since its last flush, one suite per cycle,
// and restarts those suites' A, C and CT; context states are kept until
// init (start of a code-block).  Bytes leave in lanes 0..out_nbytes-1 with
// their pass; out_last marks the final byte of a codeword.  Stage 2 waits
// while the output buffer has fewer than out_nbytes free entries.
// The pass switching, the three register suites, the two stages and the in-
// stage probability update follow the published architecture; the MQ
// algorithm is that of JPEG 2000. Context states kept per pass, the flush of
// every used suite at the end of each bit-plane and the byte lanes with pass
// and end marks are this design's own.
module arith_encoder
  import ebc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            in_valid,
  input  cxd_t            in,
  output logic            in_pop,
  input  logic            flush_req,
  output logic            idle,
  input  logic [2:0]      ob_free,
  output logic [1:0]      out_nbytes,
  output logic [2:0][7:0] out_bytes,
  output pass_t           out_pass,
  output logic            out_last
);
  // ---- coding status register bank -----------------------------------
  logic [15:0] a_reg  [3];
  logic [5:0]  ix_reg [3][NCTX];
  logic        mps_reg[3][NCTX];
  logic [2:0]  used, pend;
  logic [27:0] c_reg  [3];
  logic [3:0]  ct_reg [3];
  logic [7:0]  b_reg  [3];
  logic        bv_reg [3];

  // ---- stage 2 pipeline register ------------------------------------
  logic        v2, fl2;
  logic [1:0]  s2;        // suite 0..2
  logic [15:0] add2;
  logic [3:0]  n2;

  // ---- stage 2 ------------------------------------------------------
  logic [27:0] c_nx;
  logic [3:0]  ct_nx;
  logic [7:0]  b_nx;
  logic        bv_nx, last_nx, adv2;
  logic [1:0]  nb_nx;
  logic [2:0][7:0] by_nx;

  mq_code_update u_cu (
    .c_in(c_reg[s2]), .ct_in(ct_reg[s2]), .b_in(b_reg[s2]), .bvalid_in(bv_reg[s2]),
    .add(add2), .nshift(n2), .flush(fl2),
    .c_out(c_nx), .ct_out(ct_nx), .b_out(b_nx), .bvalid_out(bv_nx),
    .nbytes(nb_nx), .bytes(by_nx), .last(last_nx));

  assign adv2       = v2 && ({1'b0, nb_nx} <= ob_free);
  assign out_nbytes = adv2 ? nb_nx : 2'd0;
  assign out_bytes  = by_nx;
  assign out_pass   = pass_t'(s2 + 2'd1);
  assign out_last   = adv2 && last_nx;

  // ---- stage 1 ------------------------------------------------------
  logic       s1_ready, do_flush;
  logic [1:0] fsuite, esuite;
  qe_entry_t  e;
  logic [15:0] a_sub, a_new;
  logic [15:0] add1;
  logic [3:0]  n1;
  logic        mps_new;
  logic [5:0]  ix_new;
  logic        cur_mps;

  assign s1_ready = !v2 || adv2;
  assign do_flush = s1_ready && (pend != 3'b0);
  assign fsuite   = pend[0] ? 2'd0 : pend[1] ? 2'd1 : 2'd2;
  assign esuite   = in.pass - 2'd1;
  assign in_pop   = in_valid && s1_ready && (pend == 3'b0) && !flush_req;
  assign idle     = !v2 && (pend == 3'b0) && !flush_req && !in_valid;

  mq_prob_table u_pt (.idx(ix_reg[esuite][in.cx]), .e);

  function automatic logic [3:0] lzc16(input logic [15:0] x);
    lzc16 = 4'd0;
    for (int i = 0; i < 16; i++)
      if (x[15-i]) return 4'(i);
  endfunction

  always_comb begin
    cur_mps = mps_reg[esuite][in.cx];
    a_sub   = a_reg[esuite] - e.qe;
    mps_new = cur_mps;
    if (in.d == cur_mps) begin
      ix_new = e.nmps;
      if (!a_sub[15]) begin
        if (a_sub < e.qe) begin a_new = e.qe;  add1 = 16'd0; end
        else              begin a_new = a_sub; add1 = e.qe;  end
        n1 = lzc16(a_new);
      end else begin
        ix_new = ix_reg[esuite][in.cx];
        a_new  = a_sub; add1 = e.qe; n1 = 4'd0;
      end
    end else begin
      ix_new = e.nlps;
      if (a_sub < e.qe) begin a_new = a_sub; add1 = e.qe;  end
      else              begin a_new = e.qe;  add1 = 16'd0; end
      if (e.sw) mps_new = ~cur_mps;
      n1 = lzc16(a_new);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; fl2 <= 1'b0; s2 <= '0; add2 <= '0; n2 <= '0;
      used <= '0; pend <= '0;
      for (int s = 0; s < 3; s++) begin
        a_reg[s] <= 16'h8000; c_reg[s] <= '0; ct_reg[s] <= 4'd12;
        b_reg[s] <= '0; bv_reg[s] <= 1'b0;
        for (int k = 0; k < NCTX; k++) begin
          ix_reg[s][k]  <= init_state(pass_t'(s + 1), 4'(k));
          mps_reg[s][k] <= 1'b0;
        end
      end
    end else if (init) begin
      v2 <= 1'b0; used <= '0; pend <= '0;
      for (int s = 0; s < 3; s++) begin
        a_reg[s] <= 16'h8000; c_reg[s] <= '0; ct_reg[s] <= 4'd12;
        b_reg[s] <= '0; bv_reg[s] <= 1'b0;
        for (int k = 0; k < NCTX; k++) begin
          ix_reg[s][k]  <= init_state(pass_t'(s + 1), 4'(k));
          mps_reg[s][k] <= 1'b0;
        end
      end
    end else begin
      // stage 2 write-back
      if (adv2) begin
        c_reg[s2] <= c_nx; ct_reg[s2] <= ct_nx; b_reg[s2] <= b_nx; bv_reg[s2] <= bv_nx;
      end
      if (s1_ready) v2 <= 1'b0;
      // stage 1
      if (flush_req && pend == 3'b0) begin
        pend <= used;
      end else if (do_flush) begin
        v2   <= 1'b1; fl2 <= 1'b1; s2 <= fsuite;
        add2 <= a_reg[fsuite]; n2 <= '0;
        a_reg[fsuite] <= 16'h8000;
        pend[fsuite]  <= 1'b0;
        used[fsuite]  <= 1'b0;
      end else if (in_pop) begin
        v2   <= 1'b1; fl2 <= 1'b0; s2 <= esuite;
        add2 <= add1; n2 <= n1;
        a_reg[esuite]           <= a_new << n1;
        ix_reg[esuite][in.cx]   <= ix_new;
        mps_reg[esuite][in.cx]  <= mps_new;
        used[esuite]            <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_pop |-> in.pass != PASS_NONE);
endmodule
