// ebc_pkg: types and constants shared by the embedded block coder.
//
// A code-block sample is held in the context formation as a 5-bit state
// word {rho, sigma~, gamma, sign, mu^k}.  Contexts travel as a 4-bit index
// that is local to the coding pass (pass 1 and 3: ZC 0..8, SC 9..13,
// RL 14, UNI 15; pass 2: MR 0..2), so that with the 2-bit pass and the
// 1-bit decision a FIFO entry is 7 bits wide.
// The 10 magnitude bit-planes, the 5-bit state word and the 7-bit FIFO word
// follow the published architecture; the local context numbering and the
// type names are this design's own. The initial context states are those of
// JPEG 2000.
package ebc_pkg;

  localparam int unsigned MAG_W = 10;   // magnitude bit-planes 0..9
  localparam int unsigned CX_W  = 4;    // per-pass context index
  localparam int unsigned NCTX  = 16;   // contexts per coding-status suite

  // Coding pass numbering, 2 bits (value 0 unused).
  typedef enum logic [1:0] {
    PASS_NONE = 2'd0,
    PASS_SPP  = 2'd1,   // pass 1, significance propagation
    PASS_MRP  = 2'd2,   // pass 2, magnitude refinement
    PASS_CUP  = 2'd3    // pass 3, cleanup
  } pass_t;

  // State word of one sample in the shift register bank and line buffer.
  typedef struct packed {
    logic rho;     // MSB of the sample is coded in pass 1 of this bit-plane
    logic sig;     // sigma~^k: non-zero bit above bit-plane k
    logic gam;     // gamma^k: first non-zero bit is at bit-plane k+1
    logic sgn;     // sign (1 = negative)
    logic mu;      // magnitude bit at bit-plane k
  } samp_t;

  // One stripe column of the window: index 0 is the sample above the stripe
  // (last row of the previous stripe), 1..4 are stripe rows 0..3.
  typedef samp_t [4:0] col_t;

  // Context/decision pair with its pass (one FIFO word).
  typedef struct packed {
    pass_t          pass;
    logic [CX_W-1:0] cx;
    logic           d;
  } cxd_t;

  localparam logic [CX_W-1:0] CX_RL  = 4'd14;
  localparam logic [CX_W-1:0] CX_UNI = 4'd15;

  // Subband of the code-block, selects the zero-coding table.
  typedef enum logic [1:0] {
    BAND_LL = 2'd0,
    BAND_HL = 2'd1,
    BAND_LH = 2'd2,
    BAND_HH = 2'd3
  } band_t;

  // One entry of the MQ probability estimation table.
  typedef struct packed {
    logic [15:0] qe;
    logic [5:0]  nmps;
    logic [5:0]  nlps;
    logic        sw;
  } qe_entry_t;

  // Initial probability state of a context after code-block start.
  function automatic logic [5:0] init_state(input pass_t p, input logic [CX_W-1:0] cx);
    if (p == PASS_MRP)                    return 6'd0;
    else if (cx == 4'd0)                  return 6'd4;
    else if (p == PASS_CUP && cx == CX_RL)  return 6'd3;
    else if (p == PASS_CUP && cx == CX_UNI) return 6'd46;
    else                                  return 6'd0;
  endfunction

endpackage
