// iqmc_pkg: types and constants shared by the inverse-quantization and
// multichannel (IQ/MC) processor core for MPEG-2 audio Layer I/II.
//
// All datapath words are 24-bit two's complement fixed point (the 24-bit
// word length is the design's; the binary point, 20 fraction bits giving a
// range of [-8, 8), is a choice of this implementation so that the scale
// factors (up to 2.0), denormalisation factors (up to 4.4) and the
// dematrixing sums fit without a second format).
//
// A granule is 15 samples: 5 transmission channels T0..T4, 3 consecutive
// samples each.  The schedule of one granule is 47 clock cycles (Phase I:
// requantization, Phase II: rescaling, crosstalk, channel switching and
// dematrixing, Phase III: denormalisation).
package iqmc_pkg;

  localparam int unsigned WORD_W   = 24;  // word length of every unit
  localparam int unsigned WORD_FRAC = 20; // fraction bits of a word
  localparam int unsigned NCH      = 5;   // transmission / audio channels
  localparam int unsigned PERIOD   = 47;  // cycles per granule
  localparam int unsigned NQCLASS  = 17;  // Layer II quantization classes
  localparam int unsigned NSF      = 63;  // scale factor indices 0..62

  typedef logic signed [WORD_W-1:0] word_t;

  // Audio channel names used for the channel tags of the outputs.
  typedef enum logic [2:0] {
    CH_L  = 3'd0,
    CH_R  = 3'd1,
    CH_C  = 3'd2,
    CH_LS = 3'd3,
    CH_RS = 3'd4
  } chan_e;

  // Operation of an ADD/SUB unit.  A is the R0 register, B is the second
  // operand (the D' table or the FIFO feedback).
  typedef enum logic [2:0] {
    OP_PASS_A = 3'd0,  // load R0
    OP_PASS_B = 3'd1,  // keep the recirculated value
    OP_ADD    = 3'd2,  // B + A
    OP_SUB    = 3'd3,  // B - A
    OP_RSUB   = 3'd4   // A - B
  } addsub_op_e;

  // Source of FIFO1's first register.
  typedef enum logic {
    F1_CHAIN = 1'b0,   // FIFO0 output (shift chain / A_y^w <- A_x^w copy)
    F1_ADD   = 1'b1    // ADD/SUB1 result
  } f1_src_e;

  // Which table the coefficient ROM reads.
  typedef enum logic [1:0] {
    TBL_C  = 2'd0,     // requantization factor C of a quantization class
    TBL_SF = 2'd1,     // scale factor
    TBL_N  = 2'd2      // weighting x denormalisation factor
  } tbl_e;

  // Side information of one granule (one subband).
  typedef struct packed {
    logic [NCH-1:0][4:0] qclass;   // quantization class per channel, 0..16
    logic [NCH-1:0][5:0] sf_idx;   // scale factor index per channel, 0..62
    logic [NCH-1:0][2:0] sf_src;   // dynamic crosstalk: channel whose SF is used
    logic [2:0]          tc_alloc; // tc_allocation, 3/2 configuration
    logic [1:0]          dematrix; // dematrix procedure, 3 = no dematrixing
  } gran_info_t;

  // Per-granule dematrixing programme produced by iqmc_dem_decode.
  // Index k is the transmission channel T_k present in R0.
  typedef struct packed {
    addsub_op_e [NCH-1:0] op0;    // ADD/SUB0 operation while R0 holds T_k
    addsub_op_e [NCH-1:0] op1;    // ADD/SUB1 operation while R0 holds T_k
    f1_src_e    [NCH-1:0] f1src;  // FIFO1 source while R0 holds T_k
    chan_e      [NCH-1:0] tag;    // audio channel left in FIFO f
  } dem_prog_t;

endpackage
