// dfe_pkg: constants and types shared by the pipelined DLMS decision feedback
// equaliser.
//
// The received samples are 8-bit two's complement numbers (IN_W). Each one is
// coded once, at the equaliser input, as a 2-term signed power-of-two (2-SPT)
// number: x ~ s1*2^g1 + s2*2^g2 with s in {-1,0,+1}. Each term is a pot_t:
// nz=0 means the term is zero, otherwise its value is (neg ? -1 : +1) * 2^exp.
// A 3-bit exponent covers every power of two an 8-bit integer can need.
// The 8-bit input and the two terms follow the document; the bit-level coding
// is this design's own.
//
// Decisions and training symbols are QPSK points +-1+-j. A qpsk_t holds one
// sign bit per component (1 = -1). A dec_t adds a valid bit. When the valid
// bit is clear the symbol counts as zero wherever it is fed back.
//
// sym_mode_e tags every sample as it enters. IDLE means no symbol (used to
// fill or flush the pipeline). TRAIN means the training symbol is the
// reference and the weights adapt. DATA means the slicer decision is the
// reference and the weights are held.
package dfe_pkg;

  localparam int unsigned IN_W  = 8;  // input sample wordlength
  localparam int unsigned SPT_N = 2;  // POT terms per input component
  localparam int unsigned EXP_W = 3;  // exponent bits of one POT term
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1;

  typedef struct packed {
    logic             nz;   // term is non-zero
    logic             neg;  // term is negative
    logic [EXP_W-1:0] exp;  // power of two
  } pot_t;

  typedef pot_t [SPT_N-1:0] spt_t;  // one real component, 2-SPT coded

  typedef struct packed {
    spt_t re;
    spt_t im;
  } cspt_t;  // one complex sample, 2-SPT coded

  typedef struct packed {
    logic re_neg;
    logic im_neg;
  } qpsk_t;

  typedef struct packed {
    logic  valid;
    qpsk_t sym;
  } dec_t;

  typedef enum logic [1:0] {
    SYM_IDLE  = 2'd0,
    SYM_TRAIN = 2'd1,
    SYM_DATA  = 2'd2
  } sym_mode_e;

  // A +-1 value as a single POT term, 1.0 being 2^frac_x in the data scale.
  function automatic pot_t sign_pot(input logic valid, input logic neg,
                                    input logic [EXP_W-1:0] frac_x);
    pot_t t;
    t.nz  = valid;
    t.neg = neg;
    t.exp = frac_x;
    return t;
  endfunction

endpackage
