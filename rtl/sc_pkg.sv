// sc_pkg: types shared by the binary-interfaced stochastic-computing (BISC)
// matrix-vector multiplier and the convolution tile around it.
//
// Weight words reach the multiplier in one of four formats, chosen at run time:
//   WF_LINEAR   Q-bit two's complement fraction, MSB aligned; at precision p only
//               its top p bits are used (dynamic precision scaling, DPS).
//   WF_LOG      sign-magnitude log word: bit LOGW-1 is the sign, the LOGW-1 low
//               bits hold m, and |w| = 2^-m (m = 0 encodes w = 0).
//   WF_SLQ      successive log-quantization, special-code scheme: LOGW-bit two's
//               complement q with w = sign(q)*2^-|q|; the most negative code -M
//               announces that the next two words form one weight.
//   WF_SLQ_TAG  successive log-quantization, tagging scheme: a (LOGW+1)-bit word
//               {tag, q}; tag = 1 means the next word belongs to the same weight.
package sc_pkg;

  typedef enum logic [1:0] {
    WF_LINEAR  = 2'd0,
    WF_LOG     = 2'd1,
    WF_SLQ     = 2'd2,
    WF_SLQ_TAG = 2'd3
  } wfmt_e;

  // Width of a log / SLQ weight word (sign + 4-bit magnitude for a 16-bit datapath).
  localparam int unsigned LOGW = 5;

  // Run-time configuration of one pass of the tile.
  typedef struct packed {
    wfmt_e       wfmt;   // weight word format
    logic [4:0]  prec;   // software precision p (2..Q), including the sign bit
    logic        xis;    // 1: x is signed; 0: half-range specialization (x >= 0)
  } mvm_cfg_t;

endpackage
