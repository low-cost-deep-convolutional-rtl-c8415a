// weight_decoder: shared log-to-linear converter and precision scaler for the
// weight operand of the stochastic-computing multiplier.
//
// A weight w in (-1, 1) is turned into the number of bitstream cycles the
// multiplication runs, |W| = |w| * 2^(p-1), and its sign. p is the software
// precision chosen at run time (dynamic precision scaling); the selector FSM and
// the lanes do not depend on p.
//   WF_LINEAR   W = word >>> (Q-p): the top p bits of a MSB-aligned Q-bit two's
//               complement fraction.
//   WF_LOG      sign-magnitude {s, m}: |W| = 2^(p-1-m), 0 for m = 0 or m > p-1.
//   WF_SLQ/_TAG two's complement q: s = (q < 0), m = |q|, then as WF_LOG.
// For log formats the converter is a shifter, and |W| has a single one; `pos`
// gives its position when it lies in the HWP low bits (used by the simplified
// ones counter once fewer than b = 2^HWP bitstream cycles remain), `is_pow2`
// flags words whose |W| is a power of two or zero.
//
// Purely combinational. The formats and |w| = 2^-m follow the document; the
// truncation of 2^(p-1-m) to zero when m exceeds p-1 is this design's choice.
module weight_decoder
  import sc_pkg::*;
#(
  parameter int unsigned Q = 16
) (
  input  logic [Q-1:0]  word,     // weight word, log formats in the low bits
  input  wfmt_e         fmt,
  input  logic [4:0]    prec,     // software precision p, 2..Q
  output logic          sign,     // 1: w < 0
  output logic [Q-1:0]  wabs,     // |W| = number of bitstream cycles
  output logic          is_pow2,  // |W| has at most one bit set
  output logic [4:0]    pos       // position of that bit
);

  logic signed [Q-1:0]  wlin;
  logic [LOGW-2:0]      mag_sm;   // sign-magnitude magnitude
  logic signed [LOGW-1:0] q;
  logic [LOGW-1:0]      qabs;
  logic [5:0]           m;
  int                   sh;

  always_comb begin
    sign    = 1'b0;
    wabs    = '0;
    is_pow2 = 1'b1;
    pos     = '0;
    wlin    = $signed(word) >>> (Q - int'(prec));
    mag_sm  = word[LOGW-2:0];
    q       = $signed(word[LOGW-1:0]);
    qabs    = q[LOGW-1] ? LOGW'(-q) : LOGW'(q);
    m       = '0;
    sh      = 0;
    if (fmt == WF_LINEAR) begin
      sign    = wlin[Q-1];
      wabs    = sign ? Q'(-wlin) : Q'(wlin);
      is_pow2 = 1'b0;
    end else begin
      if (fmt == WF_LOG) begin
        sign = word[LOGW-1];
        m    = 6'(mag_sm);
      end else begin
        sign = q[LOGW-1];
        m    = 6'(qabs);
      end
      sh = int'(prec) - 1 - int'(m);
      if (m != 0 && sh >= 0) begin
        wabs = Q'(1) << sh;
        pos  = 5'(sh);
      end
    end
  end

endmodule
