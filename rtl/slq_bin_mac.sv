// slq_bin_mac: conventional-binary MAC for log-quantized and successive
// log-quantized (SLQ) weights, the binary counterpart of the SC-MAC datapath.
//
// A log-quantized weight q stands for w = sign(q) * 2^-|q| (q = 0: w = 0), so
// the product with a Q-bit fractional activation x is an arithmetic right
// shift, x >>> |q|, added to or subtracted from the accumulator y. An SLQ
// weight is a series of such words whose products are all added with the same
// x; the extension over a plain log-weight MAC is that the x register is held
// for the second word of a series. The series are found by slq_sequencer: in
// WF_SLQ the special code -M (5'b10000) announces that the next two words form
// one weight; in WF_SLQ_TAG bit 5 of a word says that the next word belongs to
// the same weight. WF_LOG takes sign-magnitude words {s, m} one per weight.
//
// Interface: one weight word per clock with in_valid (always accepted), with
// the activation x_in of its weight (ignored for the second word of a series);
// y is the registered saturating Q+A-bit sum, cleared by `clr` (which also
// resets the word parser); sat flags a saturating clock.
//
// The shift datapath, the held activation and both encodings follow the
// document; the accumulator width, the truncating shift and the treatment of
// q = 0 as a zero weight are this design's own.
module slq_bin_mac
  import sc_pkg::*;
#(
  parameter int unsigned Q = 16,
  parameter int unsigned A = 2,
  localparam int unsigned ACC_W = Q + A
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  wfmt_e                   fmt,
  input  logic                    in_valid,
  input  logic [LOGW:0]           w_word,
  input  logic signed [Q-1:0]     x_in,
  output logic signed [ACC_W-1:0] y,      // accumulator, Q-1 fraction bits
  output logic                    sat
);

  localparam logic signed [ACC_W+1:0] MAXV = (ACC_W+2)'((1 << (ACC_W - 1)) - 1);
  localparam logic signed [ACC_W+1:0] MINV = -(ACC_W+2)'(1 << (ACC_W - 1));

  logic                    t_valid, t_hold, t_wlast, in_ready, special;
  logic [LOGW:0]           t_word;
  logic signed [Q-1:0]     x_r, xsel;
  logic signed [LOGW-1:0]  q;
  logic                    neg;
  logic [LOGW-1:0]         m;
  logic signed [Q-1:0]     prod;
  logic signed [ACC_W+1:0] sum;

  slq_sequencer #(.Q(LOGW + 1)) u_seq (
    .clk(clk), .rst_n(rst_n), .clear(clr), .fmt(fmt),
    .in_valid(in_valid), .in_ready(in_ready), .in_word(w_word),
    .out_valid(t_valid), .out_ready(1'b1), .out_word(t_word),
    .out_hold(t_hold), .out_wlast(t_wlast), .special(special)
  );

  always_comb begin
    xsel = t_hold ? x_r : x_in;
    q    = $signed(t_word[LOGW-1:0]);
    if (fmt == WF_LOG) begin
      neg = t_word[LOGW-1];
      m   = LOGW'(t_word[LOGW-2:0]);
    end else begin
      neg = q[LOGW-1];
      m   = neg ? LOGW'(-q) : LOGW'(q);
    end
    prod = xsel >>> m;
    if (m == '0) prod = '0;
    sum  = (ACC_W+2)'(y) + (neg ? -(ACC_W+2)'(prod) : (ACC_W+2)'(prod));
    sat  = t_valid && ((sum > MAXV) || (sum < MINV));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= '0;
      x_r <= '0;
    end else if (clr) begin
      y   <= '0;
    end else if (t_valid) begin
      x_r <= xsel;
      if (sum > MAXV)      y <= ACC_W'(MAXV);
      else if (sum < MINV) y <= ACC_W'(MINV);
      else                 y <= ACC_W'(sum);
    end
  end

endmodule
