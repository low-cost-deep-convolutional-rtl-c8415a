// apc_sc_mac: conventional bit-parallel stochastic-computing MAC with an
// approximate parallel counter, the SC-MAC of the first tile-parallel design.
//
// x and w are Q-bit two's complement numbers read as bipolar values in [-1, 1).
// N LFSR-based SNGs (one LFSR per bit, each feeding both operands) turn them
// into N stream bits per clock; an XNOR per bit multiplies them (bipolar SC
// multiplication). The N product bits go to apc_pc_acc, an approximate
// parallel counter (pairs reduced to one bit, N/2 bits counted, count doubled)
// merged with a saturating up/down accumulator of Q+A bits, which adds
// (ones - zeros) = 2*ones - N each clock. After L stream bits the
// accumulator holds about L * x * w / 2^(2Q-2) (in units of one stream bit),
// i.e. x*w in Q-1 fractional bits after 2^(Q-1) bits (2^(Q-1)/N clocks).
//
// Interface: `clr` zeroes the accumulator and reseeds the SNGs; each clock with
// `en` consumes N bits. acc is registered; sat flags a saturating clock.
//
// The XNOR multiplier, the 128-bit parallelism with N to N/2 approximate
// counting, the 16-bit data and the saturating accumulator with A = 2 extra
// bits follow the document; the SNG seeds and the interface are this
// design's own.
module apc_sc_mac #(
  parameter int unsigned N      = 128,
  parameter int unsigned Q      = 16,
  parameter int unsigned A      = 2,
  parameter bit          APPROX = 1'b1,
  localparam int unsigned ACC_W = Q + A
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,  // zero the accumulator, restart the LFSRs
  input  logic                    en,
  input  logic signed [Q-1:0]     x,    // bipolar activation, Q-1 fraction bits
  input  logic signed [Q-1:0]     w,    // bipolar weight, Q-1 fraction bits
  output logic signed [ACC_W-1:0] acc,  // accumulated sum, Q-1 fraction bits
  output logic                    sat
);

  logic [N-1:0]  xb, wb;
  logic          sng_rst_n;

  assign sng_rst_n = rst_n && !clr;

  for (genvar i = 0; i < N; i++) begin : g_sng
    logic [Q-1:0] r_unused;
    lfsr_sng #(.Q(Q), .SEED(16'(1 + 37 * i))) u_sng (
      .clk(clk), .rst_n(sng_rst_n), .en(en),
      .value_a({~x[Q-1], x[Q-2:0]}), .value_b({~w[Q-1], w[Q-2:0]}),
      .bit_a(xb[i]), .bit_b(wb[i]), .rnd(r_unused)
    );
  end

  apc_pc_acc #(.N(N), .ACC_W(ACC_W), .APPROX(APPROX)) u_pc (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .pb(~(xb ^ wb)), .acc(acc), .sat(sat)
  );

endmodule
