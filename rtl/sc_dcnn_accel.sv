// sc_dcnn_accel: convolution tile of a stochastic-computing DCNN accelerator.
//
// Convolution layers are computed by a matrix-vector multiplier built from
// stochastic-computing MACs, while everything outside the multiplier stays
// conventional binary: the buffers hold binary words, and the multiplier takes
// binary activations and weights and returns binary sums. A product x*w is made
// by counting the ones of x's low-discrepancy bitstream for |w|*2^(p-1) cycles,
// so its latency shrinks with small weights and with lower precision p, and
// with 2^HWP bits processed per clock most products finish in a clock or two.
// The weight side (decoder, down counter, selector FSM) is shared by the LANES
// lanes, which all use the same weight, as every output pixel of one output map
// does in a convolution.
//
// Blocks: input buffer (activation vectors, LANES x Q bits per entry), weight
// buffer (Q-bit weight words), output buffer (ACC_W-bit results), tile_ctrl
// (pass sequencing, SLQ parsing, FIFO, result draining) and bisc_mvm.
//
// Host interface: the buffers are loaded and read through the x_*, w_* and o_*
// ports while the tile is idle; a pass is launched with `start` together with
// cfg (weight format, precision p, x signedness), the weight word count and the
// buffer base addresses, and `done` pulses when its results are in the output
// buffer (with `drain`) or in the accumulators (without). `clear` zeroes the
// accumulators first; leaving it low accumulates over several passes.
// `mvm_sat` shows lanes whose accumulator saturated in the current clock.
// With ZERO_SKIP set, terms whose weight is zero at the pass's precision are
// dropped by the controller and cost the multiplier no clock.
//
// Three smaller designs from the same work stand beside the tile with their
// own ports: the conventional LFSR-based bit-parallel SC-MAC with an
// approximate parallel counter (apc_*), a tile-parallel array of such MACs
// sharing their stochastic number generators (tile_*), and the shift-based
// binary MAC for log/SLQ-quantized weights (slq_*). They share nothing with
// the convolution tile.
//
// The multiplier array and its sizes (256 MACs, 16-bit data, 2^4-bit
// parallelism, two extra accumulator bits) follow the document; the buffer
// depths, the host-side ports and the pass protocol are this design's own.
module sc_dcnn_accel
  import sc_pkg::*;
#(
  parameter int unsigned LANES      = 256,
  parameter int unsigned Q          = 16,
  parameter int unsigned HWP        = 4,
  parameter int unsigned A          = 2,
  parameter int unsigned XBUF_DEPTH = 512,
  parameter int unsigned WBUF_DEPTH = 1024,
  parameter int unsigned OBUF_DEPTH = 512,
  parameter bit          ZERO_SKIP  = 1'b1,
  parameter int unsigned APC_N      = 128,
  parameter int unsigned APC_Q      = 16,
  parameter int unsigned TILE_TM    = 4,
  parameter int unsigned TILE_TR    = 4,
  parameter int unsigned TILE_TC    = 4,
  localparam int unsigned ACC_W = Q + A,
  localparam int unsigned XAW   = $clog2(XBUF_DEPTH),
  localparam int unsigned WAW   = $clog2(WBUF_DEPTH),
  localparam int unsigned OAW   = $clog2(OBUF_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host access to the buffers
  input  logic                     x_we,
  input  logic [XAW-1:0]           x_waddr,
  input  logic [LANES-1:0][Q-1:0]  x_wdata,
  input  logic                     w_we,
  input  logic [WAW-1:0]           w_waddr,
  input  logic [Q-1:0]             w_wdata,
  input  logic                     o_re,
  input  logic [OAW-1:0]           o_raddr,
  output logic [ACC_W-1:0]         o_rdata,
  // pass command
  input  logic                     start,
  input  mvm_cfg_t                 cfg,
  input  logic [WAW:0]             n_words,
  input  logic [WAW-1:0]           wbase,
  input  logic [XAW-1:0]           xbase,
  input  logic [OAW-1:0]           obase,
  input  logic                     clear,
  input  logic                     drain,
  output logic                     busy,
  output logic                     done,
  output logic [LANES-1:0]         mvm_sat,
  // conventional SC-MAC with approximate parallel counter
  input  logic                     apc_clr,
  input  logic                     apc_en,
  input  logic signed [APC_Q-1:0]  apc_x,
  input  logic signed [APC_Q-1:0]  apc_w,
  output logic signed [APC_Q+A-1:0] apc_acc,
  output logic                     apc_sat,
  // tile-parallel array of conventional SC-MACs
  input  logic                     tile_clr,
  input  logic                     tile_en,
  input  logic [TILE_TM-1:0][APC_Q-1:0]         tile_w,
  input  logic [TILE_TR*TILE_TC-1:0][APC_Q-1:0] tile_x,
  output logic signed [APC_Q+A-1:0] tile_y [TILE_TM*TILE_TR*TILE_TC],
  output logic                     tile_sat,
  // binary shift MAC for log / SLQ weights
  input  logic                     slq_clr,
  input  wfmt_e                    slq_fmt,
  input  logic                     slq_valid,
  input  logic [LOGW:0]            slq_word,
  input  logic signed [Q-1:0]      slq_x,
  output logic signed [ACC_W-1:0]  slq_y,
  output logic                     slq_sat
);

  logic                    w_re, x_re, o_we;
  logic [WAW-1:0]          w_raddr;
  logic [XAW-1:0]          x_raddr;
  logic [OAW-1:0]          o_waddr;
  logic [ACC_W-1:0]        o_wdata;
  logic [Q-1:0]            w_rdata;
  logic [LANES-1:0][Q-1:0] x_rdata;

  logic                    t_valid, t_ready, t_hold;
  logic [Q-1:0]            t_word;
  wfmt_e                   t_fmt;
  logic [LANES-1:0][Q-1:0] t_x;
  logic [4:0]              prec;
  logic                    xis;
  logic                    acc_clr;
  logic                    mvm_busy;
  logic                    mvm_last;
  logic signed [ACC_W-1:0] acc [LANES];

  buffer_ram #(.DW(LANES * Q), .DEPTH(XBUF_DEPTH)) u_xbuf (
    .clk(clk), .we(x_we), .waddr(x_waddr), .wdata(x_wdata),
    .re(x_re), .raddr(x_raddr), .rdata(x_rdata)
  );

  buffer_ram #(.DW(Q), .DEPTH(WBUF_DEPTH)) u_wbuf (
    .clk(clk), .we(w_we), .waddr(w_waddr), .wdata(w_wdata),
    .re(w_re), .raddr(w_raddr), .rdata(w_rdata)
  );

  buffer_ram #(.DW(ACC_W), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk(clk), .we(o_we), .waddr(o_waddr), .wdata(o_wdata),
    .re(o_re), .raddr(o_raddr), .rdata(o_rdata)
  );

  tile_ctrl #(
    .LANES(LANES), .Q(Q), .ACC_W(ACC_W),
    .XBUF_DEPTH(XBUF_DEPTH), .WBUF_DEPTH(WBUF_DEPTH), .OBUF_DEPTH(OBUF_DEPTH),
    .ZERO_SKIP(ZERO_SKIP)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .start(start), .cfg(cfg), .n_words(n_words), .wbase(wbase), .xbase(xbase),
    .obase(obase), .clear(clear), .drain(drain), .busy(busy), .done(done),
    .w_re(w_re), .w_raddr(w_raddr), .w_rdata(w_rdata),
    .x_re(x_re), .x_raddr(x_raddr), .x_rdata(x_rdata),
    .o_we(o_we), .o_waddr(o_waddr), .o_wdata(o_wdata),
    .t_valid(t_valid), .t_ready(t_ready), .t_word(t_word), .t_fmt(t_fmt),
    .t_hold(t_hold), .t_x(t_x), .prec(prec), .xis(xis), .acc_clr(acc_clr),
    .mvm_busy(mvm_busy), .acc(acc)
  );

  bisc_mvm #(.LANES(LANES), .Q(Q), .HWP(HWP), .A(A)) u_mvm (
    .clk(clk), .rst_n(rst_n),
    .t_valid(t_valid), .t_ready(t_ready), .t_word(t_word), .t_fmt(t_fmt),
    .t_hold(t_hold), .t_x(t_x), .prec(prec), .xis(xis), .acc_clr(acc_clr),
    .busy(mvm_busy), .last(mvm_last), .acc(acc), .sat(mvm_sat)
  );

  apc_sc_mac #(.N(APC_N), .Q(APC_Q), .A(A), .APPROX(1'b1)) u_apc (
    .clk(clk), .rst_n(rst_n), .clr(apc_clr), .en(apc_en), .x(apc_x), .w(apc_w),
    .acc(apc_acc), .sat(apc_sat)
  );

  sc_compute_tile #(
    .TM(TILE_TM), .TR(TILE_TR), .TC(TILE_TC), .N(APC_N), .Q(APC_Q), .A(A), .APPROX(1'b1)
  ) u_tile (
    .clk(clk), .rst_n(rst_n), .clr(tile_clr), .en(tile_en), .w(tile_w), .x(tile_x),
    .y(tile_y), .sat(tile_sat)
  );

  slq_bin_mac #(.Q(Q), .A(A)) u_slq (
    .clk(clk), .rst_n(rst_n), .clr(slq_clr), .fmt(slq_fmt), .in_valid(slq_valid),
    .w_word(slq_word), .x_in(slq_x), .y(slq_y), .sat(slq_sat)
  );

endmodule
