// tb_sc_dcnn_accel_full: the convolution tile at its default size (256 lanes,
// 16-bit data, 2^4-bit parallelism, 512/1024/512-entry buffers), with no
// parameter changed. It runs a short linear pass, an SLQ pass with special
// codes and a log pass that accumulates onto it, then checks all 256 results
// of each against the bit-serial reference and the multiplier's busy clocks
// against sum(ceil(|W|/b)); it also runs worked products through the designs
// beside the tile (SLQ shift MAC, SC-MAC, SC-MAC array) at their default sizes.
module tb_sc_dcnn_accel_full;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;
  localparam int LANES = 256, Q = 16, HWP = 4, ACC_W = Q + 2, XD = 512, WD = 1024, OD = 512;
  localparam int XAW = $clog2(XD), WAW = $clog2(WD), OAW = $clog2(OD);

  logic clk = 0, rst_n = 0;
  logic x_we, w_we, o_re, start, clear, drain, busy, done;
  logic [XAW-1:0] x_waddr, xbase;
  logic [WAW-1:0] w_waddr, wbase;
  logic [OAW-1:0] o_raddr, obase;
  logic [LANES-1:0][Q-1:0] x_wdata;
  logic [Q-1:0] w_wdata;
  logic [ACC_W-1:0] o_rdata;
  logic [WAW:0] n_words;
  mvm_cfg_t cfg;
  logic [LANES-1:0] mvm_sat;
  logic apc_clr, apc_en, apc_sat, slq_clr, slq_valid, slq_sat;
  localparam int AN = 128, AQ = 16, TT = 4, TNP = TT * TT;
  logic signed [AQ-1:0] apc_x, apc_w;
  logic signed [AQ+1:0] apc_acc;
  logic tile_clr, tile_en, tile_sat;
  logic [TT-1:0][AQ-1:0] tile_w;
  logic [TNP-1:0][AQ-1:0] tile_x;
  logic signed [AQ+1:0] tile_y [TT*TNP];
  wfmt_e slq_fmt;
  logic [5:0] slq_word;
  logic signed [Q-1:0] slq_x;
  logic signed [ACC_W-1:0] slq_y;
  always #5 clk = ~clk;

  sc_dcnn_accel dut (.*);

`include "tb_accel_tasks.svh"

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [Q-1:0] words [$];
    logic [LANES-1:0][Q-1:0] xv [$];
    host_reset();
    side_macs();
    // pass 1: linear, p = 12, small weights
    words = {}; xv = {};
    for (int k = 0; k < 12; k++) words.push_back(Q'($signed(Q'($urandom_range(0, 1023))) - 512));
    for (int k = 0; k < 12; k++) begin
      automatic logic [LANES-1:0][Q-1:0] v;
      for (int j = 0; j < LANES; j++) v[j] = Q'($urandom);
      xv.push_back(v);
    end
    for (int k = 0; k < 12; k++) write_w(100 + k, words[k]);
    for (int k = 0; k < 12; k++) write_x(300 + k, xv[k]);
    run_pass(0, 12, 1'b1, 12, 100, 300, 200, 1'b1, words, xv);
    // pass 2: SLQ with two special codes, p = 10
    words = '{16'h0003, 16'h0010, 16'h0002, 16'h0004, 16'h001e, 16'h0010, 16'h0001, 16'h001d, 16'h0005, 16'h0000};
    for (int k = 0; k < 10; k++) write_w(900 + k, words[k]);
    run_pass(2, 10, 1'b1, 10, 900, 300, 0, 1'b1, words, xv);
    // pass 3: log sign-magnitude, accumulating on pass 2, half-range x
    words = '{16'h0001, 16'h0013, 16'h0002, 16'h0000, 16'h0015, 16'h0003};
    for (int k = 0; k < 6; k++) write_w(990 + k, words[k]);
    xv = xv[4:$];
    run_pass(1, 10, 1'b0, 6, 990, 304, 0, 1'b0, words, xv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
