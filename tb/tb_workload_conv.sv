// tb_workload_conv: convolution layers of the two small networks run through
// the tile at its default size (256 lanes, 16-bit data, 2^4-bit parallelism).
//
// The testbench plays the host: it makes random input feature maps and
// filters, unrolls each filter window into activation vectors (one vector per
// filter tap, lane j holding the input pixel under tap k for output pixel j),
// loads the buffers, runs the passes and reads the results back.
//   1. A LeNet-style second convolution layer: 20 input maps of 12x12, 5x5
//      filters, one 8x8 output map in lanes 0..63 (the other lanes see zeros),
//      500 taps in one pass, precision 5, non-negative (half-range) inputs.
//   2. A CIFAR-10-style second convolution layer: 32 input maps, 5x5 filters,
//      a 16x16 block of one output map in all 256 lanes, 800 taps. The taps do
//      not fit the 512-entry input buffer, so they run as two passes, the
//      second accumulating onto the first; precision 9, signed inputs.
// Every lane is compared with the bit-serial reference, and the multiplier's
// busy clocks with sum(ceil(|W|/16)). The layer shapes are the usual Caffe
// models for these data sets; the precisions are those the networks are run
// at.
module tb_workload_conv;
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
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one layer: Z input maps, KxK filter, OR x OC output pixels in the lanes,
  // precision p, taps split into passes of at most XD vectors
  task automatic conv_layer(input int z_n, input int k_n, input int or_n, input int oc_n,
                            input int p, input bit xs_signed, input int wmax);
    int taps = z_n * k_n * k_n;
    int ir = or_n + k_n - 1, ic = oc_n + k_n - 1;
    int done_taps = 0, npass = 0;
    logic [Q-1:0] fm [];
    logic [Q-1:0] words [$];
    logic [LANES-1:0][Q-1:0] xv [$];
    fm = new[z_n * ir * ic];
    // activations: signed in (-0.5, 0.5), or non-negative in [0, 0.5)
    foreach (fm[i]) fm[i] = xs_signed ? Q'($signed(Q'($urandom_range(0, 32767))) - 16384)
                                      : Q'($urandom_range(0, 16383));
    // filter taps at p bits: |W| <= wmax stream bits
    for (int t = 0; t < taps; t++) begin
      automatic int wv = int'($urandom_range(0, 2 * wmax)) - wmax;
      words.push_back(Q'(wv * (1 << (Q - p))));
    end
    // im2col: vector t = (z, i, j), lane = r * oc_n + c
    for (int t = 0; t < taps; t++) begin
      automatic logic [LANES-1:0][Q-1:0] v = '0;
      automatic int z = t / (k_n * k_n), i = (t / k_n) % k_n, j = t % k_n;
      for (int r = 0; r < or_n; r++)
        for (int c = 0; c < oc_n; c++)
          v[r * oc_n + c] = fm[(z * ir + r + i) * ic + c + j];
      xv.push_back(v);
    end
    for (int t = 0; t < taps; t++) write_w(t, words[t]);
    while (done_taps < taps) begin
      automatic int n = (taps - done_taps > XD) ? XD : taps - done_taps;
      automatic logic [Q-1:0] wq [$] = words[done_taps : done_taps + n - 1];
      automatic logic [LANES-1:0][Q-1:0] xq [$] = xv[done_taps : done_taps + n - 1];
      for (int t = 0; t < n; t++) write_x(t, xq[t]);
      run_pass(0, p, xs_signed, n, done_taps, 0, 0, done_taps == 0, wq, xq);
      done_taps += n;
      npass++;
    end
    $display("layer Z=%0d K=%0d out %0dx%0d p=%0d: %0d taps in %0d passes", z_n, k_n, or_n, oc_n,
             p, taps, npass);
  endtask

  initial begin
    host_reset();
    conv_layer(20, 5, 8, 8, 5, 1'b0, 2);
    conv_layer(32, 5, 16, 16, 9, 1'b1, 24);
    // the second layer needs the multi-pass accumulation and multi-clock terms
    checks++; if (n_accum == 0 || n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
