// tb_sc_dcnn_accel: end-to-end test of the convolution tile at reduced size
// (8 lanes, small buffers; 16-bit data and 2^4-bit parallelism as by default).
// The host loads activation vectors and weight words through the buffer ports,
// runs passes in every weight format (linear, log, SLQ special code, SLQ
// tagging), at several precisions, with signed and half-range activations,
// with and without clearing between passes, and reads the results back from the
// output buffer. Each result is compared with a bit-serial reference, and the
// multiplier's busy clocks with sum(ceil(|W|/b)). Every mechanism (special
// code, held activation, stall, saturation, multi-clock and partial columns,
// zero weight, zero skipping, log counter, HRS, DPS, accumulation over
// passes) must occur. It also runs worked products through the designs beside
// the tile (binary SLQ shift MAC, approximate-counter SC-MAC with its
// saturation, conventional SC-MAC array).
module tb_sc_dcnn_accel;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;
  localparam int LANES = 8, Q = 16, HWP = 4, ACC_W = Q + 2, XD = 32, WD = 64, OD = 32;
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
  localparam int AN = 8, AQ = 9, TT = 2, TNP = TT * TT;
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

  sc_dcnn_accel #(.LANES(LANES), .XBUF_DEPTH(XD), .WBUF_DEPTH(WD), .OBUF_DEPTH(OD),
                  .APC_N(AN), .APC_Q(AQ), .TILE_TM(TT), .TILE_TR(TT), .TILE_TC(TT)) dut (.*);

`include "tb_accel_tasks.svh"

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [Q-1:0] rand_word(input int f);
    logic [Q-1:0] w = Q'($urandom);
    if (f == 0) begin
      // mostly small weights, as in trained networks, some large, some zero
      case ($urandom_range(0, 5))
        0: w = '0;
        1, 2, 3: w = Q'($signed(Q'($urandom_range(0, 4095))) - 2048);
        default: ;
      endcase
    end else if (f == 1) w = Q'($urandom_range(0, 31));
    else if (f == 2) begin
      w = Q'($urandom_range(0, 31));
      if (w[4:0] == 5'b10000) w = 16'd1;
    end else w = Q'($urandom_range(0, 63));
    return w;
  endfunction

  initial begin
    host_reset();
    side_macs();
    for (int pass = 0; pass < 20; pass++) begin
      automatic int f = pass % 4;
      automatic int p = (pass < 4 || pass == 8) ? Q : $urandom_range(4, Q);
      automatic bit xs = (pass % 5 != 4);
      automatic bit clr = (pass % 3 != 2);
      automatic bit satp = (pass == 8);
      automatic int nw = $urandom_range(8, 24);
      automatic int wb = $urandom_range(0, WD - 25), xb = $urandom_range(0, 4), ob = $urandom_range(0, OD - LANES);
      logic [Q-1:0] words [$];
      logic [LANES-1:0][Q-1:0] xv [$];
      words = {}; xv = {};
      for (int k = 0; k < nw; k++) begin
        automatic logic [Q-1:0] w = rand_word(f);
        if (f == 2 && k < nw - 2 && $urandom_range(0, 3) == 0) begin
          words.push_back(16'h0010); words.push_back(rand_word(2)); words.push_back(rand_word(2));
          k += 2;
        end else begin
          if (satp) w = 16'h7fff;
          words.push_back(w);
        end
      end
      while (words.size() > nw) void'(words.pop_back());
      // a trailing special code would wait for words that never come
      if (f == 2 && words[words.size() - 1][4:0] == 5'b10000) words[words.size() - 1] = 16'd2;
      if (f == 2 && words.size() >= 2 && words[words.size() - 2][4:0] == 5'b10000) words[words.size() - 2] = 16'd3;
      for (int k = 0; k < nw; k++) begin
        automatic logic [LANES-1:0][Q-1:0] v;
        for (int j = 0; j < LANES; j++) begin
          v[j] = Q'($urandom);
          if (satp) v[j] = 16'h7000;
        end
        xv.push_back(v);
      end
      for (int k = 0; k < nw; k++) write_w(wb + k, words[k]);
      for (int k = 0; k < nw; k++) write_x(xb + k, xv[k]);
      run_pass(f, p, xs, nw, wb, xb, ob, clr, words, xv);
    end
    checks++; if (n_special == 0) begin failures++; $display("no special code"); end
    checks++; if (n_hold == 0)    begin failures++; $display("no held activation"); end
    checks++; if (n_stall == 0)   begin failures++; $display("no stall"); end
    checks++; if (n_sat == 0)     begin failures++; $display("no saturation"); end
    checks++; if (n_multi == 0)   begin failures++; $display("no multi-clock term"); end
    checks++; if (n_partial == 0) begin failures++; $display("no partial column"); end
    checks++; if (n_zero == 0)    begin failures++; $display("no zero weight"); end
    checks++; if (n_skip == 0)    begin failures++; $display("no zero skipped"); end
    checks++; if (n_skip_hold == 0) begin failures++; $display("no skipped first SLQ word"); end
    checks++; if (n_logcnt == 0)  begin failures++; $display("log counter unused"); end
    checks++; if (n_hrs == 0)     begin failures++; $display("no half-range pass"); end
    checks++; if (n_dps == 0)     begin failures++; $display("no reduced precision"); end
    checks++; if (n_accum == 0)   begin failures++; $display("no accumulation over passes"); end
    for (int f = 0; f < 4; f++) begin checks++; if (n_fmt[f] == 0) failures++; end
    $display("mechanisms: special %0d hold %0d stall %0d sat %0d multi %0d partial %0d zero %0d logcnt %0d hrs %0d dps %0d accum %0d",
             n_special, n_hold, n_stall, n_sat, n_multi, n_partial, n_zero, n_logcnt, n_hrs, n_dps, n_accum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
