// tb_accel_tasks.svh: host-side tasks and checks shared by the tile
// testbenches. Needs LANES, Q, HWP, ACC_W, XD, WD, OD localparams, the DUT
// instance `dut` and its port signals declared by the including module.
// The reference keeps one accumulator per lane and replays every multiplication
// bit-serially (tb_sc_ref_pkg), then aligns like the output path must.

  localparam int B = 1 << HWP;
  longint model [LANES];
  int checks = 0, failures = 0;
  int expect_busy = 0, busy_cycles = 0;
  // mechanism counters
  int n_special = 0, n_hold = 0, n_stall = 0, n_sat = 0, n_multi = 0, n_partial = 0;
  int n_skip = 0, n_skip_hold = 0;
  int n_zero = 0, n_hrs = 0, n_dps = 0, n_accum = 0, n_logcnt = 0, n_fmt [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (rst_n) begin
    if (dut.u_mvm.busy) busy_cycles++;
    if (dut.u_ctrl.s1_valid && dut.u_ctrl.sq_special) n_special++;
    if (dut.u_mvm.t_valid && dut.u_mvm.t_ready && dut.u_mvm.t_hold) n_hold++;
    if (dut.u_mvm.t_valid && !dut.u_mvm.t_ready) n_stall++;
    if (|mvm_sat) n_sat++;
    if (dut.u_mvm.busy && !dut.u_mvm.full) n_partial++;
    if (dut.u_mvm.busy && dut.u_mvm.use_log) n_logcnt++;
    if (dut.u_mvm.t_valid && dut.u_mvm.t_ready && dut.u_mvm.d_wabs > Q'(B)) n_multi++;
    if (dut.u_ctrl.skip) n_skip++;
    if (dut.u_ctrl.f_push && dut.u_ctrl.skip_pend && dut.u_ctrl.s2_term.hold) n_skip_hold++;
    if (dut.u_ctrl.skip || (dut.u_mvm.t_valid && dut.u_mvm.t_ready && dut.u_mvm.d_wabs == '0)) n_zero++;
  end

  task automatic host_reset();
    x_we = 0; w_we = 0; o_re = 0; start = 0; clear = 0; drain = 0;
    apc_clr = 0; apc_en = 0; apc_x = '0; apc_w = '0;
    tile_clr = 0; tile_en = 0; tile_w = '0; tile_x = '0;
    slq_clr = 0; slq_valid = 0; slq_fmt = WF_SLQ; slq_word = '0; slq_x = '0;
    x_waddr = '0; w_waddr = '0; o_raddr = '0; x_wdata = '0; w_wdata = '0;
    n_words = '0; wbase = '0; xbase = '0; obase = '0;
    cfg = '{wfmt: WF_LINEAR, prec: 5'(Q), xis: 1'b1};
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (model[j]) model[j] = 0;
  endtask

  // The side designs: a few worked products through the top's ports.
  task automatic slq_series(input wfmt_e f, input logic [5:0] ws [$], input logic signed [Q-1:0] xv,
                            input longint expect_y);
    @(negedge clk); slq_fmt = f; slq_clr = 1;
    @(negedge clk); slq_clr = 0;
    foreach (ws[i]) begin
      slq_word = ws[i]; slq_x = (i == 0 || (f == WF_SLQ && i == 1)) ? xv : '0; slq_valid = 1;
      @(negedge clk);
    end
    slq_valid = 0;
    checks++;
    if (longint'(slq_y) != expect_y) begin
      failures++; $display("slq mac fmt %0d: %0d, expected %0d", f, slq_y, expect_y);
    end
  endtask

  task automatic apc_run(input longint xv, input longint wv, input int clocks, output longint acc_o, output bit sat_o);
    @(negedge clk); apc_x = AQ'(xv); apc_w = AQ'(wv); apc_clr = 1;
    @(negedge clk); apc_clr = 0; apc_en = 1; sat_o = 0;
    repeat (clocks) begin @(negedge clk); sat_o |= apc_sat; end
    apc_en = 0;
    acc_o = longint'(apc_acc);
  endtask

  task automatic side_macs();
    longint a, half, maxv, l;
    int nsat;
    bit s;
    half = longint'(1) << (AQ - 2);     // 0.5
    maxv = (longint'(1) << (AQ + 1)) - 1;
    // 0.5 * 0.5 = 7168 / 2^15 through the binary SLQ MAC, the weight 0.4375
    // given as tagged and as special-code SLQ
    slq_series(WF_SLQ_TAG, '{6'b100001, 6'b011100}, 16'sh4000, 7168);
    slq_series(WF_SLQ, '{6'b010000, 6'b000001, 6'b011100}, 16'sh4000, 7168);
    // sign-magnitude log weight -2^-2 times 0.5
    slq_series(WF_LOG, '{6'b010010}, 16'sh4000, -4096);
    // 0.5 * 0.5 over L stream bits: about L/4, loosely bounded (LFSR noise)
    l = 32 * AN;
    apc_run(half, half, 32, a, s);
    checks++; if (a < l / 16 || a > l / 2 || s) begin failures++; $display("apc 0.25: %0d of %0d", a, l); end
    // long runs of +1 * +1 and +1 * -1 saturate at the accumulator limits
    apc_run(maxv >> 2, maxv >> 2, 3 * int'((maxv + 1) / AN), a, s);
    checks++; if (a != maxv || !s) begin failures++; $display("apc +sat: %0d", a); end
    apc_run(maxv >> 2, -(half * 2), 3 * int'((maxv + 1) / AN), a, s);
    checks++; if (a != -maxv - 1 || !s) begin failures++; $display("apc -sat: %0d", a); end
    // SC-MAC array: weights +0.5 and -0.5 alternate over the maps, pixels 0.5;
    // every MAC must land near +-L/4 with the sign of its weight
    @(negedge clk);
    for (int m = 0; m < TT; m++) tile_w[m] = (m % 2) ? AQ'(-half) : AQ'(half);
    for (int p = 0; p < TNP; p++) tile_x[p] = AQ'(half);
    tile_clr = 1;
    @(negedge clk); tile_clr = 0; tile_en = 1;
    nsat = 0;
    repeat (32) begin @(negedge clk); nsat += tile_sat; end
    tile_en = 0;
    for (int k = 0; k < TT * TNP; k++) begin
      automatic longint v = longint'(tile_y[k]);
      if ((k / TNP) % 2) v = -v;
      checks++;
      if (v < l / 16 || v > l / 2) begin failures++; $display("tile mac %0d: %0d of %0d", k, tile_y[k], l); end
    end
    checks++; if (nsat != 0) failures++;
  endtask

  task automatic write_x(input int addr, input logic [LANES-1:0][Q-1:0] v);
    @(negedge clk); x_we = 1; x_waddr = XAW'(addr); x_wdata = v;
    @(negedge clk); x_we = 0;
  endtask

  task automatic write_w(input int addr, input logic [Q-1:0] v);
    @(negedge clk); w_we = 1; w_waddr = WAW'(addr); w_wdata = v;
    @(negedge clk); w_we = 0;
  endtask

  // one pass: words[] already in wbuf at wb, vectors xs[] at xb
  // sat_bias: push activations towards one sign so sums saturate
  task automatic run_pass(input int f, input int p, input bit xs_signed, input int nw,
                          input int wb, input int xb, input int ob, input bit clr,
                          input logic [Q-1:0] words [$], input logic [LANES-1:0][Q-1:0] xv [$]);
    int xi = 0, st = 0, lat = 0, busy0;
    logic [LANES-1:0][Q-1:0] xcur = '0;
    if (clr) foreach (model[j]) model[j] = 0;
    else n_accum++;
    if (!xs_signed) n_hrs++;
    if (p < Q) n_dps++;
    n_fmt[f]++;
    // reference
    for (int k = 0; k < nw; k++) begin
      bit neg, hold = 0, term = 1;
      int wa;
      logic [Q-1:0] w = words[k];
      if (f == 2) begin
        if (st == 0 && w[4:0] == 5'b10000) begin term = 0; st = 1; end
        else if (st == 1) begin st = 2; end
        else if (st == 2) begin hold = 1; st = 0; end
      end else if (f == 3) begin
        hold = (st == 1);
        st = w[5] ? 1 : 0;
        w = Q'(w[4:0]);
      end
      if (term) begin
        if (!hold) begin xcur = xv[xi]; end
        decode(w, Q, f, p, neg, wa);
        for (int j = 0; j < LANES; j++)
          model[j] = acc_mult(model[j], xcur[j], Q, xs_signed, neg, wa, B, ACC_W);
        expect_busy += (wa + B - 1) / B;
        // advance the vector after the last word of a weight
        if (!((f == 2 && st == 2) || (f == 3 && st == 1))) xi++;
      end
    end
    // run
    busy0 = busy_cycles;
    @(negedge clk);
    cfg = '{wfmt: wfmt_e'(f), prec: 5'(p), xis: xs_signed};
    n_words = (WAW+1)'(nw); wbase = WAW'(wb); xbase = XAW'(xb); obase = OAW'(ob);
    clear = clr; drain = 1; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); lat++; end
    // cycle count of the multiplier: sum of ceil(|W|/b) per pass
    checks++;
    if (busy_cycles != expect_busy) begin
      failures++; $display("fmt %0d p %0d: multiplier busy %0d clocks, expected %0d", f, p, busy_cycles, expect_busy);
    end
    busy_cycles = 0; expect_busy = 0;
    // read back
    for (int j = 0; j < LANES; j++) begin
      longint e = sat(model[j] * (longint'(1) << (Q - p)), ACC_W);
      @(negedge clk); o_re = 1; o_raddr = OAW'(ob + j);
      @(negedge clk); o_re = 0;
      checks++;
      if (longint'($signed(o_rdata)) != e) begin
        failures++;
        if (failures < 20) $display("fmt %0d p %0d lane %0d: %0d expected %0d", f, p, j, $signed(o_rdata), e);
      end
    end
    $display("pass fmt=%0d p=%0d xis=%0d words=%0d clear=%0d: %0d clocks", f, p, xs_signed, nw, clr, lat);
  endtask
