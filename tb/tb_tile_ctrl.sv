// tb_tile_ctrl: the controller between behavioural buffers and a stand-in
// multiplier that takes terms at random (stalling the pipeline) and reports
// busy for a random while after each. Checks, for every weight format, that
// the terms arrive in order with the right word, hold flag and activation
// vector (special codes dropped, one vector per weight), that the accumulator
// clear happens only when asked, and that draining writes every lane's
// aligned result to obuf[obase + lane]. Counts stalls and FIFO-full clocks.
module tb_tile_ctrl;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;
  localparam int LANES = 4, Q = 16, ACC_W = 18, XD = 16, WD = 32, OD = 16;
  logic clk = 0, rst_n = 0, start = 0, clear = 0, drain = 0;
  mvm_cfg_t cfg;
  logic [5:0] n_words;
  logic [4:0] wbase;
  logic [3:0] xbase, obase;
  logic busy, done, w_re, x_re, o_we, t_valid, t_ready = 0, t_hold, xis, acc_clr, mvm_busy = 0;
  logic [4:0] w_raddr;
  logic [3:0] x_raddr, o_waddr;
  logic [Q-1:0] w_rdata, t_word;
  logic [LANES-1:0][Q-1:0] x_rdata, t_x;
  logic [ACC_W-1:0] o_wdata;
  wfmt_e t_fmt;
  logic [4:0] prec;
  logic signed [ACC_W-1:0] acc [LANES];
  int checks = 0, failures = 0, stalls = 0, clears = 0, writes = 0;
  always #5 clk = ~clk;

  tile_ctrl #(.LANES(LANES), .Q(Q), .ACC_W(ACC_W), .XBUF_DEPTH(XD), .WBUF_DEPTH(WD),
              .OBUF_DEPTH(OD), .ZERO_SKIP(1'b0)) dut (.*);

  // behavioural buffers
  logic [Q-1:0] wmem [WD];
  logic [LANES-1:0][Q-1:0] xmem [XD];
  logic [ACC_W-1:0] omem [OD];
  always @(posedge clk) begin
    if (w_re) w_rdata <= wmem[w_raddr];
    if (x_re) x_rdata <= xmem[x_raddr];
    if (o_we) begin omem[o_waddr] <= o_wdata; writes++; end
  end

  // stand-in multiplier
  int busy_left = 0;
  logic [Q-1:0] e_word [$];
  bit e_hold [$];
  int e_xi [$];
  always @(negedge clk) begin
    t_ready = ($urandom_range(0, 2) == 0) && busy_left == 0;
    mvm_busy = busy_left > 0;
  end
  always @(posedge clk) begin
    if (busy_left > 0) busy_left--;
    if (acc_clr) clears++;
    if (t_valid && !t_ready) stalls++;
    if (t_valid && t_ready) begin
      busy_left = $urandom_range(0, 3);
      checks++;
      if (e_word.size() == 0) begin failures++; $display("extra term"); end
      else begin
        automatic logic [Q-1:0] w = e_word.pop_front();
        automatic bit h = e_hold.pop_front();
        automatic int xi = e_xi.pop_front();
        if (t_word != w || t_hold != h || (!h && t_x != xmem[xbase + xi]) || t_fmt != cfg.wfmt) begin
          failures++; $display("term %h/%0d expected %h/%0d (x %0d)", t_word, t_hold, w, h, xi);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{wfmt: WF_LINEAR, prec: 5'd16, xis: 1'b1};
    n_words = 0; wbase = 0; xbase = 0; obase = 0;
    foreach (acc[j]) acc[j] = '0;
    for (int i = 0; i < XD; i++) for (int j = 0; j < LANES; j++) xmem[i][j] = Q'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 16; pass++) begin
      automatic int f = pass % 4, nw = $urandom_range(1, 20), xi = 0, st = 0;
      automatic int cl0 = clears;
      automatic int wb = $urandom_range(0, WD - 21);
      // fill the weight buffer and the expected term list
      for (int k = 0; k < nw; k++) begin
        automatic logic [Q-1:0] w = Q'($urandom);
        if (f == 2 && k < nw - 2 && $urandom_range(0, 3) == 0 && st == 0) w[4:0] = 5'b10000;
        if (f == 2 && st == 0 && w[4:0] == 5'b10000 && k >= nw - 2) w[4:0] = 5'b00011;
        wmem[wb + k] = w;
        case (f)
          2: begin
            if (st == 0 && w[4:0] == 5'b10000) st = 1;
            else begin
              e_word.push_back(w); e_hold.push_back(st == 2); e_xi.push_back(xi);
              if (st == 1) st = 2; else begin st = 0; xi++; end
            end
          end
          3: begin
            e_word.push_back(Q'(w[4:0])); e_hold.push_back(st == 1); e_xi.push_back(xi);
            if (w[5]) st = 1; else begin st = 0; xi++; end
          end
          default: begin e_word.push_back(w); e_hold.push_back(0); e_xi.push_back(xi); xi++; end
        endcase
      end
      foreach (acc[j]) acc[j] = ACC_W'($urandom);
      @(negedge clk);
      cfg = '{wfmt: wfmt_e'(f), prec: 5'($urandom_range(2, 16)), xis: 1'($urandom)};
      n_words = 6'(nw); wbase = 5'(wb); xbase = 4'($urandom_range(0, 1)); obase = 4'($urandom_range(0, 8));
      clear = 1'(pass % 2); drain = (pass % 4 != 3);
      start = 1; @(negedge clk); start = 0;
      writes = 0;
      while (!done) @(negedge clk);
      checks++;
      if (e_word.size() != 0) begin failures++; $display("pass %0d: %0d terms not issued", pass, e_word.size()); e_word.delete(); e_hold.delete(); e_xi.delete(); end
      checks++;
      if ((clears - cl0) != (pass % 2)) begin failures++; $display("pass %0d: clear count %0d", pass, clears - cl0); end
      @(negedge clk);
      checks++;
      if (writes != (drain ? LANES : 0)) begin failures++; $display("pass %0d: %0d writes", pass, writes); end
      if (drain) for (int j = 0; j < LANES; j++) begin
        checks++;
        if (longint'($signed(omem[obase + j])) != sat(longint'(acc[j]) * (longint'(1) << (16 - cfg.prec)), ACC_W)) begin
          failures++; $display("pass %0d lane %0d: %h", pass, j, omem[obase + j]);
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
