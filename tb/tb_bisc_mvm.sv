// tb_bisc_mvm: the matrix-vector multiplier.
// Part 1 (Q = 4, bit-serial) reproduces the document's signed-multiplication
// table: 2^3*w in {-8, 7} times 2^3*x in {0, 7, -8} gives counter values
// {0, -8, 8} and {1, 7, -7}, read after |2^3*w| = 8 and 7 clocks.
// Part 2 (Q = 8, b = 4, 4 lanes) streams random terms of every weight format,
// precision and x signedness, with held activations and input gaps, and checks
// every accumulator against the bit-serial reference and the busy clock count
// against sum(ceil(|W|/b)).
module tb_bisc_mvm;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- part 1 ----------------
  logic a_valid = 0, a_ready, a_hold = 0, a_clr = 0, a_busy, a_last;
  logic [3:0] a_word = 0;
  logic [2:0][3:0] a_x;
  logic signed [5:0] a_acc [3];
  logic [2:0] a_sat;
  bisc_mvm #(.LANES(3), .Q(4), .HWP(0), .A(2)) u_a (
    .clk(clk), .rst_n(rst_n), .t_valid(a_valid), .t_ready(a_ready), .t_word(a_word),
    .t_fmt(WF_LINEAR), .t_hold(a_hold), .t_x(a_x), .prec(5'd4), .xis(1'b1),
    .acc_clr(a_clr), .busy(a_busy), .last(a_last), .acc(a_acc), .sat(a_sat)
  );

  task automatic table_row(input logic [3:0] w, input int e0, input int e1, input int e2, input int lat);
    int cyc = 0;
    @(negedge clk); a_clr = 1; @(negedge clk); a_clr = 0;
    a_word = w; a_valid = 1; @(negedge clk); a_valid = 0;
    while (a_busy) begin cyc++; @(negedge clk); end
    checks += 4;
    if (a_acc[0] != e0) begin failures++; $display("table w=%h x=0: %0d", w, a_acc[0]); end
    if (a_acc[1] != e1) begin failures++; $display("table w=%h x=7: %0d", w, a_acc[1]); end
    if (a_acc[2] != e2) begin failures++; $display("table w=%h x=-8: %0d", w, a_acc[2]); end
    if (cyc != lat) begin failures++; $display("table w=%h latency %0d", w, cyc); end
  endtask

  // ---------------- part 2 ----------------
  localparam int Q = 8, HWP = 2, B = 4, L = 4, ACC_W = Q + 2;
  logic b_valid = 0, b_ready, b_hold = 0, b_clr = 0, b_busy, b_last, b_xis = 1;
  logic [Q-1:0] b_word = 0;
  wfmt_e b_fmt = WF_LINEAR;
  logic [4:0] b_prec = 5'(Q);
  logic [L-1:0][Q-1:0] b_x;
  logic signed [ACC_W-1:0] b_acc [L];
  logic [L-1:0] b_sat;
  bisc_mvm #(.LANES(L), .Q(Q), .HWP(HWP), .A(2)) u_b (
    .clk(clk), .rst_n(rst_n), .t_valid(b_valid), .t_ready(b_ready), .t_word(b_word),
    .t_fmt(b_fmt), .t_hold(b_hold), .t_x(b_x), .prec(b_prec), .xis(b_xis),
    .acc_clr(b_clr), .busy(b_busy), .last(b_last), .acc(b_acc), .sat(b_sat)
  );
  int busy_cycles = 0;
  always @(posedge clk) if (b_busy) busy_cycles++;

  longint model [L];
  logic [L-1:0][Q-1:0] xcur;

  initial begin
    a_x[0] = 4'b0000; a_x[1] = 4'b0111; a_x[2] = 4'b1000;
    b_x = '0; xcur = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    table_row(4'b1000, 0, -8, 8, 8);
    table_row(4'b0111, 1, 7, -7, 7);

    for (int pass = 0; pass < 12; pass++) begin
      automatic int expect_busy = 0;
      automatic int p = $urandom_range(2, Q);
      automatic bit xs = (pass % 3 != 2);
      automatic wfmt_e f = wfmt_e'(pass % 4);
      @(negedge clk); b_clr = 1; @(negedge clk); b_clr = 0;
      busy_cycles = 0;
      foreach (model[j]) model[j] = 0;
      for (int t = 0; t < 60; t++) begin
        bit neg; int wa; bit hold;
        automatic logic [Q-1:0] wd = Q'($urandom);
        hold = (t > 0) && ($urandom_range(0, 3) == 0);
        if (!hold) for (int j = 0; j < L; j++) begin
          xcur[j] = Q'($urandom);
        end
        decode(wd, Q, int'(f), p, neg, wa);
        // wait for ready at the negedge, then present for one accepted clock
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        b_word = wd; b_fmt = f; b_prec = 5'(p); b_xis = xs; b_hold = hold; b_x = xcur;
        b_valid = 1;
        #1;
        while (!b_ready) begin @(negedge clk); #1; end
        @(negedge clk); b_valid = 0;
        for (int j = 0; j < L; j++) model[j] = acc_mult(model[j], xcur[j], Q, xs, neg, wa, B, ACC_W);
        expect_busy += (wa + B - 1) / B;
      end
      while (b_busy) @(negedge clk);
      for (int j = 0; j < L; j++) begin
        checks++;
        if (longint'(b_acc[j]) != model[j]) begin
          failures++; $display("pass %0d fmt %0d p %0d lane %0d: %0d vs %0d", pass, f, p, j, b_acc[j], model[j]);
        end
      end
      checks++;
      if (busy_cycles != expect_busy) begin
        failures++; $display("pass %0d: %0d busy clocks, expected %0d", pass, busy_cycles, expect_busy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
