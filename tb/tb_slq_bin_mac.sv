// tb_slq_bin_mac: drives random weight-word streams in the three log formats
// (sign-magnitude, SLQ with special code, SLQ with tags), with a new random
// activation on every word, and compares the accumulator after every clock
// with a model that parses the series itself and multiplies with integer
// arithmetic (x * 2^-m rounded down). Includes the Table 8 examples and runs
// long enough with large activations to saturate both ways.
module tb_slq_bin_mac;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  localparam int Q = 16, A = 2, ACC_W = Q + A;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_valid = 0, sat;
  wfmt_e fmt;
  logic [5:0] w_word;
  logic signed [Q-1:0] x_in;
  logic signed [ACC_W-1:0] y;
  int n_sat = 0, n_hold = 0;

  slq_bin_mac #(.Q(Q), .A(A)) dut (.*);

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint my, mx;
  int pst;   // 0 idle, 1 first word after special, 2 second word
  bit tprev;

  function automatic longint satv(input longint v);
    if (v > (1 << (ACC_W - 1)) - 1) return (1 << (ACC_W - 1)) - 1;
    if (v < -(1 << (ACC_W - 1)))    return -(1 << (ACC_W - 1));
    return v;
  endfunction

  // x * 2^-m, rounded down
  function automatic longint shr(input longint x, input int m);
    longint d = longint'(1) << m;
    longint r = x / d;
    if (x < 0 && (x % d) != 0) r -= 1;
    return r;
  endfunction

  task automatic feed(input logic [5:0] wd, input logic signed [Q-1:0] xv);
    bit hold = 0, is_term = 1, neg;
    int qv, m;
    @(negedge clk);
    w_word = wd; x_in = xv; in_valid = 1;
    // model
    if (fmt == WF_SLQ) begin
      if (pst == 0 && wd[4:0] == 5'b10000) begin is_term = 0; pst = 1; end
      else if (pst == 1) pst = 2;
      else if (pst == 2) begin hold = 1; pst = 0; end
    end else if (fmt == WF_SLQ_TAG) begin
      hold = tprev; tprev = wd[5];
    end
    if (is_term) begin
      if (!hold) mx = longint'(xv);
      else n_hold++;
      if (fmt == WF_LOG) begin neg = wd[4]; m = int'(wd[3:0]); end
      else begin
        qv = int'(wd[4:0]); if (qv >= 16) qv -= 32;
        neg = qv < 0; m = neg ? -qv : qv;
      end
      if (m != 0) my = satv(my + (neg ? -shr(mx, m) : shr(mx, m)));
    end
    @(posedge clk);
    #1;
    if (sat) n_sat++;
    in_valid = 0;
    checks++;
    if (longint'(y) != my) begin
      failures++;
      if (failures < 4) $display("fmt %0d word %b x %0d: y %0d model %0d", fmt, wd, xv, y, my);
    end
  endtask

  task automatic start(input wfmt_e f);
    @(negedge clk);
    fmt = f; clr = 1;
    @(negedge clk);
    clr = 0;
    my = 0; pst = 0; tprev = 0;
  endtask

  initial begin
    fmt = WF_SLQ; w_word = '0; x_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Table 8: 0.4375 as 00001 11100 (tagged) and 00010 00011 00100 with x = 0.5
    start(WF_SLQ_TAG);
    feed(6'b100001, 16'sh4000); feed(6'b011100, 16'sh0);
    checks++; if (y != 18'sd7168) begin failures++; $display("tag 0.4375: %0d", y); end
    start(WF_SLQ);
    feed(6'b010000, 16'sh0); feed(6'b000001, 16'sh4000); feed(6'b011100, 16'sh0);
    checks++; if (y != 18'sd7168) begin failures++; $display("special 0.4375: %0d", y); end
    for (int r = 0; r < 30; r++) begin
      automatic wfmt_e f = (r % 3 == 0) ? WF_LOG : (r % 3 == 1) ? WF_SLQ : WF_SLQ_TAG;
      automatic bit big = (r >= 24);
      start(f);
      for (int k = 0; k < 200; k++) begin
        automatic logic [5:0] wd = 6'($urandom);
        automatic logic signed [Q-1:0] xv = Q'($urandom);
        if (f != WF_SLQ_TAG) wd[5] = 0;
        if (big) begin
          xv = (r % 2) ? 16'sh7fff : -16'sh8000;
          wd[4:0] = (f == WF_LOG) ? 5'b00001 : 5'b00001;
          wd[5] = 0;
        end
        feed(wd, xv);
      end
    end
    checks++; if (n_sat == 0)  begin failures++; $display("never saturated"); end
    checks++; if (n_hold == 0) begin failures++; $display("never held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
