// tb_sc_mac_lane: one lane driven the way the shared control drives it (column
// by column, b bits per clock, then a partial column), for random signed and
// half-range activations, linear and power-of-two weights, compared with the
// bit-serial reference accumulated over many multiplications.
module tb_sc_mac_lane;
  import tb_sc_ref_pkg::*;
  localparam int Q = 8, HWP = 2, B = 1 << HWP, ACC_W = 12;
  logic clk = 0, rst_n = 0, x_load = 0, xis = 1, full = 0, use_log = 0, step = 0, up = 1, acc_clr = 0;
  logic [Q-1:0] x_in;
  logic [$clog2(Q)-1:0] sel_idx;
  logic sel_en;
  logic [HWP-1:0] wlow;
  logic [4:0] pos;
  logic [HWP:0] nbits;
  logic signed [ACC_W-1:0] acc;
  logic sat;
  longint model = 0;
  int checks = 0, failures = 0;

  sc_mac_lane #(.Q(Q), .HWP(HWP), .ACC_W(ACC_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mult(input logic [Q-1:0] xv, input bit xs, input bit neg, input int wabs, input bit lg);
    int rem = wabs, j = 0, p = 0;
    @(negedge clk);
    x_in = xv; x_load = 1; xis = xs; up = !neg; use_log = lg;
    while (((wabs >> p) & 1) == 0 && p < 20) p++;
    pos = 5'(p);
    @(negedge clk); x_load = 0;
    while (rem > 0) begin
      int t = tz((j + 1) * B);
      full = rem >= B; wlow = HWP'(rem); nbits = (HWP+1)'(rem >= B ? B : rem);
      sel_en = t < Q; sel_idx = (t < Q) ? 3'(Q - 1 - t) : '0;
      step = 1; @(negedge clk); step = 0;
      rem -= B; j++;
    end
    model = acc_mult(model, xv, Q, xs, neg, wabs, B, ACC_W);
    checks++;
    if (longint'(acc) != model) begin
      failures++; $display("x=%h xis=%0d neg=%0d w=%0d log=%0d: %0d vs %0d", xv, xs, neg, wabs, lg, acc, model);
    end
  endtask

  initial begin
    x_in = 0; sel_idx = 0; sel_en = 0; wlow = 0; pos = 0; nbits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      automatic bit lg = 1'($urandom);
      automatic int w = lg ? (1 << $urandom_range(0, Q - 1)) : $urandom_range(0, 1 << (Q - 1));
      automatic bit xs = 1'($urandom);
      automatic logic [Q-1:0] xv = Q'($urandom);
      mult(xv, xs, 1'($urandom), w, lg);
      if (i % 100 == 99) begin
        @(negedge clk); acc_clr = 1; @(negedge clk); acc_clr = 0; model = 0;
        checks++; if (acc != 0) begin failures++; $display("clear failed"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
