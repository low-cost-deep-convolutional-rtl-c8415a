// tb_sc_compute_tile: checks a 2x2x2 tile (8 MACs, N = 8 stream bits per
// clock, Q = 9) against a model in this file that regenerates the shared LFSR
// sequences, the comparator outputs for every pixel and weight, the XNOR
// products and the approximate count, and predicts all eight accumulators
// exactly after every clock. Operands change every few clocks, as they would
// from step to step of a convolution; a final run with full-scale operands of
// equal and opposite sign checks saturation.
module tb_sc_compute_tile;
  int checks = 0, failures = 0;
  localparam int TM = 2, TR = 2, TC = 2, NP = TR * TC, N = 8, Q = 9, A = 2, ACC_W = Q + A;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, en = 0, sat;
  logic [TM-1:0][Q-1:0] w;
  logic [NP-1:0][Q-1:0] x;
  logic signed [ACC_W-1:0] y [TM*NP];
  int n_sat = 0;

  sc_compute_tile #(.TM(TM), .TR(TR), .TC(TC), .N(N), .Q(Q), .A(A)) dut (.*);

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Q = 9 LFSR: feedback from bits 9 and 5 (1-based)
  function automatic int step9(input int s);
    return ((s << 1) | (((s >> 8) ^ (s >> 4)) & 1)) & 511;
  endfunction
  function automatic int rev9(input int s);
    int r = 0;
    for (int i = 0; i < 9; i++) if ((s >> i) & 1) r |= 1 << (8 - i);
    return r;
  endfunction

  int st [N];
  longint my [TM*NP];

  task automatic model_clock();
    for (int m = 0; m < TM; m++)
      for (int p = 0; p < NP; p++) begin
        int pb [N];
        int ones = 0;
        for (int i = 0; i < N; i++) begin
          int xb = (st[i] - 1) < ((int'(x[p]) & 511) ^ 256);
          int wb = (rev9(st[i]) - 1) < ((int'(w[m]) & 511) ^ 256);
          pb[i] = (xb == wb);
        end
        for (int i = 0; i < N / 2; i++)
          ones += 2 * ((i % 2 == 0) ? (pb[2*i] & pb[2*i+1]) : (pb[2*i] | pb[2*i+1]));
        my[m*NP+p] += 2 * ones - N;
        if (my[m*NP+p] > (1 << (ACC_W - 1)) - 1) my[m*NP+p] = (1 << (ACC_W - 1)) - 1;
        if (my[m*NP+p] < -(1 << (ACC_W - 1)))    my[m*NP+p] = -(1 << (ACC_W - 1));
      end
    for (int i = 0; i < N; i++) st[i] = step9(st[i]);
  endtask

  task automatic run(input int clocks, input bit full_scale);
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int i = 0; i < N; i++) st[i] = 1 + 37 * i;
    foreach (my[k]) my[k] = 0;
    en = 1;
    for (int c = 0; c < clocks; c++) begin
      if (c % 4 == 0) begin
        for (int m = 0; m < TM; m++) w[m] = full_scale ? ((m == 0) ? 9'h0ff : 9'h100) : Q'($urandom);
        for (int p = 0; p < NP; p++) x[p] = full_scale ? 9'h0ff : Q'($urandom);
      end
      #1;
      model_clock();
      @(negedge clk);
      if (sat) n_sat++;
      for (int k = 0; k < TM * NP; k++) begin
        checks++;
        if (longint'(y[k]) != my[k]) begin
          failures++;
          if (failures < 6) $display("clock %0d mac %0d: %0d, model %0d", c, k, y[k], my[k]);
        end
      end
    end
    en = 0;
  endtask

  initial begin
    w = '0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(200, 1'b0);
    run(200, 1'b0);
    run(300, 1'b1);
    checks++;
    if (y[0] != 11'sd1023 || y[NP] != -11'sd1024) begin
      failures++; $display("saturation: %0d %0d", y[0], y[NP]);
    end
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
