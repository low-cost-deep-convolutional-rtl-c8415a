// tb_apc_sc_mac: checks the conventional bit-parallel SC-MAC in two builds,
// N = 8 with the approximate counter and N = 4 with an exact one (Q = 9).
// A model in this file regenerates every stream bit (its own LFSR and
// comparators, written from the tap positions) and predicts the accumulator
// exactly, clock by clock, including saturation. It also checks that the
// exact build's result over 2^(Q-1) stream bits is close to x*w, and that
// the accumulator saturates for long runs of large same-sign products.
module tb_apc_sc_mac;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int Q = 9, A = 2, ACC_W = Q + A;
  bit fin [2];
  int n_sat = 0;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // state after one step of the Q = 9 LFSR, feedback from bits 9 and 5
  function automatic int step9(input int s);
    int fb = ((s >> 8) ^ (s >> 4)) & 1;
    return ((s << 1) | fb) & 511;
  endfunction

  function automatic int rev9(input int s);
    int r = 0;
    for (int i = 0; i < 9; i++) if ((s >> i) & 1) r |= 1 << (8 - i);
    return r;
  endfunction

  for (genvar g = 0; g < 2; g++) begin : g_b
    localparam int N = (g == 0) ? 8 : 4;
    localparam bit AP = (g == 0);
    logic clr = 0, en = 0, sat;
    logic signed [Q-1:0] x, w;
    logic signed [ACC_W-1:0] acc;
    apc_sc_mac #(.N(N), .Q(Q), .A(A), .APPROX(AP)) dut (
      .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .w(w), .acc(acc), .sat(sat)
    );

    int st [N];
    longint macc;
    real err_sum = 0.0;
    int n_err = 0;

    task automatic model_clock();
      int ones = 0;
      int pbits [N];
      for (int i = 0; i < N; i++) begin
        int xa = (int'(x) & 511) ^ 256;
        int wa = (int'(w) & 511) ^ 256;
        int xbit = (st[i] - 1) < xa;
        int wbit = (rev9(st[i]) - 1) < wa;
        pbits[i] = (xbit == wbit);
        st[i] = step9(st[i]);
      end
      if (AP) begin
        for (int i = 0; i < N / 2; i++)
          ones += 2 * ((i % 2 == 0) ? (pbits[2*i] & pbits[2*i+1]) : (pbits[2*i] | pbits[2*i+1]));
      end else
        for (int i = 0; i < N; i++) ones += pbits[i];
      macc += 2 * ones - N;
      if (macc > (1 << (ACC_W - 1)) - 1) macc = (1 << (ACC_W - 1)) - 1;
      if (macc < -(1 << (ACC_W - 1)))    macc = -(1 << (ACC_W - 1));
    endtask

    task automatic run(input int xv, input int wv, input int clocks, input bit closeness);
      @(negedge clk);
      x = Q'(xv); w = Q'(wv);
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int i = 0; i < N; i++) st[i] = 1 + 37 * i;
      macc = 0;
      checks++; if (acc != 0) failures++;
      en = 1;
      for (int c = 0; c < clocks; c++) begin
        model_clock();
        @(negedge clk);
        if (sat) n_sat++;
        checks++;
        if (longint'(acc) != macc) begin
          failures++;
          if (failures < 10) $display("N=%0d x=%0d w=%0d clock %0d: acc %0d model %0d", N, xv, wv, c, acc, macc);
        end
      end
      en = 0;
      if (closeness) begin
        // acc / 2^(Q-1) estimates x*w / 2^(2Q-2); LFSR streams of 256 bits
        // are noisy, so only the mean error over the runs is bounded
        real est = real'(acc) / 256.0, ref_v = real'(xv) * real'(wv) / 65536.0;
        err_sum += (est > ref_v) ? est - ref_v : ref_v - est;
        n_err++;
      end
    endtask

    initial begin
      x = '0; w = '0;
      @(posedge rst_n);
      for (int k = 0; k < 40; k++)
        run($urandom_range(0, 511) - 256, $urandom_range(0, 511) - 256, 256 / N, !AP);
      run(255, 255, 200, 1'b0);
      run(-256, 255, 200, 1'b0);
      if (!AP) begin
        checks++;
        if (err_sum / n_err > 0.06) begin
          failures++;
          $display("mean error %f", err_sum / n_err);
        end
      end
      fin[g] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1]);
    checks++; if (n_sat == 0) begin failures++; $display("never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
