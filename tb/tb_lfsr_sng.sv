// tb_lfsr_sng: checks the LFSR stochastic number generator at Q = 5, 9, 12 and
// 16: the state must come back to the seed after exactly 2^Q-1 steps and not
// before, and over one full period both outputs must hold exactly as many ones
// as their input value (checked for zero, the maximum and random values).
module tb_lfsr_sng;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NQ = 4;
  localparam int QS [NQ] = '{5, 9, 12, 16};
  bit fin [NQ];

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NQ; g++) begin : g_q
    localparam int Q = QS[g];
    logic en = 0;
    logic [Q-1:0] va, vb, rnd;
    logic ba, bb;
    lfsr_sng #(.Q(Q), .SEED(16'h1234 + g)) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .value_a(va), .value_b(vb),
      .bit_a(ba), .bit_b(bb), .rnd(rnd)
    );
    initial begin
      logic [Q-1:0] s0;
      int per, na, nb;
      va = '0; vb = '0;
      @(posedge rst_n);
      @(negedge clk);
      s0 = rnd;
      checks++; if (s0 == '0) failures++;
      for (int t = 0; t < 6; t++) begin
        va = (t == 0) ? '0 : (t == 1) ? '1 : Q'($urandom);
        vb = (t == 0) ? '1 : (t == 1) ? '0 : Q'($urandom);
        per = 0; na = 0; nb = 0;
        en = 1;
        #1;
        do begin
          na += ba; nb += bb; per++;
          @(negedge clk);
          #1;
        end while (rnd != s0 && per < (1 << Q) + 4);
        en = 0;
        checks++;
        if (per != (1 << Q) - 1) begin failures++; $display("Q=%0d period %0d", Q, per); end
        checks++;
        if (na != int'(va)) begin failures++; $display("Q=%0d a: %0d ones for %0d", Q, na, va); end
        checks++;
        if (nb != int'(vb)) begin failures++; $display("Q=%0d b: %0d ones for %0d", Q, nb, vb); end
      end
      // the state must hold while en is low
      repeat (3) @(negedge clk);
      checks++; if (rnd != s0) failures++;
      fin[g] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
