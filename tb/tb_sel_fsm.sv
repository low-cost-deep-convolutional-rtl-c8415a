// tb_sel_fsm: checks the selector FSM against the bit-serial definition of the
// low-discrepancy pattern: the last row of column j must pick the bit that the
// serial stream shows at cycle (j+1)*b, i.e. x[Q-1-tz((j+1)*b)], or 0.
module tb_sel_fsm;
  import tb_sc_ref_pkg::*;
  localparam int Q = 8, HWP = 2, B = 1 << HWP;
  logic clk = 0, rst_n = 0, restart = 0, advance = 0;
  logic [Q-HWP-1:0] col;
  logic [$clog2(Q)-1:0] sel_idx;
  logic sel_en;
  int checks = 0, failures = 0;

  sel_fsm #(.Q(Q), .HWP(HWP)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_col(input int j);
    int t = tz((j + 1) * B);
    checks++;
    if (int'(col) != j) begin failures++; $display("col %0d expected %0d", col, j); end
    checks++;
    if (t >= Q) begin
      if (sel_en) begin failures++; $display("col %0d: expected constant 0", j); end
    end else if (!sel_en || int'(sel_idx) != Q - 1 - t) begin
      failures++; $display("col %0d: sel %0d/%0d expected %0d", j, sel_en, sel_idx, Q - 1 - t);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 0; j < (1 << (Q - HWP)) - 1; j++) begin
      check_col(j);
      advance = 1; @(negedge clk); advance = 0;
    end
    // restart wins over advance
    restart = 1; advance = 1; @(negedge clk); restart = 0; advance = 0;
    check_col(0);
    advance = 1; @(negedge clk); @(negedge clk); advance = 0;
    check_col(2);
    // hold when idle
    @(negedge clk); check_col(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
