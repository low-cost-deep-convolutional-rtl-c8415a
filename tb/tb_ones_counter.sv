// tb_ones_counter: exhaustive check of the baseline ones counter (Q = 8,
// b = 8) against the bit-serial stream: a full column j must count the ones of
// stream cycles j*b+1 .. j*b+b, a partial column of w < b cycles the ones of
// cycles 1 .. w.
module tb_ones_counter;
  import tb_sc_ref_pkg::*;
  localparam int Q = 8, HWP = 3, B = 1 << HWP;
  logic [Q-1:0] x;
  logic mux_bit, full;
  logic [HWP-1:0] wlow;
  logic [HWP:0] ones;
  int checks = 0, failures = 0;

  ones_counter #(.Q(Q), .HWP(HWP)) dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < (1 << Q); xv++) begin
      for (int j = 0; j < (1 << (Q - HWP)); j++) begin
        automatic int expct = 0;
        for (int c = j * B + 1; c <= j * B + B; c++) expct += ld_bit(xv, Q, c);
        x = Q'(xv); full = 1; wlow = '0; mux_bit = 1'(ld_bit(xv, Q, (j + 1) * B));
        #1; checks++;
        if (int'(ones) != expct) begin
          failures++; $display("full x=%h col %0d: %0d vs %0d", xv, j, ones, expct);
        end
      end
      for (int w = 1; w < B; w++) begin
        automatic int expct = 0;
        for (int c = 1; c <= w; c++) expct += ld_bit(xv, Q, c);
        x = Q'(xv); full = 0; wlow = HWP'(w); mux_bit = 1'($urandom);
        #1; checks++;
        if (int'(ones) != expct) begin
          failures++; $display("part x=%h w %0d: %0d vs %0d", xv, w, ones, expct);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
