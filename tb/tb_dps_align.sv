// tb_dps_align: random accumulator values and precisions; the result must be
// acc * 2^(Q-p), clamped to the ACC_W-bit range.
module tb_dps_align;
  import tb_sc_ref_pkg::*;
  localparam int Q = 16, ACC_W = 18;
  logic signed [ACC_W-1:0] acc, y;
  logic [4:0] prec;
  int checks = 0, failures = 0;

  dps_align #(.Q(Q), .ACC_W(ACC_W)) dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      automatic int p = $urandom_range(2, Q);
      automatic longint v = longint'($urandom_range(0, (1 << ACC_W) - 1)) - (1 << (ACC_W - 1));
      if (i % 2 == 0) v = v >>> (Q - p);     // mostly values that fit
      acc = ACC_W'(v); prec = 5'(p);
      #1; checks++;
      if (longint'(y) != sat(v * (longint'(1) << (Q - p)), ACC_W)) begin
        failures++; $display("acc %0d p %0d: %0d", v, p, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
