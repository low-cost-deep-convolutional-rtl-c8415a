// tb_ud_accumulator: random count sequences in both signed and half-range
// modes, both directions, against a saturating integer model; drives the sum
// into both saturation limits and checks clear.
module tb_ud_accumulator;
  import tb_sc_ref_pkg::*;
  localparam int ACC_W = 8, HWP = 3, B = 1 << HWP;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, up = 0, xis = 0;
  logic [HWP:0] ones, nbits;
  logic signed [ACC_W-1:0] acc;
  logic sat;
  longint model = 0;
  int checks = 0, failures = 0, nsat = 0;

  ud_accumulator #(.ACC_W(ACC_W), .HWP(HWP)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ones = 0; nbits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int n, k, d;
      @(negedge clk);
      n = $urandom_range(1, B); k = $urandom_range(0, n);
      xis = 1'($urandom); up = (i % 400 < 200) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      en = ($urandom_range(0, 9) != 0);
      clr = (i % 977 == 976);
      ones = (HWP+1)'(k); nbits = (HWP+1)'(n);
      d = xis ? 2 * k - n : k;
      if (!up) d = -d;
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (en) begin
        if (model + d != tb_sc_ref_pkg::sat(model + d, ACC_W)) nsat++;
        model = tb_sc_ref_pkg::sat(model + d, ACC_W);
      end
      checks++;
      if (longint'(acc) != model) begin failures++; $display("step %0d: %0d vs %0d", i, acc, model); end
    end
    checks++;
    if (nsat < 10) begin failures++; $display("saturation not reached (%0d)", nsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
