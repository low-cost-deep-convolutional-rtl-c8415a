// tb_weight_decoder: compares the weight decoder with the reference decode for
// every log / SLQ word and many linear words at every precision, and checks the
// document's log-representation examples (-0.5 -> 1 0001, 0.25 -> 0 0010, 0).
module tb_weight_decoder;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;
  localparam int Q = 16;
  logic [Q-1:0] word;
  wfmt_e fmt;
  logic [4:0] prec;
  logic sign, is_pow2;
  logic [Q-1:0] wabs;
  logic [4:0] pos;
  int checks = 0, failures = 0;

  weight_decoder #(.Q(Q)) dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [Q-1:0] wd, input wfmt_e f, input int p);
    bit neg; int wa;
    word = wd; fmt = f; prec = 5'(p);
    #1;
    decode(wd, Q, int'(f), p, neg, wa);
    checks++;
    if (int'(wabs) != wa || (wa != 0 && sign != neg)) begin
      failures++;
      $display("fmt %0d p %0d word %h: got %0d/%0d expected %0d/%0d", f, p, wd, sign, wabs, neg, wa);
    end
    if (f != WF_LINEAR && wa != 0) begin
      checks++;
      if (!is_pow2 || (1 << pos) != wa) begin failures++; $display("pos %0d for %0d", pos, wa); end
    end
  endtask

  initial begin
    for (int p = 2; p <= Q; p++) begin
      for (int w = 0; w < 32; w++) begin
        one(Q'(w), WF_LOG, p);
        one(Q'(w), WF_SLQ, p);
      end
      for (int k = 0; k < 200; k++) one(Q'($urandom), WF_LINEAR, p);
      one(16'h8000, WF_LINEAR, p);   // w = -1: |W| = 2^(p-1)
      one(16'h7fff, WF_LINEAR, p);
    end
    // document examples at p = 16: |W| = |w| * 2^15
    one(16'b1_0001, WF_LOG, 16);
    checks++; if (!(sign && wabs == 16'd16384)) begin failures++; $display("-0.5 wrong"); end
    one(16'b0_0010, WF_LOG, 16);
    checks++; if (!(!sign && wabs == 16'd8192)) begin failures++; $display("0.25 wrong"); end
    one(16'b1_0000, WF_LOG, 16);
    checks++; if (wabs != 0) begin failures++; $display("-0 wrong"); end
    // SLQ words of the quantization examples: 00001 = 0.5, 11110 = -0.25, 11100 = -0.0625
    one(16'b00001, WF_SLQ, 16); checks++; if (!(!sign && wabs == 16384)) failures++;
    one(16'b11110, WF_SLQ, 16); checks++; if (!(sign && wabs == 8192)) failures++;
    one(16'b11100, WF_SLQ, 16); checks++; if (!(sign && wabs == 2048)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
