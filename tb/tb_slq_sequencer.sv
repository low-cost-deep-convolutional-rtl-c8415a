// tb_slq_sequencer: word streams of every format, with random output stalls,
// against an independent parser: a special code (1 0000) must vanish and make
// the next two words one weight (second one held), a tag bit must hold the next
// word, and linear / log words must pass one per weight.
module tb_slq_sequencer;
  import sc_pkg::*;
  localparam int Q = 16;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  wfmt_e fmt = WF_LINEAR;
  logic in_ready, out_valid, out_hold, out_wlast, special;
  logic [Q-1:0] in_word = 0, out_word;
  int checks = 0, failures = 0, nspecial = 0, nheld = 0;
  always #5 clk = ~clk;

  slq_sequencer #(.Q(Q)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected terms
  logic [Q-1:0] e_word [$];
  bit e_hold [$], e_wlast [$];

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (e_word.size() == 0) begin failures++; $display("unexpected term"); end
    else begin
      automatic logic [Q-1:0] w = e_word.pop_front();
      automatic bit h = e_hold.pop_front(), l = e_wlast.pop_front();
      if (out_word != w || out_hold != h || out_wlast != l) begin
        failures++; $display("term %h/%0d/%0d expected %h/%0d/%0d", out_word, out_hold, out_wlast, w, h, l);
      end
      if (out_hold) nheld++;
    end
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready && special) nspecial++;
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  task automatic send(input logic [Q-1:0] w);
    in_word = w; in_valid = 1;
    @(posedge clk); while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      @(negedge clk); fmt = wfmt_e'(f); clear = 1; @(negedge clk); clear = 0;
      for (int n = 0; n < 200; n++) begin
        automatic logic [4:0] q = 5'($urandom);
        if (f == 2 && q == 5'b10000) begin
          automatic logic [4:0] q1 = 5'($urandom_range(1, 15)), q2 = 5'($urandom_range(17, 31));
          e_word.push_back(Q'(q1)); e_hold.push_back(0); e_wlast.push_back(0);
          e_word.push_back(Q'(q2)); e_hold.push_back(1); e_wlast.push_back(1);
          send(Q'(q)); send(Q'(q1)); send(Q'(q2));
        end else if (f == 3 && q[0]) begin
          automatic logic [4:0] q2 = 5'($urandom);
          e_word.push_back(Q'(q)); e_hold.push_back(0); e_wlast.push_back(0);
          e_word.push_back(Q'(q2)); e_hold.push_back(1); e_wlast.push_back(1);
          send({10'h3ff, 1'b1, q}); send({10'h3ff, 1'b0, q2});
        end else begin
          automatic logic [Q-1:0] w = (f == 0) ? Q'($urandom) : Q'(q);
          if (f == 2 && w[4:0] == 5'b10000) w[4:0] = 5'b00001;
          e_word.push_back(f == 3 ? Q'(w[4:0]) : w); e_hold.push_back(0); e_wlast.push_back(1);
          send(f == 3 ? {10'h2aa, 1'b0, w[4:0]} : w);
        end
      end
      repeat (3) @(negedge clk);
      checks++;
      if (e_word.size() != 0) begin failures++; $display("fmt %0d: %0d terms missing", f, e_word.size()); end
    end
    checks++;
    if (nspecial == 0 || nheld == 0) begin failures++; $display("special %0d held %0d", nspecial, nheld); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
