// tb_buffer_ram: writes random words, reads them back one clock later, checks
// that rdata holds while `re` is low and that a read sees data written earlier.
module tb_buffer_ram;
  localparam int DW = 24, DEPTH = 64;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] model [DEPTH];
  logic [DW-1:0] last_read = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  buffer_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    @(negedge clk); re = 1; raddr = 0; @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = DW'($urandom);
      re = 1'($urandom); raddr = 6'($urandom);
      @(posedge clk); #1;
      if (re) begin
        checks++;
        if (rdata != model[raddr]) begin failures++; $display("read %0d: %h vs %h", raddr, rdata, model[raddr]); end
        last_read = model[raddr];
      end else begin
        checks++;
        if (rdata != last_read) begin failures++; $display("rdata did not hold"); end
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
