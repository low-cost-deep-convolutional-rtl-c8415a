// buffer_ram: on-chip buffer (input, weight or output) of the convolution tile.
//
// A simple dual-port memory: one write port and one read port with a
// registered (synchronous) read, as an SRAM macro or FPGA block RAM provides.
// rdata shows mem[raddr] one clock after `re`, and holds it otherwise.
// The document calls for input, weight and output buffers but gives neither
// their organisation nor their size; this single-clock 1W1R form is this
// design's choice. Contents start at zero.
module buffer_ram #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
