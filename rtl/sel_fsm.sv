// sel_fsm: shared selector FSM of the low-discrepancy stochastic number
// generator.
//
// The bitstream for an operand x = {x[Q-1] ... x[0]} is produced by a MUX that,
// at bitstream cycle c = 1, 2, 3, ..., picks bit x[Q-1-tz(c)], where tz(c) is the
// number of trailing zeros of c, and picks a constant 0 once tz(c) >= Q. Bit
// x[Q-i] therefore first appears at cycle 2^(i-1) and then every 2^i cycles, so
// the number of ones in the first k cycles is sum_i x[Q-i]*round(k/2^i).
//
// With bit-parallelism b = 2^HWP the stream is folded into b rows; one column
// (b consecutive bitstream cycles) is consumed per clock. Inside a column the
// first b-1 rows always hold the same bits x[Q-1] .. x[Q-HWP] (counted by the
// ones counters without a MUX), and only the last row varies: it selects
// x[Q-1-HWP-tz(col+1)]. This module is the column counter and the decoder of
// that last-row select, shared by every lane of the multiplier.
//
// Interface: `restart` puts the FSM back to column 0 (a new multiplication
// starts); `advance` moves to the next column. `restart` wins when both are
// set. `sel_idx`/`sel_en` are combinational from the current column: sel_en = 0
// means the last row carries the constant 0.
//
// The pattern follows the document; folding it into columns with the select
// decoded from the trailing zeros of the column number is this design's way of
// building the FSM with 2^(Q-HWP) states.
module sel_fsm #(
  parameter int unsigned Q   = 16,  // operand width (maximum precision)
  parameter int unsigned HWP = 4    // hardware precision: b = 2^HWP bits per clock
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic                 advance,
  output logic [Q-HWP-1:0]     col,      // current column
  output logic [$clog2(Q)-1:0] sel_idx,  // bit of x selected by the last row
  output logic                 sel_en    // 0: the last row is the constant 0
);

  localparam int unsigned CW = Q - HWP;

  logic [CW-1:0] nxt;   // col + 1, the 1-based column number
  int unsigned   tz;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       col <= '0;
    else if (restart) col <= '0;
    else if (advance) col <= col + 1'b1;
  end

  always_comb begin
    nxt = col + 1'b1;
    tz  = CW;
    for (int i = CW - 1; i >= 0; i--)
      if (nxt[i]) tz = i;
    sel_en  = (HWP + tz) < Q;
    sel_idx = sel_en ? ($clog2(Q))'(Q - 1 - HWP - tz) : '0;
  end

endmodule
