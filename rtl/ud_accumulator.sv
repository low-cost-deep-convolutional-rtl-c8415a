// ud_accumulator: saturating up/down counter that converts the bitstream back
// to binary and accumulates products (the "Y counter" of the SC-MAC).
//
// Each clock it takes `ones`, the number of 1s among the `nbits` bitstream bits
// consumed this clock, and the counting direction `up` (the weight sign is
// folded in here: a negative weight inverts the bitstream, which turns up-counts
// into down-counts).
//   signed x (xis = 1): every bit counts, +1 for 1 and -1 for 0:
//                       delta = +/-(2*ones - nbits)
//   half-range x (xis = 0): the update is suppressed for 0 bits:
//                       delta = +/-ones
// The sum saturates at the limits of ACC_W-bit two's complement; `sat` pulses
// in a clock where the limit was hit. `clr` zeroes it (and wins over `en`).
// Result registered one clock after `en`. Counting rules follow the document;
// doing several bits per clock and saturating are as it describes for the
// bit-parallel and accumulating versions.
module ud_accumulator #(
  parameter int unsigned ACC_W = 18,
  parameter int unsigned HWP   = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic                     up,
  input  logic                     xis,
  input  logic [HWP:0]             ones,
  input  logic [HWP:0]             nbits,
  output logic signed [ACC_W-1:0]  acc,
  output logic                     sat
);

  localparam logic signed [ACC_W+1:0] MAXV = (ACC_W+2)'((1 << (ACC_W - 1)) - 1);
  localparam logic signed [ACC_W+1:0] MINV = -(ACC_W+2)'(1 << (ACC_W - 1));

  logic signed [HWP+2:0]   mag;
  logic signed [HWP+2:0]   delta;
  logic signed [ACC_W+1:0] sum;
  logic signed [ACC_W-1:0] nxt;

  always_comb begin
    mag   = xis ? (HWP+3)'(2 * int'(ones) - int'(nbits)) : (HWP+3)'(ones);
    delta = up ? mag : -mag;
    sum   = (ACC_W+2)'(acc) + (ACC_W+2)'(delta);
    sat   = en && ((sum > MAXV) || (sum < MINV));
    if (sum > MAXV)      nxt = ACC_W'(MAXV);
    else if (sum < MINV) nxt = ACC_W'(MINV);
    else                 nxt = ACC_W'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= nxt;
  end

endmodule
