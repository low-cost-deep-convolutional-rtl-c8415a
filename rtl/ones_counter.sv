// ones_counter: baseline ones counter of a bit-parallel SC-MAC lane.
//
// Counts how many of the b = 2^HWP bitstream bits consumed this clock are 1.
// x is the lane's operand as seen by the bitstream MUX (sign bit already
// flipped for signed operation); the bits x[Q-1] .. x[Q-HWP] fill the first b-1
// rows of every column in a fixed pattern, and `mux_bit` is the last row,
// selected by the shared FSM.
//   full = 1 (at least b cycles left):  ones = {x[Q-1] .. x[Q-HWP]} + mux_bit
//   full = 0 (only w < b cycles left):  ones = sum_{i=1..HWP} x[Q-i]*round(w/2^i)
// with round(w/2^i) = (w >> i) + w[i-1]. Both formulas are those of the
// document; the result is exactly what a bit-serial multiplier would count.
// Combinational; HWP = 0 gives the bit-serial lane (ones = mux_bit).
module ones_counter #(
  parameter int unsigned Q   = 16,
  parameter int unsigned HWP = 4
) (
  input  logic [Q-1:0]                 x,
  input  logic                         mux_bit,
  input  logic                         full,
  input  logic [(HWP>0?HWP:1)-1:0]     wlow,   // remaining cycles when full = 0
  output logic [HWP:0]                 ones
);

  logic [HWP:0] top;
  logic [HWP:0] part;
  logic [HWP:0] rnd;

  always_comb begin
    top  = '0;
    part = '0;
    rnd  = '0;
    for (int i = 1; i <= int'(HWP); i++) begin
      top  = top + ((HWP+1)'(x[Q-i]) << (HWP - i));
      rnd  = (HWP+1)'(wlow >> i) + (HWP+1)'(wlow[i-1]);
      if (x[Q-i]) part = part + rnd;
    end
    ones = full ? top + (HWP+1)'(mux_bit) : part;
  end

endmodule
