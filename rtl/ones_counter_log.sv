// ones_counter_log: simplified ones counter for log-quantized weights.
//
// When the weight comes from a log (or SLQ) word, the initial down-counter value
// |W| has a single one, and since the counter drops by b = 2^HWP per clock its
// HWP low bits keep that one (or none). So once fewer than b cycles remain the
// count left is w = 2^pos, and
//   sum_{i=1..HWP} x[Q-i]*round(2^pos/2^i) = {x[Q-1] .. x[Q-pos]} + x[Q-1-pos],
// i.e. the top HWP bits shifted right by HWP-pos, plus one bit picked by a MUX.
// For a full column (full = 1) the shift is 0 and the MUX passes the FSM-selected
// `mux_bit`, so one shifter, one MUX and one adder serve both cases, as in the
// document. Combinational. Needs HWP >= 1; only valid for power-of-two weights.
module ones_counter_log #(
  parameter int unsigned Q   = 16,
  parameter int unsigned HWP = 4
) (
  input  logic [Q-1:0]  x,
  input  logic          mux_bit,
  input  logic          full,
  input  logic [4:0]    pos,     // position of the single one of w (< HWP)
  output logic [HWP:0]  ones
);

  logic [HWP-1:0] top;
  logic [HWP:0]   shifted;
  logic           pick;

  always_comb begin
    top     = x[Q-1 -: HWP];
    shifted = full ? (HWP+1)'(top) : (HWP+1)'(top >> (HWP - int'(pos)));
    pick    = full ? mux_bit : x[Q-1-int'(pos)];
    ones    = shifted + (HWP+1)'(pick);
  end

endmodule
