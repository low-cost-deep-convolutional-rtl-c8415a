// lfsr_sng: conventional stochastic number generator (binary-to-stochastic
// converter) built from a maximal-length LFSR and a comparator.
//
// Every clock with `en` the Q-bit Fibonacci LFSR steps to its next state r,
// which runs through all 2^Q-1 non-zero values. The generated bit is
// (r - 1) < value, so over one full period the stream holds exactly `value`
// ones out of 2^Q-1 bits (value <= 2^Q-1). For a bipolar number x in
// [-1, 1), given as Q-bit two's complement, the caller passes the offset-binary
// code x ^ 2^(Q-1). A second comparator output, against the bit-reversed state,
// lets one LFSR feed two operands whose streams are far less correlated than
// two equal comparisons would be.
//
// Interface: bit_a = (r-1) < value_a, bit_b = (rev(r)-1) < value_b, both
// combinational from the current state; the state moves on the clock edge.
// Q from 4 to 16 (tap table below).
//
// The LFSR-plus-comparator SNG follows the document; sharing one LFSR between
// the two operands through bit reversal and the tap table are this design's.
module lfsr_sng #(
  parameter int unsigned Q    = 9,
  parameter logic [15:0] SEED = 16'h0001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [Q-1:0] value_a,
  input  logic [Q-1:0] value_b,
  output logic         bit_a,
  output logic         bit_b,
  output logic [Q-1:0] rnd
);

  // feedback taps (1-based bit positions) of maximal-length polynomials
  function automatic logic [15:0] taps(input int unsigned n);
    case (n)
      4:  return 16'h000C;  // 4,3
      5:  return 16'h0014;  // 5,3
      6:  return 16'h0030;  // 6,5
      7:  return 16'h0060;  // 7,6
      8:  return 16'h00B8;  // 8,6,5,4
      9:  return 16'h0110;  // 9,5
      10: return 16'h0240;  // 10,7
      11: return 16'h0500;  // 11,9
      12: return 16'h0829;  // 12,6,4,1
      13: return 16'h100D;  // 13,4,3,1
      14: return 16'h2015;  // 14,5,3,1
      15: return 16'h6000;  // 15,14
      default: return 16'hD008;  // 16,15,13,4
    endcase
  endfunction

  localparam logic [Q-1:0] TAPS = Q'(taps(Q));
  localparam logic [Q-1:0] S0   = (Q'(SEED) == '0) ? Q'(1) : Q'(SEED);

  logic [Q-1:0] rev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rnd <= S0;
    else if (en) rnd <= {rnd[Q-2:0], ^(rnd & TAPS)};
  end

  always_comb begin
    for (int i = 0; i < int'(Q); i++) rev[i] = rnd[Q-1-i];
    bit_a = (rnd - 1'b1) < value_a;
    bit_b = (rev - 1'b1) < value_b;
  end

endmodule
