// apc_pc_acc: accumulative parallel counter of a bit-parallel bipolar SC-MAC.
//
// Takes the N product bits of one clock (XNOR outputs of N stream bit pairs),
// counts their ones and adds ones - zeros = 2*ones - N to a saturating Q+A-bit
// accumulator. With APPROX = 1 the count is approximate: each pair of bits is
// first reduced to one bit, alternately by AND and by OR, so that about half
// the ones survive; the N/2 bits are counted and the count is doubled. This
// halves the adder tree of the parallel counter.
//
// Interface: pb is sampled on the clock edge when en is high; acc is
// registered; clr zeroes it (synchronous); sat flags a clock whose sum was
// clipped to the accumulator range.
//
// The approximate N-to-N/2 reduction and the saturating up/down accumulator
// follow the document; the AND/OR pairing is this design's choice.
module apc_pc_acc #(
  parameter int unsigned N      = 128,
  parameter int unsigned ACC_W  = 18,
  parameter bit          APPROX = 1'b1,
  localparam int unsigned CW    = $clog2(N + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic [N-1:0]            pb,
  output logic signed [ACC_W-1:0] acc,
  output logic                    sat
);

  localparam logic signed [ACC_W+1:0] MAXV = (ACC_W+2)'((1 << (ACC_W - 1)) - 1);
  localparam logic signed [ACC_W+1:0] MINV = -(ACC_W+2)'(1 << (ACC_W - 1));

  logic [CW-1:0]           ones;
  logic                    pair;
  logic signed [ACC_W+1:0] sum;

  always_comb begin
    ones = '0;
    pair = 1'b0;
    if (APPROX && N > 1) begin
      for (int i = 0; i < int'(N / 2); i++) begin
        pair = (i % 2 == 0) ? (pb[2*i] & pb[2*i+1]) : (pb[2*i] | pb[2*i+1]);
        ones = ones + CW'(pair);
      end
      ones = ones << 1;
      if (N % 2 == 1) ones = ones + CW'(pb[N-1]);
    end else begin
      for (int i = 0; i < int'(N); i++) ones = ones + CW'(pb[i]);
    end
    sum = (ACC_W+2)'(acc) + (ACC_W+2)'(2 * int'(ones) - int'(N));
    sat = en && ((sum > MAXV) || (sum < MINV));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          acc <= '0;
    else if (clr)        acc <= '0;
    else if (en) begin
      if (sum > MAXV)      acc <= ACC_W'(MAXV);
      else if (sum < MINV) acc <= ACC_W'(MINV);
      else                 acc <= ACC_W'(sum);
    end
  end

endmodule
