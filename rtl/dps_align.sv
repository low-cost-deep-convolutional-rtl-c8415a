// dps_align: decimal-point alignment after dynamic precision scaling.
//
// At software precision p the accumulator holds y*2^(p-1): its binary point
// moves with p. Shifting left by Q-p puts every result on the same Q-1
// fractional bits, whatever p was; values that no longer fit in ACC_W bits
// saturate. Combinational. The document notes that one shifter fixes the
// decimal point; saturation on overflow is this design's choice.
module dps_align #(
  parameter int unsigned Q     = 16,
  parameter int unsigned ACC_W = 18
) (
  input  logic signed [ACC_W-1:0] acc,
  input  logic [4:0]              prec,
  output logic signed [ACC_W-1:0] y
);

  localparam logic signed [ACC_W+Q-1:0] MAXV = (ACC_W+Q)'((1 << (ACC_W - 1)) - 1);
  localparam logic signed [ACC_W+Q-1:0] MINV = -(ACC_W+Q)'(1 << (ACC_W - 1));

  logic signed [ACC_W+Q-1:0] wide;

  always_comb begin
    wide = (ACC_W+Q)'(acc) <<< (Q - int'(prec));
    if (wide > MAXV)      y = ACC_W'(MAXV);
    else if (wide < MINV) y = ACC_W'(MINV);
    else                  y = ACC_W'(wide);
  end

endmodule
