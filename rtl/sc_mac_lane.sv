// sc_mac_lane: one SC-MAC of the binary-interfaced multiplier array.
//
// It holds the activation x in its X register and, each clock of a
// multiplication, turns b = 2^HWP bits of x's low-discrepancy bitstream into a
// count of ones that the up/down accumulator adds or subtracts. There is no
// per-lane stochastic number generator beyond one MUX: the weight side (down
// counter, selector FSM, sign) is shared across lanes and arrives as the
// control inputs below.
//   - X register: loaded by `x_load`; for signed x (xis = 1) its MSB is
//     inverted on the way into the MUX, which turns two's complement into the
//     offset code whose bitstream probability is 0.5 + x/2.
//   - MUX: picks the last bitstream row of the column (sel_idx/sel_en).
//   - ones counter: the baseline counter (SUPPORT_LIN) for any weight, and/or the
//     simplified one for log weights (SUPPORT_LOG); `use_log` picks between them
//     when both are built.
//   - accumulator: up/down count, direction = NOT(weight sign), saturating.
// Timing: `step` consumes one column; the accumulator updates at that clock
// edge. x_load on the same edge affects only the next multiplication.
// Structure follows the document's SC-MAC figures; building both counters in one
// lane so one array serves every weight format is this design's choice.
module sc_mac_lane #(
  parameter int unsigned Q           = 16,
  parameter int unsigned HWP         = 4,
  parameter int unsigned ACC_W       = 18,
  parameter bit          SUPPORT_LIN = 1'b1,
  parameter bit          SUPPORT_LOG = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_load,
  input  logic [Q-1:0]             x_in,
  input  logic                     xis,
  input  logic [$clog2(Q)-1:0]     sel_idx,
  input  logic                     sel_en,
  input  logic                     full,
  input  logic [(HWP>0?HWP:1)-1:0] wlow,
  input  logic [4:0]               pos,
  input  logic                     use_log,
  input  logic                     step,
  input  logic                     up,
  input  logic [HWP:0]             nbits,
  input  logic                     acc_clr,
  output logic signed [ACC_W-1:0]  acc,
  output logic                     sat
);

  logic [Q-1:0] xreg;
  logic [Q-1:0] xs;        // operand as seen by the MUX
  logic         mux_bit;
  logic [HWP:0] ones_lin;
  logic [HWP:0] ones_log;
  logic [HWP:0] ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      xreg <= '0;
    else if (x_load) xreg <= x_in;
  end

  always_comb begin
    xs        = xreg;
    xs[Q-1]   = xreg[Q-1] ^ xis;
    mux_bit   = sel_en & xs[sel_idx];
  end

  if (SUPPORT_LIN) begin : g_lin
    ones_counter #(.Q(Q), .HWP(HWP)) u_ones (
      .x(xs), .mux_bit(mux_bit), .full(full), .wlow(wlow), .ones(ones_lin)
    );
  end else begin : g_nolin
    assign ones_lin = '0;
  end

  if (SUPPORT_LOG && HWP > 0) begin : g_log
    ones_counter_log #(.Q(Q), .HWP(HWP)) u_ones_log (
      .x(xs), .mux_bit(mux_bit), .full(full), .pos(pos), .ones(ones_log)
    );
  end else begin : g_nolog
    assign ones_log = ones_lin;
  end

  assign ones = (SUPPORT_LOG && (use_log || !SUPPORT_LIN)) ? ones_log : ones_lin;

  ud_accumulator #(.ACC_W(ACC_W), .HWP(HWP)) u_acc (
    .clk(clk), .rst_n(rst_n), .clr(acc_clr), .en(step), .up(up), .xis(xis),
    .ones(ones), .nbits(nbits), .acc(acc), .sat(sat)
  );

endmodule
