// bisc_mvm: binary-interfaced stochastic-computing matrix-vector multiplier.
//
// Computes y_j = sum_i w_i * x_ij for j = 1..LANES by feeding it a sequence of
// terms (one weight word w_i and one activation vector x_i each). All inputs and
// outputs are ordinary binary numbers; stochastic bitstreams exist only inside.
// Multiplying by w takes |W| = |w|*2^(p-1) bitstream cycles, b = 2^HWP of which
// are done per clock, so a term occupies ceil(|W|/b) clocks (one clock when
// W = 0). Everything that depends on the weight is shared by the lanes: the
// weight decoder (log-to-linear converter), the down counter and the selector
// FSM; each lane is a MUX, a ones counter and an up/down accumulator.
//
// Interface (valid/ready): a term is taken when t_valid && t_ready.
//   t_word/t_fmt  the weight word and its format (see sc_pkg)
//   t_x           the LANES activations, Q-bit MSB-aligned fractions
//   t_hold        keep the X registers (second word of a successive-log weight)
//   prec, xis     software precision p and signedness of x, sampled with the term
// t_ready is high when idle and in the last clock of a multiplication, so terms
// stream back to back. acc_clr zeroes the accumulators (use while idle). acc[j]
// holds y_j scaled by 2^(p-1); dps_align moves it to a fixed point.
// `sat` reports lanes whose accumulator saturated this clock.
//
// Structure and cycle count follow the document. The valid/ready term interface,
// and handling W = 0 as a one-clock no-op rather than skipping it, are this
// design's choices.
module bisc_mvm
  import sc_pkg::*;
#(
  parameter int unsigned LANES       = 256,
  parameter int unsigned Q           = 16,
  parameter int unsigned HWP         = 4,
  parameter int unsigned A           = 2,
  parameter bit          SUPPORT_LIN = 1'b1,
  parameter bit          SUPPORT_LOG = 1'b1,
  localparam int unsigned ACC_W      = Q + A
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          t_valid,
  output logic                          t_ready,
  input  logic [Q-1:0]                  t_word,
  input  wfmt_e                         t_fmt,
  input  logic                          t_hold,
  input  logic [LANES-1:0][Q-1:0]       t_x,
  input  logic [4:0]                    prec,
  input  logic                          xis,
  input  logic                          acc_clr,
  output logic                          busy,
  output logic                          last,
  output logic signed [ACC_W-1:0]       acc [LANES],
  output logic [LANES-1:0]              sat
);

  localparam int unsigned B  = 1 << HWP;
  localparam int unsigned WL = (HWP > 0) ? HWP : 1;

  // shared weight-side state
  logic          active;
  logic [Q-1:0]  wcnt;
  logic          wsign;
  logic          use_log;
  logic          xis_r;
  logic [4:0]    pos_r;

  logic          d_sign;
  logic [Q-1:0]  d_wabs;
  logic          d_pow2;
  logic [4:0]    d_pos;

  logic          take;
  logic          full;
  logic [HWP:0]  nbits;
  logic [WL-1:0] wlow;
  logic [$clog2(Q)-1:0] sel_idx;
  logic          sel_en;
  logic [Q-HWP-1:0] col;

  weight_decoder #(.Q(Q)) u_dec (
    .word(t_word), .fmt(t_fmt), .prec(prec),
    .sign(d_sign), .wabs(d_wabs), .is_pow2(d_pow2), .pos(d_pos)
  );

  always_comb begin
    full    = wcnt >= Q'(B);
    nbits   = full ? (HWP+1)'(B) : (HWP+1)'(wcnt);
    wlow    = WL'(wcnt);
    last    = active && (wcnt <= Q'(B));
    t_ready = !active || last;
    take    = t_valid && t_ready;
    busy    = active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      wcnt    <= '0;
      wsign   <= 1'b0;
      use_log <= 1'b0;
      xis_r   <= 1'b1;
      pos_r   <= '0;
    end else if (take) begin
      active  <= d_wabs != '0;
      wcnt    <= d_wabs;
      wsign   <= d_sign;
      use_log <= d_pow2;
      xis_r   <= xis;
      pos_r   <= d_pos;
    end else if (active) begin
      wcnt    <= wcnt - Q'(nbits);
      if (last) active <= 1'b0;
    end
  end

  sel_fsm #(.Q(Q), .HWP(HWP)) u_fsm (
    .clk(clk), .rst_n(rst_n), .restart(take), .advance(active),
    .col(col), .sel_idx(sel_idx), .sel_en(sel_en)
  );

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    sc_mac_lane #(
      .Q(Q), .HWP(HWP), .ACC_W(ACC_W),
      .SUPPORT_LIN(SUPPORT_LIN), .SUPPORT_LOG(SUPPORT_LOG)
    ) u_lane (
      .clk(clk), .rst_n(rst_n),
      .x_load(take && !t_hold), .x_in(t_x[j]), .xis(xis_r),
      .sel_idx(sel_idx), .sel_en(sel_en), .full(full), .wlow(wlow),
      .pos(pos_r), .use_log(use_log), .step(active), .up(!wsign),
      .nbits(nbits), .acc_clr(acc_clr), .acc(acc[j]), .sat(sat[j])
    );
  end

  // The accumulators may only be cleared between terms.
  a_clr_idle: assert property (@(posedge clk) disable iff (!rst_n) acc_clr |-> !active);

endmodule
