// tile_ctrl: controller of the convolution tile.
//
// One pass computes, for every lane j, y_j += sum_i w_i * x_ij over the weight
// words stored at wbuf[wbase .. wbase+n_words-1] and the activation vectors at
// xbuf[xbase ..], the vector index advancing once per weight (a two-word
// successive-log weight uses one vector for both words). In the tiling of a
// convolution layer the lanes are the T_R x T_C output pixels of one output map
// and the weights run over the K*K*Z filter taps, so one pass (or several
// passes without `clear`, when the filter does not fit the buffers) yields a
// T_R x T_C block of one output feature map.
//
// Pipeline, one weight word per clock when the multiplier keeps up:
//   1. read wbuf[wp]                          (synchronous buffer read)
//   2. slq_sequencer parses the word; a term reads xbuf[xbase+xi]
//   3. the term with its activation vector enters a FIFO_DEPTH-entry FIFO
//   4. the multiplier takes terms from the FIFO (valid/ready)
// Reads are only issued while the FIFO is sure to have room for everything in
// flight, so nothing is ever dropped; the multiplier's multi-clock terms stall
// the reads through this credit check.
// After the last term, with `drain` set, the LANES accumulators are aligned
// (dps_align, one lane per clock) and written to obuf[obase + j]. `done` pulses
// for one clock at the end of the pass.
//
// Zero skipping (ZERO_SKIP = 1): a term whose weight is zero at the pass's
// precision (checked by a weight_decoder on the parsed word) is not put into
// the FIFO, so it costs the multiplier no clock. If it was the first word of a
// successive-log weight, the next word is sent without its hold flag; it
// carries the same activation vector, so the lanes simply reload it.
//
// The document gives the loop tiling, the three buffers and the variable-latency
// term stream, and names zero skipping as an option; this pipeline, its FIFO,
// the pass interface and the place of the zero test are this design's.
module tile_ctrl
  import sc_pkg::*;
#(
  parameter int unsigned LANES      = 256,
  parameter int unsigned Q          = 16,
  parameter int unsigned ACC_W      = 18,
  parameter int unsigned XBUF_DEPTH = 512,
  parameter int unsigned WBUF_DEPTH = 1024,
  parameter int unsigned OBUF_DEPTH = 512,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          ZERO_SKIP  = 1'b1,
  localparam int unsigned XAW = $clog2(XBUF_DEPTH),
  localparam int unsigned WAW = $clog2(WBUF_DEPTH),
  localparam int unsigned OAW = $clog2(OBUF_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // pass command
  input  logic                     start,
  input  mvm_cfg_t                 cfg,
  input  logic [WAW:0]             n_words,
  input  logic [WAW-1:0]           wbase,
  input  logic [XAW-1:0]           xbase,
  input  logic [OAW-1:0]           obase,
  input  logic                     clear,
  input  logic                     drain,
  output logic                     busy,
  output logic                     done,
  // buffers
  output logic                     w_re,
  output logic [WAW-1:0]           w_raddr,
  input  logic [Q-1:0]             w_rdata,
  output logic                     x_re,
  output logic [XAW-1:0]           x_raddr,
  input  logic [LANES-1:0][Q-1:0]  x_rdata,
  output logic                     o_we,
  output logic [OAW-1:0]           o_waddr,
  output logic [ACC_W-1:0]         o_wdata,
  // multiplier
  output logic                     t_valid,
  input  logic                     t_ready,
  output logic [Q-1:0]             t_word,
  output wfmt_e                    t_fmt,
  output logic                     t_hold,
  output logic [LANES-1:0][Q-1:0]  t_x,
  output logic [4:0]               prec,
  output logic                     xis,
  output logic                     acc_clr,
  input  logic                     mvm_busy,
  input  logic signed [ACC_W-1:0]  acc [LANES]
);

  typedef enum logic [2:0] { S_IDLE, S_CLEAR, S_RUN, S_DRAIN, S_DONE } state_e;

  localparam int unsigned FAW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;
  localparam int unsigned LAW = (LANES > 1) ? $clog2(LANES) : 1;

  typedef struct packed {
    logic [Q-1:0] word;
    logic         hold;
  } term_t;

  state_e         state;
  mvm_cfg_t       cfg_r;
  logic           drain_r;
  logic [WAW:0]   w_left;
  logic [WAW-1:0] wp;
  logic [XAW-1:0] xi;
  logic [OAW-1:0] obase_r;
  logic [LAW-1:0] lane;

  // pipeline stages
  logic           s1_valid;
  logic           s2_valid;
  term_t          s2_term;

  // sequencer
  logic           sq_out_valid;
  logic [Q-1:0]   sq_word;
  logic           sq_hold;
  logic           sq_wlast;
  logic           sq_in_ready;
  logic           sq_special;

  // FIFO
  term_t                    f_term [FIFO_DEPTH];
  logic [LANES-1:0][Q-1:0]  f_x    [FIFO_DEPTH];
  logic [FAW-1:0]           f_head, f_tail;
  logic [FAW:0]             f_cnt;
  logic                     f_push, f_pop;

  logic           skip, skip_pend;
  logic [Q-1:0]   z_wabs;
  logic           issue;
  logic           pipe_empty;
  logic signed [ACC_W-1:0] acc_sel;
  logic signed [ACC_W-1:0] y_al;

  slq_sequencer #(.Q(Q)) u_seq (
    .clk(clk), .rst_n(rst_n), .clear(start), .fmt(cfg_r.wfmt),
    .in_valid(s1_valid), .in_ready(sq_in_ready), .in_word(w_rdata),
    .out_valid(sq_out_valid), .out_ready(1'b1), .out_word(sq_word),
    .out_hold(sq_hold), .out_wlast(sq_wlast), .special(sq_special)
  );

  always_comb begin
    issue      = (state == S_RUN) && (w_left != '0) &&
                 ((FAW+1)'(s1_valid) + (FAW+1)'(s2_valid) + f_cnt < (FAW+1)'(FIFO_DEPTH));
    w_re       = issue;
    w_raddr    = wp;
    x_re       = sq_out_valid;
    x_raddr    = xbase + xi;
    skip       = ZERO_SKIP && s2_valid && (z_wabs == '0);
    f_push     = s2_valid && !skip;
    t_valid    = (f_cnt != '0);
    t_word     = f_term[f_head].word;
    t_hold     = f_term[f_head].hold;
    t_x        = f_x[f_head];
    t_fmt      = cfg_r.wfmt;
    prec       = cfg_r.prec;
    xis        = cfg_r.xis;
    f_pop      = t_valid && t_ready;
    pipe_empty = (w_left == '0) && !s1_valid && !s2_valid && (f_cnt == '0) && !mvm_busy;
    acc_clr    = (state == S_CLEAR);
    busy       = (state != S_IDLE);
    done       = (state == S_DONE);
    acc_sel    = acc[lane];
    o_we       = (state == S_DRAIN);
    o_waddr    = obase_r + OAW'(lane);
    o_wdata    = y_al;
  end

  weight_decoder #(.Q(Q)) u_zdec (
    .word(s2_term.word), .fmt(cfg_r.wfmt), .prec(cfg_r.prec),
    .sign(), .wabs(z_wabs), .is_pow2(), .pos()
  );

  dps_align #(.Q(Q), .ACC_W(ACC_W)) u_align (.acc(acc_sel), .prec(cfg_r.prec), .y(y_al));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cfg_r    <= '{wfmt: WF_LINEAR, prec: 5'(Q), xis: 1'b1};
      drain_r  <= 1'b0;
      w_left   <= '0;
      wp       <= '0;
      xi       <= '0;
      obase_r  <= '0;
      lane     <= '0;
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s2_term  <= '0;
      f_head   <= '0;
      f_tail   <= '0;
      f_cnt    <= '0;
      skip_pend <= 1'b0;
    end else begin
      if (skip)        skip_pend <= 1'b1;
      else if (f_push) skip_pend <= 1'b0;
      s1_valid <= issue;
      s2_valid <= sq_out_valid;
      s2_term  <= '{word: sq_word, hold: sq_hold};
      if (issue) begin
        wp     <= wp + 1'b1;
        w_left <= w_left - 1'b1;
      end
      if (sq_out_valid && sq_wlast) xi <= xi + 1'b1;
      if (f_push) f_tail <= (f_tail == FAW'(FIFO_DEPTH - 1)) ? '0 : f_tail + 1'b1;
      if (f_pop)  f_head <= (f_head == FAW'(FIFO_DEPTH - 1)) ? '0 : f_head + 1'b1;
      f_cnt <= f_cnt + (FAW+1)'(f_push) - (FAW+1)'(f_pop);
      case (state)
        S_IDLE: if (start) begin
          cfg_r   <= cfg;
          drain_r <= drain;
          w_left  <= n_words;
          wp      <= wbase;
          xi      <= '0;
          obase_r <= obase;
          state   <= clear ? S_CLEAR : S_RUN;
        end
        S_CLEAR: state <= S_RUN;
        S_RUN: if (pipe_empty) begin
          lane  <= '0;
          state <= drain_r ? S_DRAIN : S_DONE;
        end
        S_DRAIN: begin
          lane <= lane + 1'b1;
          if (lane == LAW'(LANES - 1)) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (f_push) begin
      f_term[f_tail] <= '{word: s2_term.word, hold: s2_term.hold && !skip_pend};
      f_x[f_tail]    <= x_rdata;
    end
  end

  // The credit check must keep the FIFO from overflowing, and the sequencer
  // must never be back-pressured.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(f_push && !f_pop && f_cnt == (FAW+1)'(FIFO_DEPTH)));
  a_seq_ready:   assert property (@(posedge clk) disable iff (!rst_n)
                                  s1_valid |-> sq_in_ready);

endmodule
