// slq_sequencer: turns the stream of stored weight words into multiplier terms.
//
// With successive log-quantization (SLQ) one weight may be stored as two log
// words whose values add up, w = LogDequant(q1) + LogDequant(q2). Both words
// multiply the same activation, so the second term is marked `hold` (keep the X
// registers) and only the last word of a weight is marked `wlast` (the next term
// needs the next activation vector). Two ways of marking a two-word weight:
//   WF_SLQ      special code: the word -M (sign bit set, all other bits 0) is
//               dropped and the two words after it form one weight.
//   WF_SLQ_TAG  tagging: each word carries a tag bit above the LOGW-bit word;
//               tag = 1 means the following word belongs to the same weight.
// WF_LINEAR and WF_LOG pass every word through as a one-word weight.
//
// Interface: valid/ready in and out, no storage besides the two-bit parse state,
// so a word passes in the clock it arrives; a special code is consumed without
// producing a term. `clear` resets the parse state at the start of a pass.
// The encodings are the document's; the handshake is this design's own.
module slq_sequencer
  import sc_pkg::*;
#(
  parameter int unsigned Q = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  wfmt_e         fmt,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [Q-1:0]  in_word,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [Q-1:0]  out_word,
  output logic          out_hold,
  output logic          out_wlast,
  output logic          special     // a special code is being consumed
);

  localparam logic [LOGW-1:0] SPECIAL = LOGW'(1) << (LOGW - 1);

  typedef enum logic [1:0] { P_IDLE, P_FIRST, P_SECOND } pstate_e;
  pstate_e pstate;
  logic    tag_prev;
  logic    tag;

  always_comb begin
    tag       = in_word[LOGW];
    special   = (fmt == WF_SLQ) && (pstate == P_IDLE) && (in_word[LOGW-1:0] == SPECIAL);
    out_valid = in_valid && !special;
    in_ready  = special ? 1'b1 : out_ready;
    out_word  = in_word;
    out_hold  = 1'b0;
    out_wlast = 1'b1;
    case (fmt)
      WF_SLQ: begin
        out_hold  = (pstate == P_SECOND);
        out_wlast = (pstate != P_FIRST);
      end
      WF_SLQ_TAG: begin
        out_word  = Q'(in_word[LOGW-1:0]);
        out_hold  = tag_prev;
        out_wlast = !tag;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate   <= P_IDLE;
      tag_prev <= 1'b0;
    end else if (clear) begin
      pstate   <= P_IDLE;
      tag_prev <= 1'b0;
    end else if (in_valid && in_ready) begin
      if (special)                 pstate <= P_FIRST;
      else if (pstate == P_FIRST)  pstate <= P_SECOND;
      else                         pstate <= P_IDLE;
      tag_prev <= (fmt == WF_SLQ_TAG) && tag;
    end
  end

endmodule
