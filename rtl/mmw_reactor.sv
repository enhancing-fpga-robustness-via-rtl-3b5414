// mmw_reactor: reaction stage and output side of a Monitoring Module Wrapper.
//
// For every sample (input value, output value) taken from the input switch,
// the reactor looks at the verdicts of the wrapper's monitoring functions.
// If several fire, the function configured as prioritized (PRIO_FN) wins,
// otherwise the one with the lowest index. The winning function decides the
// reaction it asked for:
//   * alter  - the output word is replaced by the function's default value;
//   * report - an error message (MSG_ERR: winner index, mask of all firing
//              functions, original value) is sent to the central core.
// Corrections from the central monitoring core (CMC) arrive on their own
// FSL link. The reactor always reads that link at once, so the CMC's writes
// never block; the newest correction is kept and replaces the data of the
// next output word that no local function alters (one-shot).
// Monitored values are also forwarded to the CMC: the input value (MSG_IN)
// if SEND_IN and the unaltered output value (MSG_OUT) if SEND_OUT.
//
// Timing: a sample is taken in the cycle smp_valid and smp_ready are both
// high; its output word is offered to the output stage from the next cycle
// on, and its CMC messages follow one per cycle (IN, OUT, ERR in that
// order). A new sample is taken as soon as the previous one's output word
// and all but at most the last of its messages have left, so a sample with
// one message per wrapper costs one cycle and one with three costs three.
// The winner rule, the one-shot correction, its precedence below a local
// alteration and the message layout are this design's choices; the roles of
// prioritization, alteration, reporting and non-blocking corrections follow
// the framework. The CMC link carries the data blocking: the wrapper stalls
// while it is full.
module mmw_reactor
  import mon_pkg::*;
#(
  parameter int unsigned N_FN     = 2,
  parameter int unsigned PRIO_FN  = 1,
  parameter bit          SEND_IN  = 1'b1,
  parameter bit          SEND_OUT = 1'b1,
  parameter logic [3:0]  IN_PORT  = 4'd0,
  parameter logic [3:0]  OUT_PORT = 4'd1
) (
  input  logic            clk,
  input  logic            rst,
  // sample from the input switch
  input  logic            smp_valid,
  output logic            smp_ready,
  input  fsl_word_t       smp_in,
  input  fsl_word_t       smp_out,
  input  logic [7:0]      smp_seq,
  // verdicts of the monitoring functions
  input  logic [N_FN-1:0] fn_hit,
  input  logic [N_FN-1:0] fn_alter,
  input  val_t            fn_alt_value [N_FN],
  input  logic [N_FN-1:0] fn_report,
  // corrections from the CMC (FSL slave)
  input  logic            corr_exists,
  input  fsl_word_t       corr_data,
  output logic            corr_read,
  // to the output stage (FSL master)
  output logic            o_write,
  output fsl_word_t       o_data,
  input  logic            o_full,
  // messages to the CMC (FSL master)
  output logic            msg_write,
  output fsl_word_t       msg_data,
  input  logic            msg_full,
  // one-cycle event pulses, in the cycle a sample is taken
  output logic            ev_alter,    // a local monitoring function altered it
  output logic            ev_corr,     // a CMC correction was applied
  output logic            ev_report    // an error message was queued
);

  // ---- winner selection ----
  localparam int unsigned WW = (N_FN > 1) ? $clog2(N_FN) : 1;
  logic          any_hit;
  logic [WW-1:0] winner;
  always_comb begin
    any_hit = |fn_hit;
    winner  = '0;
    if (fn_hit[PRIO_FN]) winner = WW'(PRIO_FN);
    else
      for (int i = N_FN - 1; i >= 0; i--)
        if (fn_hit[i]) winner = WW'(i);
  end

  logic do_alter, do_report;
  assign do_alter  = any_hit && fn_alter[winner];
  assign do_report = any_hit && fn_report[winner];

  // ---- correction register ----
  logic      corr_pend;
  fsl_word_t corr_word;
  logic      use_corr;
  assign corr_read = corr_exists;

  // ---- output and message state ----
  logic       pend_out;
  fsl_word_t  out_word;
  logic [2:0] pend;          // 0: IN, 1: OUT, 2: ERR
  mon_msg_t   msg [3];
  logic       o_fire, msg_fire, accept;
  logic [2:0] first, remaining;

  assign o_data  = out_word;
  assign o_fire  = pend_out && !o_full;
  assign o_write = o_fire;

  always_comb begin
    first = '0;
    if (pend[0])      first = 3'b001;
    else if (pend[1]) first = 3'b010;
    else if (pend[2]) first = 3'b100;
  end

  assign msg_fire  = (|pend) && !msg_full;
  assign msg_write = msg_fire;
  always_comb begin
    msg_data.ctrl = 1'b0;
    msg_data.data = '0;
    for (int i = 0; i < 3; i++)
      if (first[i]) msg_data.data = msg[i];
  end

  assign remaining = pend & ~(msg_fire ? first : 3'b000);
  assign smp_ready = (!pend_out || o_fire) && (remaining == 3'b000);
  assign accept    = smp_valid && smp_ready;
  assign use_corr  = corr_pend && !do_alter;

  assign ev_alter  = accept && do_alter;
  assign ev_corr   = accept && use_corr;
  assign ev_report = accept && do_report;

  always_ff @(posedge clk) begin
    if (accept) begin
      out_word.ctrl <= smp_out.ctrl;
      if (do_alter)      out_word.data <= FSL_DW'(fn_alt_value[winner]);
      else if (use_corr) out_word.data <= corr_word.data;
      else               out_word.data <= smp_out.data;
      msg[0] <= '{kind: MSG_IN,  src: IN_PORT,  aux: smp_seq, value: val_t'(smp_in.data[VAL_W-1:0])};
      msg[1] <= '{kind: MSG_OUT, src: OUT_PORT, aux: smp_seq, value: val_t'(smp_out.data[VAL_W-1:0])};
      msg[2] <= '{kind: MSG_ERR, src: 4'(winner), aux: 8'(fn_hit),
                  value: val_t'(smp_out.data[VAL_W-1:0])};
    end
    if (corr_read) corr_word <= corr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_out  <= 1'b0;
      pend      <= '0;
      corr_pend <= 1'b0;
    end else begin
      if (accept) begin
        pend_out <= 1'b1;
        pend     <= {do_report, SEND_OUT, SEND_IN};
      end else begin
        if (o_fire) pend_out <= 1'b0;
        pend <= remaining;
      end
      if (corr_read)                corr_pend <= 1'b1;
      else if (accept && use_corr)  corr_pend <= 1'b0;
    end
  end

  a_prio_in_range: assert property (@(posedge clk) PRIO_FN < N_FN);

endmodule
