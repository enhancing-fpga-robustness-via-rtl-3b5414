// mmw: Monitoring Module Wrapper, the generic monitor placed around one IP
// core that talks over Fast Simplex Links (FSL).
//
// Data path (one input port i and one output port p of the core monitored):
//   environment --s_*--> core           (input observed, passed on untouched)
//   core --core_m_*--> input switch --> monitoring functions --> reactor
//        --> output stage (FSL buffer) --m_*--> environment
// The input switch pairs each output word with the input word it came from,
// the monitoring functions judge the output value in the same cycle, the
// reactor alters the word or reports an error and forwards the monitored
// values to the central monitoring core (CMC) over comm_m_*, and applies
// corrections the CMC sends over comm_s_*. Ports of the core that are not
// monitored do not pass through the wrapper at all.
//
// The set of monitoring functions is a parameter: FN_CFG holds one
// descriptor per slot (which repository function, its generics, whether it
// alters and/or reports), PRIO_FN names the prioritized slot. The defaults
// are the example configuration of the sensor station: slot 0 value range
// -20..40, slot 1 threshold 50. Which slot is prioritized and the reactions
// chosen for each (range: report only; threshold: replace by 50 and
// report) are this design's choices.
//
// With FORK_OUT = 1 the monitored output is forked instead: each word of
// the core goes out on m_* in the same cycle as it enters the input switch,
// so the wrapper adds no delay, but it can no longer alter or correct the
// word; the functions still judge it and errors and values still reach the
// CMC. The word is written only when both the output link and the input
// switch can take it. Corrections from the CMC are read and discarded.
//
// Timing (FORK_OUT = 0, the default): the wrapper adds two cycles between
// the core's output write and the word leaving the output stage (one in the
// reactor register, one in the output buffer). It sustains one word per
// cycle while only one message per sample goes to the CMC, and one word per n cycles with n messages per
// sample. Blocking FSL semantics hold throughout: a full link stalls the core
// instead of losing data. Reset is synchronous, active high.
module mmw
  import mon_pkg::*;
#(
  parameter bit                     MON_IN    = 1'b1,
  parameter int unsigned            PROC_TIME = 2,
  parameter int unsigned            N_FN      = 2,
  parameter fn_cfg_t [N_FN-1:0]     FN_CFG    = {fn_thresh(16'sd50, 1'b1, 16'sd50, 1'b1),
                                                 fn_range(-16'sd20, 16'sd40, 1'b0, 16'sd0, 1'b1)},
  parameter int unsigned            PRIO_FN   = 1,
  parameter bit                     SEND_IN   = 1'b1,
  parameter bit                     SEND_OUT  = 1'b1,
  parameter int unsigned            OUT_DEPTH = 2,
  parameter bit                     FORK_OUT  = 1'b0
) (
  input  logic      clk,
  input  logic      rst,
  // original input link of the core (environment -> core)
  input  logic      s_exists,
  input  fsl_word_t s_data,
  output logic      s_read,
  // to the wrapped core's input
  output logic      core_s_exists,
  output fsl_word_t core_s_data,
  input  logic      core_s_read,
  // from the wrapped core's monitored output
  input  logic      core_m_write,
  input  fsl_word_t core_m_data,
  output logic      core_m_full,
  // original output link of the core (wrapper -> environment)
  output logic      m_write,
  output fsl_word_t m_data,
  input  logic      m_full,
  // link to the CMC (monitored values and error messages)
  output logic      comm_m_write,
  output fsl_word_t comm_m_data,
  input  logic      comm_m_full,
  // link from the CMC (corrections)
  input  logic      comm_s_exists,
  input  fsl_word_t comm_s_data,
  output logic      comm_s_read,
  // event pulses
  output logic      ev_alter,
  output logic      ev_corr,
  output logic      ev_report
);

  // ---- input tap ----
  logic in_room;
  assign core_s_exists = s_exists && in_room;
  assign core_s_data   = s_data;
  assign s_read        = core_s_read;

  // ---- input switch ----
  logic       smp_valid, smp_ready;
  fsl_word_t  smp_in, smp_out;
  logic [7:0] smp_seq;
  logic       sw_write, sw_full;

  mmw_input_switch #(.MON_IN(MON_IN), .PROC_TIME(PROC_TIME)) u_switch (
    .clk, .rst,
    .in_fire  (core_s_read && core_s_exists),
    .in_data  (s_data),
    .in_room  (in_room),
    .c_write  (sw_write),
    .c_data   (core_m_data),
    .c_full   (sw_full),
    .smp_valid, .smp_ready, .smp_in, .smp_out, .smp_seq
  );

  // ---- monitoring functions ----
  val_t            mon_value;
  logic [N_FN-1:0] fn_hit, fn_alter, fn_report;
  val_t            fn_alt_value [N_FN];

  assign mon_value = val_t'(smp_out.data[VAL_W-1:0]);

  for (genvar g = 0; g < N_FN; g++) begin : g_fn
    if (FN_CFG[g].kind == FN_VALUE_RANGE) begin : g_range
      mmw_value_range #(
        .LOW(FN_CFG[g].p1), .HIGH(FN_CFG[g].p2),
        .ALTER(FN_CFG[g].alter), .DFLT(FN_CFG[g].dflt), .REPORT(FN_CFG[g].report)
      ) u_fn (
        .value(mon_value), .hit(fn_hit[g]), .alter(fn_alter[g]),
        .alt_value(fn_alt_value[g]), .report(fn_report[g])
      );
    end else if (FN_CFG[g].kind == FN_THRESHOLD) begin : g_thresh
      mmw_threshold #(
        .THRESH(FN_CFG[g].p1),
        .ALTER(FN_CFG[g].alter), .DFLT(FN_CFG[g].dflt), .REPORT(FN_CFG[g].report)
      ) u_fn (
        .value(mon_value), .hit(fn_hit[g]), .alter(fn_alter[g]),
        .alt_value(fn_alt_value[g]), .report(fn_report[g])
      );
    end else begin : g_empty
      assign fn_hit[g]       = 1'b0;
      assign fn_alter[g]     = 1'b0;
      assign fn_alt_value[g] = '0;
      assign fn_report[g]    = 1'b0;
    end
  end

  // ---- reactor ----
  logic      o_write, o_full;
  fsl_word_t o_data;

  mmw_reactor #(
    .N_FN(N_FN), .PRIO_FN(PRIO_FN), .SEND_IN(SEND_IN && MON_IN), .SEND_OUT(SEND_OUT)
  ) u_reactor (
    .clk, .rst,
    .smp_valid, .smp_ready, .smp_in, .smp_out, .smp_seq,
    .fn_hit, .fn_alter, .fn_alt_value, .fn_report,
    .corr_exists (comm_s_exists),
    .corr_data   (comm_s_data),
    .corr_read   (comm_s_read),
    .o_write, .o_data, .o_full,
    .msg_write   (comm_m_write),
    .msg_data    (comm_m_data),
    .msg_full    (comm_m_full),
    .ev_alter, .ev_corr, .ev_report
  );

  // ---- output stage ----
  if (!FORK_OUT) begin : g_inline
    logic      os_exists;
    fsl_word_t os_data;

    assign sw_write    = core_m_write;
    assign core_m_full = sw_full;

    fsl_fifo #(.DEPTH(OUT_DEPTH)) u_out_stage (
      .clk, .s_clk (clk), .rst,
      .m_write  (o_write),
      .m_data   (o_data),
      .m_full   (o_full),
      .s_read   (m_write),
      .s_data   (os_data),
      .s_exists (os_exists)
    );

    assign m_write = os_exists && !m_full;
    assign m_data  = os_data;
  end else begin : g_fork
    // the core's word leaves at once; the reactor's copy is discarded
    assign core_m_full = m_full || sw_full;
    assign sw_write    = core_m_write && !m_full;
    assign m_write     = core_m_write && !core_m_full;
    assign m_data      = core_m_data;
    assign o_full      = 1'b0;
  end

endmodule
