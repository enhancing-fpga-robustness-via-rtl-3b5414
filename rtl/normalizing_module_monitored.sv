// normalizing_module_monitored: the normalizing module replaced by a wrapped
// instance of itself, as the framework's design flow does when a core is
// selected for monitoring.
//
// The core keeps its original FSL ports towards its environment (s_*: raw
// resistance in, m_*: temperature out); two links to the central monitoring
// core are added (comm_m_*: monitored values and error messages out,
// comm_s_*: corrections in). Inside, a Monitoring Module Wrapper observes the
// core's input, routes its temperature output through the monitoring
// functions and reacts on them. The wrapper's input switch is told the
// core's processing time, LATENCY. Default monitoring functions are the
// example configuration (value range -20..40, threshold 50).
//
// Timing: LATENCY cycles in the core plus two in the wrapper from reading a
// raw word to offering the temperature. Reset is synchronous, active high.
module normalizing_module_monitored
  import mon_pkg::*;
#(
  parameter int unsigned        LATENCY  = 2,
  parameter int unsigned        N_FN     = 2,
  parameter fn_cfg_t [N_FN-1:0] FN_CFG   = {fn_thresh(16'sd50, 1'b1, 16'sd50, 1'b1),
                                            fn_range(-16'sd20, 16'sd40, 1'b0, 16'sd0, 1'b1)},
  parameter int unsigned        PRIO_FN  = 1,
  parameter bit                 SEND_IN  = 1'b1,
  parameter bit                 SEND_OUT = 1'b1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      s_exists,
  input  fsl_word_t s_data,
  output logic      s_read,
  output logic      m_write,
  output fsl_word_t m_data,
  input  logic      m_full,
  output logic      comm_m_write,
  output fsl_word_t comm_m_data,
  input  logic      comm_m_full,
  input  logic      comm_s_exists,
  input  fsl_word_t comm_s_data,
  output logic      comm_s_read,
  output logic      ev_alter,
  output logic      ev_corr,
  output logic      ev_report
);

  logic      core_s_exists, core_s_read, core_m_write, core_m_full;
  fsl_word_t core_s_data, core_m_data;

  normalizing_module #(.LATENCY(LATENCY)) u_core (
    .clk, .rst,
    .s_exists (core_s_exists),
    .s_data   (core_s_data),
    .s_read   (core_s_read),
    .m_write  (core_m_write),
    .m_data   (core_m_data),
    .m_full   (core_m_full)
  );

  mmw #(
    .MON_IN(1'b1), .PROC_TIME(LATENCY), .N_FN(N_FN), .FN_CFG(FN_CFG),
    .PRIO_FN(PRIO_FN), .SEND_IN(SEND_IN), .SEND_OUT(SEND_OUT)
  ) u_mmw (
    .clk, .rst,
    .s_exists, .s_data, .s_read,
    .core_s_exists, .core_s_data, .core_s_read,
    .core_m_write, .core_m_data, .core_m_full,
    .m_write, .m_data, .m_full,
    .comm_m_write, .comm_m_data, .comm_m_full,
    .comm_s_exists, .comm_s_data, .comm_s_read,
    .ev_alter, .ev_corr, .ev_report
  );

endmodule
