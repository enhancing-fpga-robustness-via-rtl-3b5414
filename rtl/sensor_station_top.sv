// sensor_station_top: temperature sensor station with generic run-time
// monitoring, built from the monitoring framework's cores.
//
// Three thermistor sensors deliver raw resistance readings (sens_*). Each
// reading is converted to a temperature by a normalizing module that is
// wrapped by a Monitoring Module Wrapper (normalizing_module_monitored); the
// temperatures go on to the processor that shows them (temp_*). Every
// wrapper checks its temperatures against a value range (-20..40) and a
// threshold (50), replaces a value at or above the threshold by 50 and
// reports violations. All wrappers are connected by their own pair of FSL
// links to one Central Monitoring Core (CMC), which tracks the tendency of
// each temperature, keeps a log of them, forwards every wrapper's messages
// to the processor (mb_*) and relays the processor's corrections back to
// the wrappers (mbc_*). The monitoring links are separate from the data
// links, so the station's own traffic is unchanged apart from the wrappers'
// delay. Sensors, processor and display are outside this module.
//
// Each link is an FSL buffer of LINK_DEPTH words. Timing per reading:
// NORM_LATENCY cycles in the normalizing module, two in the wrapper and one
// in the output link. Reset is synchronous, active high.
module sensor_station_top
  import mon_pkg::*;
#(
  parameter int unsigned N_SENSORS    = 3,
  parameter int unsigned NORM_LATENCY = 2,
  parameter int unsigned LINK_DEPTH   = 16,
  parameter int unsigned LOG_DEPTH    = 1024
) (
  input  logic       clk,
  input  logic       rst,
  // raw readings from the sensors (slave side of their links)
  input  logic       sens_exists [N_SENSORS],
  input  fsl_word_t  sens_data   [N_SENSORS],
  output logic       sens_read   [N_SENSORS],
  // temperatures to the processor (slave side of the links)
  output logic       temp_exists [N_SENSORS],
  output fsl_word_t  temp_data   [N_SENSORS],
  input  logic       temp_read   [N_SENSORS],
  // CMC <-> processor links
  output logic       mb_exists   [N_SENSORS],
  output fsl_word_t  mb_data     [N_SENSORS],
  input  logic       mb_read     [N_SENSORS],
  input  logic       mbc_write   [N_SENSORS],
  input  fsl_word_t  mbc_data    [N_SENSORS],
  output logic       mbc_full    [N_SENSORS],
  // CMC log memory read port
  input  logic                         log_rd_en,
  input  logic [$clog2(LOG_DEPTH)-1:0] log_rd_addr,
  output log_entry_t                   log_rd_data,
  output logic [$clog2(LOG_DEPTH)-1:0] log_wr_ptr,
  output logic                         log_wrapped,
  // status
  output logic [N_SENSORS-1:0]           err_seen,
  output logic                           tend_event,
  output logic [$clog2(N_SENSORS+1)-1:0] tend_src,
  output logic                           tend_falling,
  output logic [N_SENSORS-1:0]           tend_falling_now,
  output logic [15:0]                    drops,
  output logic [N_SENSORS-1:0]           ev_alter,
  output logic [N_SENSORS-1:0]           ev_corr,
  output logic [N_SENSORS-1:0]           ev_report
);

  // wrapper -> CMC links
  logic      up_write [N_SENSORS], up_full [N_SENSORS], up_exists [N_SENSORS], up_read [N_SENSORS];
  fsl_word_t up_wdata [N_SENSORS], up_rdata [N_SENSORS];
  // CMC -> wrapper links
  logic      dn_write [N_SENSORS], dn_full [N_SENSORS], dn_exists [N_SENSORS], dn_read [N_SENSORS];
  fsl_word_t dn_wdata [N_SENSORS], dn_rdata [N_SENSORS];
  // wrapper -> processor temperature links
  logic      t_write [N_SENSORS], t_full [N_SENSORS];
  fsl_word_t t_wdata [N_SENSORS];

  for (genvar g = 0; g < N_SENSORS; g++) begin : g_sensor
    normalizing_module_monitored #(.LATENCY(NORM_LATENCY)) u_norm (
      .clk, .rst,
      .s_exists      (sens_exists[g]),
      .s_data        (sens_data[g]),
      .s_read        (sens_read[g]),
      .m_write       (t_write[g]),
      .m_data        (t_wdata[g]),
      .m_full        (t_full[g]),
      .comm_m_write  (up_write[g]),
      .comm_m_data   (up_wdata[g]),
      .comm_m_full   (up_full[g]),
      .comm_s_exists (dn_exists[g]),
      .comm_s_data   (dn_rdata[g]),
      .comm_s_read   (dn_read[g]),
      .ev_alter      (ev_alter[g]),
      .ev_corr       (ev_corr[g]),
      .ev_report     (ev_report[g])
    );

    fsl_fifo #(.DEPTH(LINK_DEPTH)) u_temp_link (
      .clk, .s_clk (clk), .rst,
      .m_write (t_write[g]), .m_data (t_wdata[g]), .m_full (t_full[g]),
      .s_read  (temp_read[g]), .s_data (temp_data[g]), .s_exists (temp_exists[g])
    );
    fsl_fifo #(.DEPTH(LINK_DEPTH)) u_up_link (
      .clk, .s_clk (clk), .rst,
      .m_write (up_write[g]), .m_data (up_wdata[g]), .m_full (up_full[g]),
      .s_read  (up_read[g]),  .s_data (up_rdata[g]), .s_exists (up_exists[g])
    );
    fsl_fifo #(.DEPTH(LINK_DEPTH)) u_down_link (
      .clk, .s_clk (clk), .rst,
      .m_write (dn_write[g]), .m_data (dn_wdata[g]), .m_full (dn_full[g]),
      .s_read  (dn_read[g]),  .s_data (dn_rdata[g]), .s_exists (dn_exists[g])
    );
  end

  cmc #(.N_MMW(N_SENSORS), .LOG_DEPTH(LOG_DEPTH), .MB_DEPTH(LINK_DEPTH)) u_cmc (
    .clk, .rst,
    .mmw_s_exists (up_exists),
    .mmw_s_data   (up_rdata),
    .mmw_s_read   (up_read),
    .mmw_m_write  (dn_write),
    .mmw_m_data   (dn_wdata),
    .mmw_m_full   (dn_full),
    .mb_exists, .mb_data, .mb_read,
    .mbc_write, .mbc_data, .mbc_full,
    .log_rd_en, .log_rd_addr, .log_rd_data, .log_wr_ptr, .log_wrapped,
    .err_seen, .tend_event, .tend_src, .tend_falling, .tend_falling_now, .drops
  );

endmodule
