// cmc: Central Monitoring Core, the configurable core that gathers what the
// monitoring module wrappers (MMWs) observe and judges the system as a whole.
//
// Parts (as in the framework): a communication switch (cmc_switch), the
// central monitoring functions (here the repository's tendency function,
// cmc_tendency, bound to the wrappers in TEND_BIND), a log file memory
// (cmc_log_ram) and FSL links to an optional processor, one pair per
// wrapper bound in MB_BIND: values of that wrapper go out on mb_*, and
// corrections for it come in on mbc_*. The processor itself is outside this
// core; its links are ports. The processor reads the log memory through the
// log_rd_* port.
//
// Per wrapper g the core has one incoming link (mmw_s_*[g]: values and error
// messages) and one outgoing link (mmw_m_*[g]: corrections, written without
// blocking). System status: err_seen (a wrapper reported an error),
// tend_event with tend_src/tend_falling (a tendency turned) and
// tend_falling_now (current direction per wrapper), drops (corrections lost
// on a full wrapper link).
//
// Timing: one message per cycle through the switch; processor links are
// buffered FSL links of MB_DEPTH words (one cycle from switch to mb_exists);
// log reads return data one cycle after log_rd_en. Reset is synchronous,
// active high. The set of parts follows the framework; the number of
// central functions (one), the parameters and the status outputs are this
// design's choices.
module cmc
  import mon_pkg::*;
#(
  parameter int unsigned      N_MMW        = 3,
  parameter logic [N_MMW-1:0] MB_BIND      = '1,
  parameter logic [N_MMW-1:0] TEND_BIND    = '1,
  parameter log_mode_e        TEND_LOG     = LOG_ALL,
  parameter int unsigned      TEND_MIN_RUN = 3,
  parameter int unsigned      LOG_DEPTH    = 1024,
  parameter int unsigned      MB_DEPTH     = 16
) (
  input  logic       clk,
  input  logic       rst,
  // wrapper links
  input  logic       mmw_s_exists [N_MMW],
  input  fsl_word_t  mmw_s_data   [N_MMW],
  output logic       mmw_s_read   [N_MMW],
  output logic       mmw_m_write  [N_MMW],
  output fsl_word_t  mmw_m_data   [N_MMW],
  input  logic       mmw_m_full   [N_MMW],
  // processor links: values out (slave side of the link) ...
  output logic       mb_exists    [N_MMW],
  output fsl_word_t  mb_data      [N_MMW],
  input  logic       mb_read      [N_MMW],
  // ... and corrections in (master side of the link)
  input  logic       mbc_write    [N_MMW],
  input  fsl_word_t  mbc_data     [N_MMW],
  output logic       mbc_full     [N_MMW],
  // log memory read port
  input  logic                         log_rd_en,
  input  logic [$clog2(LOG_DEPTH)-1:0] log_rd_addr,
  output log_entry_t                   log_rd_data,
  output logic [$clog2(LOG_DEPTH)-1:0] log_wr_ptr,
  output logic                         log_wrapped,
  // status
  output logic [N_MMW-1:0]             err_seen,
  output logic                         tend_event,
  output logic [$clog2(N_MMW+1)-1:0]   tend_src,
  output logic                         tend_falling,
  output logic [N_MMW-1:0]             tend_falling_now,
  output logic [15:0]                  drops
);

  localparam int unsigned SW = $clog2(N_MMW + 1);

  logic       sw_mb_write [N_MMW], sw_mb_full [N_MMW];
  fsl_word_t  sw_mb_data  [N_MMW];
  logic       sw_mbc_exists [N_MMW], sw_mbc_read [N_MMW];
  fsl_word_t  sw_mbc_data [N_MMW];

  logic          cf_valid, cf_event;
  logic [SW-1:0] cf_src;
  val_t          cf_value;
  logic          log_wr;
  log_entry_t    log_entry;

  cmc_switch #(
    .N_MMW(N_MMW), .MB_BIND(MB_BIND), .TEND_BIND(TEND_BIND), .TEND_LOG(TEND_LOG)
  ) u_switch (
    .clk, .rst,
    .mmw_s_exists, .mmw_s_data, .mmw_s_read,
    .mmw_m_write, .mmw_m_data, .mmw_m_full,
    .mb_m_write  (sw_mb_write),
    .mb_m_data   (sw_mb_data),
    .mb_m_full   (sw_mb_full),
    .mb_s_exists (sw_mbc_exists),
    .mb_s_data   (sw_mbc_data),
    .mb_s_read   (sw_mbc_read),
    .cf_valid, .cf_src, .cf_value, .cf_event,
    .log_wr, .log_entry,
    .err_seen, .drops
  );

  cmc_tendency #(.N_SRC(N_MMW), .MIN_RUN(TEND_MIN_RUN)) u_tendency (
    .clk, .rst,
    .in_valid    (cf_valid),
    .in_src      (cf_src),
    .in_value    (cf_value),
    .event_o     (cf_event),
    .ev_falling  (tend_falling),
    .dir_falling (tend_falling_now)
  );
  assign tend_event = cf_event;
  assign tend_src   = cf_src;

  cmc_log_ram #(.DEPTH(LOG_DEPTH)) u_log (
    .clk, .rst,
    .wr_en    (log_wr),
    .wr_entry (log_entry),
    .rd_en    (log_rd_en),
    .rd_addr  (log_rd_addr),
    .rd_data  (log_rd_data),
    .wr_ptr   (log_wr_ptr),
    .wrapped  (log_wrapped)
  );

  for (genvar g = 0; g < N_MMW; g++) begin : g_mb
    if (MB_BIND[g]) begin : g_bound
      fsl_fifo #(.DEPTH(MB_DEPTH)) u_to_mb (
        .clk, .s_clk (clk), .rst,
        .m_write (sw_mb_write[g]), .m_data (sw_mb_data[g]), .m_full (sw_mb_full[g]),
        .s_read  (mb_read[g]),     .s_data (mb_data[g]),    .s_exists (mb_exists[g])
      );
      fsl_fifo #(.DEPTH(MB_DEPTH)) u_from_mb (
        .clk, .s_clk (clk), .rst,
        .m_write (mbc_write[g]),   .m_data (mbc_data[g]),   .m_full (mbc_full[g]),
        .s_read  (sw_mbc_read[g]), .s_data (sw_mbc_data[g]), .s_exists (sw_mbc_exists[g])
      );
    end else begin : g_unbound
      assign sw_mb_full[g]    = 1'b0;
      assign mb_exists[g]     = 1'b0;
      assign mb_data[g]       = '0;
      assign mbc_full[g]      = 1'b1;
      assign sw_mbc_exists[g] = 1'b0;
      assign sw_mbc_data[g]   = '0;
    end
  end

endmodule
