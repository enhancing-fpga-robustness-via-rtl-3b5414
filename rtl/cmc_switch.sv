// cmc_switch: communication switch of the central monitoring core (CMC).
//
// It connects the FSL links of N_MMW monitoring module wrappers with the
// consumers inside the CMC:
//   * messages from wrapper g (monitored values and error messages) are
//     taken one per cycle, round robin among the wrappers that have a word
//     and whose destinations can take it, and are delivered
//       - to the processor link of wrapper g if MB_BIND[g] (all messages),
//       - to the central tendency function if TEND_BIND[g] (output values),
//       - to the log memory, as that function's LOG mode says (every value it
//         receives, or only the value on which it fires);
//     an error message also sets wrapper g's bit in err_seen.
//   * corrections written by the processor for wrapper g are passed on to
//     wrapper g's correction link without blocking: the processor link is
//     always read, and a correction that finds the wrapper link full is
//     dropped and counted in drops.
// A full processor link holds back only the wrapper bound to it.
//
// Timing: combinational routing; a message is read from its wrapper link in
// the cycle it is delivered. The framework describes the switch's role, the
// per-wrapper choice of what goes where and the non-blocking corrections;
// round robin, the routing table as parameter masks and dropping are this
// design's choices. err_seen and drops are cleared only by reset.
module cmc_switch
  import mon_pkg::*;
#(
  parameter int unsigned      N_MMW     = 3,
  parameter logic [N_MMW-1:0] MB_BIND   = '1,
  parameter logic [N_MMW-1:0] TEND_BIND = '1,
  parameter log_mode_e        TEND_LOG  = LOG_ALL
) (
  input  logic       clk,
  input  logic       rst,
  // links from the wrappers (slave side)
  input  logic       mmw_s_exists [N_MMW],
  input  fsl_word_t  mmw_s_data   [N_MMW],
  output logic       mmw_s_read   [N_MMW],
  // correction links to the wrappers (master side)
  output logic       mmw_m_write  [N_MMW],
  output fsl_word_t  mmw_m_data   [N_MMW],
  input  logic       mmw_m_full   [N_MMW],
  // links to the processor (master side)
  output logic       mb_m_write   [N_MMW],
  output fsl_word_t  mb_m_data    [N_MMW],
  input  logic       mb_m_full    [N_MMW],
  // correction links from the processor (slave side)
  input  logic       mb_s_exists  [N_MMW],
  input  fsl_word_t  mb_s_data    [N_MMW],
  output logic       mb_s_read    [N_MMW],
  // central tendency function
  output logic                       cf_valid,
  output logic [$clog2(N_MMW+1)-1:0] cf_src,
  output val_t                       cf_value,
  input  logic                       cf_event,
  // log memory write port
  output logic       log_wr,
  output log_entry_t log_entry,
  // status
  output logic [N_MMW-1:0] err_seen,
  output logic [15:0]      drops
);

  localparam int unsigned SW = $clog2(N_MMW + 1);

  logic [N_MMW-1:0] eligible;
  logic [SW-1:0]    rr, grant;
  logic             any;
  mon_msg_t         msg;

  // A wrapper may send when it has a word and its processor link has room.
  always_comb begin
    for (int i = 0; i < N_MMW; i++)
      eligible[i] = mmw_s_exists[i] && !(MB_BIND[i] && mb_m_full[i]);
  end

  // Round robin: first eligible wrapper at or after rr.
  always_comb begin
    int unsigned k;
    any   = 1'b0;
    grant = '0;
    for (int j = 0; j < N_MMW; j++) begin
      k = (32'(rr) + 32'(j)) % N_MMW;
      if (!any && eligible[k]) begin
        any   = 1'b1;
        grant = SW'(k);
      end
    end
  end

  always_comb begin
    msg = '0;
    for (int i = 0; i < N_MMW; i++)
      if (32'(grant) == i) msg = mon_msg_t'(mmw_s_data[i].data);
  end

  always_comb begin
    for (int i = 0; i < N_MMW; i++) begin
      mmw_s_read[i] = any && (32'(grant) == i);
      mb_m_write[i] = any && (32'(grant) == i) && MB_BIND[i];
      mb_m_data[i]  = mmw_s_data[i];
    end
  end

  logic grant_tend;
  always_comb begin
    grant_tend = 1'b0;
    for (int i = 0; i < N_MMW; i++)
      if (32'(grant) == i) grant_tend = TEND_BIND[i];
  end

  assign cf_valid  = any && grant_tend && (msg.kind == MSG_OUT);
  assign cf_src    = grant;
  assign cf_value  = msg.value;
  assign log_wr    = cf_valid && ((TEND_LOG == LOG_ALL) || (TEND_LOG == LOG_EVENT && cf_event));
  assign log_entry = '{mmw: 4'(grant), msg: msg};

  // Corrections: processor -> wrapper, never blocking the processor.
  logic [N_MMW-1:0] dropped;
  always_comb begin
    for (int i = 0; i < N_MMW; i++) begin
      mb_s_read[i]   = mb_s_exists[i];
      mmw_m_write[i] = mb_s_exists[i] && !mmw_m_full[i];
      mmw_m_data[i]  = mb_s_data[i];
      dropped[i]     = mb_s_exists[i] && mmw_m_full[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr       <= '0;
      err_seen <= '0;
      drops    <= '0;
    end else begin
      if (any) rr <= (32'(grant) == N_MMW - 1) ? '0 : grant + 1'b1;
      for (int i = 0; i < N_MMW; i++)
        if (any && 32'(grant) == i && msg.kind == MSG_ERR) err_seen[i] <= 1'b1;
      drops <= drops + 16'($countones(dropped));
    end
  end

endmodule
