// mon_pkg: types and constants shared by the monitoring framework.
//
// Every link in the framework is a Fast Simplex Link (FSL): a one-way FIFO
// channel carrying a 32-bit data word plus one control bit. A word is moved
// by a write on the master side while the link is not full, and by a read on
// the slave side while the link holds a word.
//
// Monitored values travel from a wrapper (MMW) to the Central Monitoring
// Core (CMC) as 32-bit messages (mon_msg_t). The message layout, the 16-bit
// signed width of a monitored value and the monitoring-function descriptor
// (fn_cfg_t) are choices of this design; the framework itself only says that
// values, error messages and corrections cross these links.
package mon_pkg;

  localparam int unsigned FSL_DW = 32;   // FSL data width
  localparam int unsigned VAL_W  = 16;   // width of a monitored value

  typedef logic signed [VAL_W-1:0] val_t;

  // One FSL word: data plus the link's control bit.
  typedef struct packed {
    logic              ctrl;
    logic [FSL_DW-1:0] data;
  } fsl_word_t;

  // Message kinds on an MMW -> CMC link.
  typedef enum logic [3:0] {
    MSG_NONE = 4'd0,
    MSG_IN   = 4'd1,   // monitored input value of the wrapped core
    MSG_OUT  = 4'd2,   // monitored output value (as produced by the core)
    MSG_ERR  = 4'd3    // a monitoring function of the MMW fired
  } msg_kind_e;

  // MMW -> CMC message, carried in the data field of an FSL word.
  //   src : port index for MSG_IN/MSG_OUT, firing function index for MSG_ERR
  //   aux : sample sequence number (low 8 bits) for values,
  //         mask of all firing functions for MSG_ERR
  typedef struct packed {
    msg_kind_e  kind;
    logic [3:0] src;
    logic [7:0] aux;
    val_t       value;
  } mon_msg_t;

  // Monitoring functions held in the MMW repository.
  typedef enum logic [1:0] {
    FN_NONE        = 2'd0,
    FN_VALUE_RANGE = 2'd1,   // mmw_value_range: fires outside [p1, p2]
    FN_THRESHOLD   = 2'd2    // mmw_threshold:   fires when value >= p1
  } fn_kind_e;

  // Configuration ("generics") of one monitoring function slot in an MMW.
  typedef struct packed {
    fn_kind_e kind;
    val_t     p1;          // first generic (range low / threshold)
    val_t     p2;          // second generic (range high)
    logic     alter;       // replace the output by dflt when it fires
    val_t     dflt;        // predefined default value
    logic     report;      // send an error message to the CMC when it fires
  } fn_cfg_t;

  // Log entry of the CMC log file memory: the MMW index and the message.
  typedef struct packed {
    logic [3:0] mmw;
    mon_msg_t   msg;
  } log_entry_t;

  // When a central monitoring function stores monitored values in the log.
  typedef enum logic [1:0] {
    LOG_NONE  = 2'd0,   // never
    LOG_ALL   = 2'd1,   // every value it receives
    LOG_EVENT = 2'd2    // only the value on which it fires
  } log_mode_e;

  function automatic fn_cfg_t fn_range(val_t lo, val_t hi, logic alter, val_t dflt, logic report);
    fn_range = '{kind: FN_VALUE_RANGE, p1: lo, p2: hi, alter: alter, dflt: dflt, report: report};
  endfunction

  function automatic fn_cfg_t fn_thresh(val_t th, logic alter, val_t dflt, logic report);
    fn_thresh = '{kind: FN_THRESHOLD, p1: th, p2: '0, alter: alter, dflt: dflt, report: report};
  endfunction

endpackage
