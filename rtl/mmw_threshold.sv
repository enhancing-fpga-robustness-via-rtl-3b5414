// mmw_threshold: MMW monitoring function that checks whether a monitored
// value stays below a configured threshold.
//
// It is combinational: hit rises in the same cycle as the value is offered
// when the value is equal to or above THRESH. On a hit the function asks the
// reactor to replace the output by DFLT when ALTER is set, and to send an
// error message to the central monitoring core when REPORT is set. THRESH
// follows the framework's example configuration (50, in degrees Celsius).
// That a value equal to the threshold counts as a hit, and the default
// reaction (replace by the threshold itself and report), are this design's
// choices.
module mmw_threshold
  import mon_pkg::*;
#(
  parameter val_t THRESH = 16'sd50,
  parameter bit   ALTER  = 1'b1,
  parameter val_t DFLT   = 16'sd50,
  parameter bit   REPORT = 1'b1
) (
  input  val_t value,
  output logic hit,
  output logic alter,
  output val_t alt_value,
  output logic report
);

  assign hit       = (value >= THRESH);
  assign alter     = hit && ALTER;
  assign alt_value = DFLT;
  assign report    = hit && REPORT;

endmodule
