// mmw_value_range: MMW monitoring function that checks whether a monitored
// value lies inside a configured range [LOW, HIGH] (both ends included).
//
// It is combinational: hit rises in the same cycle as the value is offered
// when the value is below LOW or above HIGH. What happens on a hit is
// configured with the function, as the framework asks: with ALTER set the
// output is to be replaced by the predefined default value DFLT, with
// REPORT set an error message is to be sent to the central monitoring core.
// The reactor of the wrapper carries out these requests. The generics LOW
// and HIGH follow the framework's example configuration (-20 and 40, in
// degrees Celsius); ALTER, DFLT and REPORT defaults are this design's
// choice (report only, no alteration).
module mmw_value_range
  import mon_pkg::*;
#(
  parameter val_t LOW    = -16'sd20,
  parameter val_t HIGH   = 16'sd40,
  parameter bit   ALTER  = 1'b0,
  parameter val_t DFLT   = '0,
  parameter bit   REPORT = 1'b1
) (
  input  val_t value,
  output logic hit,
  output logic alter,
  output val_t alt_value,
  output logic report
);

  assign hit       = (value < LOW) || (value > HIGH);
  assign alter     = hit && ALTER;
  assign alt_value = DFLT;
  assign report    = hit && REPORT;

endmodule
