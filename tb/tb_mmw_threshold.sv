// tb_mmw_threshold: self-checking test of the mmw_threshold monitoring function with
// its default generics. Sweeps every value from -400 to 400 and both
// extremes of the 16-bit range and checks that it fires exactly for values
// at or above 50 (replace by 50 and report).
module tb_mmw_threshold;
  import mon_pkg::*;

  val_t value;
  logic hit, alter, report;
  val_t alt_value;
  int checks = 0, failures = 0;

  mmw_threshold dut (.*);

  task automatic try_value(int v);
    logic h;
    value = val_t'(v);
    #1;
    h = (v >= 50);
    checks++;
    if (hit !== h || alter !== h || report !== h) begin
      failures++;
      $display("FAIL: value %0d hit %b alter %b report %b", v, hit, alter, report);
    end
    if (alter) begin
      checks++;
      if (alt_value !== 16'sd50) begin
        failures++;
        $display("FAIL: default value %0d", alt_value);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -400; v <= 400; v++) try_value(v);
    try_value(-32768);
    try_value(32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
