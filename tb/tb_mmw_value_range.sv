// tb_mmw_value_range: self-checking test of the mmw_value_range monitoring function with
// its default generics. Sweeps every value from -400 to 400 and both
// extremes of the 16-bit range and checks that it fires exactly for values
// outside -20..40 (report only, no alteration).
module tb_mmw_value_range;
  import mon_pkg::*;

  val_t value;
  logic hit, alter, report;
  val_t alt_value;
  int checks = 0, failures = 0;

  mmw_value_range dut (.*);

  task automatic try_value(int v);
    logic h;
    value = val_t'(v);
    #1;
    h = (v < -20) || (v > 40);
    checks++;
    if (hit !== h || alter !== 1'b0 || report !== h) begin
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
