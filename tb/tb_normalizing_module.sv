// tb_normalizing_module: self-checking test of the resistance-to-temperature
// converter. The thermistor curve is rebuilt here from the B-parameter
// equation R(T) = 10000 * exp(3950 * (1/(T+273.15) - 1/298.15)) with real
// arithmetic, and the expected result of every raw reading is interpolated
// from it; it must also lie within 2 degC of the exact curve. Checks the
// processing time (LATENCY cycles from the
// read to the output write with a free output link), the order and value of
// every result under random back-pressure, and both ends of the curve.
module tb_normalizing_module;
  import mon_pkg::*;

  localparam int unsigned LATENCY = 2;

  logic clk = 1'b0, rst = 1'b1;
  logic s_exists = 1'b0, s_read, m_write, m_full = 1'b0;
  fsl_word_t s_data = '0, m_data;
  int checks = 0, failures = 0;
  longint expq [$];
  int unsigned cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  normalizing_module #(.LATENCY(LATENCY)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned rpt [12];
  int unsigned kpt [11];
  initial begin
    for (int i = 0; i < 12; i++)
      rpt[i] = int'($rtoi(10000.0 * $exp(3950.0 * (1.0 / (-30.0 + 10.0 * i + 273.15) - 1.0 / 298.15)) + 0.5));
    for (int i = 0; i < 11; i++)
      kpt[i] = int'($rtoi(655360.0 / real'(rpt[i] - rpt[i+1]) + 0.5));
  end

  function automatic longint expect_t(longint r);
    if (r >= rpt[0])  return -30;
    if (r <= rpt[11]) return 80;
    for (int i = 0; i < 11; i++)
      if (r < rpt[i] && r >= rpt[i+1])
        return -30 + 10 * i + (((rpt[i] - r) * kpt[i]) >> 16);
    return 0;
  endfunction

  function automatic real exact_t(longint r);
    return 1.0 / ($ln(real'(r) / 10000.0) / 3950.0 + 1.0 / 298.15) - 273.15;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (!rst && m_write) begin
      check(expq.size() != 0, "output without input");
      if (expq.size() != 0) begin
        longint e;
        e = expq.pop_front();
        check($signed(m_data.data) == e,
              $sformatf("temperature %0d expected %0d", $signed(m_data.data), e));
      end
    end
  end

  initial begin
    int unsigned t_read, t_out;
    longint r;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // latency with a free output link
    s_exists <= 1'b1; s_data <= '{ctrl: 1'b0, data: 32'd10000};
    expq.push_back(expect_t(10000));
    @(posedge clk); #1;
    s_exists <= 1'b0;
    t_read = cycle;
    while (!m_write) begin @(posedge clk); #1; end
    t_out = cycle;
    // the write takes effect at the edge after m_write rises: read edge + LATENCY
    check(t_out - t_read + 1 == LATENCY, $sformatf("latency %0d", t_out - t_read + 1));
    check($signed(m_data.data) == 25, "10 kohm is 25 degC");
    for (longint r = 1300; r < 200000; r += 97) begin
      real d;
      d = real'(expect_t(r)) - exact_t(r);
      check(d < 2.0 && d > -2.0, $sformatf("curve error %f at %0d ohm", d, r));
    end
    @(posedge clk); #1;
    // random stream with back-pressure, including saturating readings
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: r = 0;
        1: r = 32'hFFFF_FFFF;
        2: r = 3588;
        3: r = 2700;
        default: r = $urandom_range(1000, 250000);
      endcase
      s_exists <= 1'b1; s_data <= '{ctrl: 1'b0, data: 32'(r)};
      m_full   <= ($urandom_range(0, 99) < 30);
      @(posedge clk);
      if (s_read) begin
        expq.push_back(expect_t(r));
        s_exists <= 1'b0;
      end else i--;
      #1;
    end
    s_exists <= 1'b0;
    m_full   <= 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d results missing", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
