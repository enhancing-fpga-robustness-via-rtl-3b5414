// tb_normalizing_module_monitored: self-checking test of the wrapped
// normalizing module. Raw resistances whose temperatures (interpolated here
// from the B-parameter thermistor curve, see tb_normalizing_module) fall
// inside the range, outside the range and above the threshold are fed in. Checks each temperature after
// the wrapper's reaction, each message to the central core, and the total
// delay from reading a raw word to writing its temperature (core LATENCY
// plus two cycles of the wrapper).
module tb_normalizing_module_monitored;
  import mon_pkg::*;

  localparam int unsigned LATENCY = 2;

  logic clk = 1'b0, rst = 1'b1;
  logic s_exists = 1'b0, s_read, m_write, m_full = 1'b0;
  fsl_word_t s_data = '0, m_data;
  logic comm_m_write, comm_m_full = 1'b0, comm_s_exists = 1'b0, comm_s_read;
  fsl_word_t comm_m_data, comm_s_data = '0;
  logic ev_alter, ev_corr, ev_report;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  normalizing_module_monitored #(.LATENCY(LATENCY)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned rpt [12];
  int unsigned kpt [11];
  initial begin
    for (int i = 0; i < 12; i++)
      rpt[i] = int'($rtoi(10000.0 * $exp(3950.0 * (1.0 / (-30.0 + 10.0 * i + 273.15) - 1.0 / 298.15)) + 0.5));
    for (int i = 0; i < 11; i++)
      kpt[i] = int'($rtoi(655360.0 / real'(rpt[i] - rpt[i+1]) + 0.5));
  end

  function automatic int temp_of(int r);
    if (r >= int'(rpt[0]))  return -30;
    if (r <= int'(rpt[11])) return 80;
    for (int i = 0; i < 11; i++)
      if (r < int'(rpt[i]) && r >= int'(rpt[i+1]))
        return -30 + 10 * i + int'((longint'(rpt[i] - r) * kpt[i]) >> 16);
    return 0;
  endfunction

  logic [31:0] out_q [$];
  logic [31:0] msg_q [$];
  logic [7:0]  seq = 0;
  int unsigned t_rd = 0, t_wr = 0;
  int n_alter = 0, n_report = 0;

  always @(posedge clk) if (!rst) begin
    if (s_read && s_exists) begin
      int t;
      bit rng, thr;
      t   = temp_of(int'(s_data.data));
      rng = (t < -20) || (t > 40);
      thr = (t >= 50);
      out_q.push_back(thr ? 32'd50 : 32'(t));
      msg_q.push_back({4'd1, 4'd0, seq, s_data.data[15:0]});
      msg_q.push_back({4'd2, 4'd1, seq, 16'(t)});
      if (thr)      msg_q.push_back({4'd3, 4'd1, 8'({thr, rng}), 16'(t)});
      else if (rng) msg_q.push_back({4'd3, 4'd0, 8'({thr, rng}), 16'(t)});
      seq++;
      t_rd = cycle;
    end
    if (m_write && !m_full) begin
      t_wr = cycle;
      check(out_q.size() != 0 && m_data.data == out_q[0],
            $sformatf("temperature %0d expected %0d", $signed(m_data.data),
                      out_q.size() ? $signed(out_q[0]) : 0));
      if (out_q.size()) void'(out_q.pop_front());
    end
    if (comm_m_write && !comm_m_full) begin
      check(msg_q.size() != 0 && comm_m_data.data == msg_q[0],
            $sformatf("message %h expected %h", comm_m_data.data, msg_q.size() ? msg_q[0] : 0));
      if (msg_q.size()) void'(msg_q.pop_front());
    end
    if (ev_alter) n_alter++;
    if (ev_report) n_report++;
  end

  task automatic send_one(int r);
    s_exists = 1'b1; s_data = '{ctrl: 1'b0, data: 32'(r)};
    do @(posedge clk); while (!s_read);
    #1;
    s_exists = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    send_one(10000);                 // 25 degC
    repeat (10) @(posedge clk); #1;
    check(t_wr - t_rd == LATENCY + 2, $sformatf("read-to-write delay %0d", t_wr - t_rd));
    send_one(6000);                  // about 37: in range
    send_one(4500);                  // about 45: range violation
    send_one(2600);                  // about 59: threshold, replaced by 50
    send_one(150000);                // about -25: range violation
    send_one(1000);                  // beyond the curve: 80, replaced by 50
    repeat (10) @(posedge clk); #1;
    check(n_alter == 2 && n_report == 4, $sformatf("alter %0d report %0d", n_alter, n_report));
    for (int i = 0; i < 400; i++) begin
      s_exists    = ($urandom_range(0, 99) < 60);
      s_data      = '{ctrl: 1'b0, data: ($urandom_range(0, 1) ? 32'($urandom_range(1500, 6000)) : 32'($urandom_range(1000, 200000)))};
      m_full      = ($urandom_range(0, 99) < 20);
      comm_m_full = ($urandom_range(0, 99) < 20);
      @(posedge clk); #1;
    end
    s_exists = 1'b0; m_full = 1'b0; comm_m_full = 1'b0;
    repeat (30) @(posedge clk);
    check(out_q.size() == 0 && msg_q.size() == 0, "all words delivered");
    check(n_report > 4 && n_alter > 2, "violations in the random run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
