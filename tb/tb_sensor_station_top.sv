// tb_sensor_station_top: end-to-end test of the monitored temperature sensor
// station at its default size (three sensors, 16-word links, 1024-entry log).
//
// Each sensor feeds raw resistances of a slowly swinging temperature
// (sensors 1 and 2 reach 50 degC and more, above the threshold; all leave
// the -20..40 range at times). The processor side
// reads temperatures and monitoring messages with random pauses, which
// back-pressures the sensors. Expected temperatures are computed here from
// the B-parameter thermistor curve and the wrapper rules; every temperature
// is checked in order. Then, with the station idle, the processor writes a
// correction for every wrapper and the next reading of each must come out
// corrected. Finally the last log entries are read back and compared with
// the output values seen on the processor links.
// Mechanisms counted (each must occur): sensor stall, threshold alteration,
// error report, processor correction applied, tendency turn, log wrap,
// error status per wrapper.
module tb_sensor_station_top;
  import mon_pkg::*;

  localparam int unsigned N = 3;
  localparam int unsigned NREAD = 420;

  logic clk = 1'b0, rst = 1'b1;
  logic      sens_exists [N], sens_read [N];
  fsl_word_t sens_data [N];
  logic      temp_exists [N], temp_read [N];
  fsl_word_t temp_data [N];
  logic      mb_exists [N], mb_read [N], mbc_write [N], mbc_full [N];
  fsl_word_t mb_data [N], mbc_data [N];
  logic       log_rd_en = 1'b0, log_wrapped;
  logic [9:0] log_rd_addr = '0, log_wr_ptr;
  log_entry_t log_rd_data;
  logic [N-1:0] err_seen, tend_falling_now, ev_alter, ev_corr, ev_report;
  logic tend_event, tend_falling;
  logic [1:0] tend_src;
  logic [15:0] drops;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sensor_station_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- thermistor curve, rebuilt from the B-parameter equation ----
  int unsigned rpt [12];
  int unsigned kpt [11];
  function automatic int temp_of(int r);
    if (r >= int'(rpt[0]))  return -30;
    if (r <= int'(rpt[11])) return 80;
    for (int i = 0; i < 11; i++)
      if (r < int'(rpt[i]) && r >= int'(rpt[i+1]))
        return -30 + 10 * i + int'((longint'(rpt[i] - r) * kpt[i]) >> 16);
    return 0;
  endfunction
  function automatic int res_of(real t);
    return int'($rtoi(10000.0 * $exp(3950.0 * (1.0 / (t + 273.15) - 1.0 / 298.15))));
  endfunction

  // ---- bookkeeping ----
  int          rawq  [N][$];     // readings still to send
  logic [31:0] expq  [N][$];     // expected temperatures on the temperature links
  logic [31:0] outv  [N][$];     // output values seen on the processor links
  int n_stall = 0, n_alter = 0, n_report = 0, n_corr = 0, n_tend = 0;
  bit corr_phase = 0;
  logic [31:0] corr_val [N];

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) begin
      if (sens_exists[i] && !sens_read[i]) n_stall++;
      if (sens_exists[i] && sens_read[i]) begin
        int t;
        t = temp_of(int'(sens_data[i].data));
        if (t >= 50)         expq[i].push_back(32'd50);
        else if (corr_phase) expq[i].push_back(corr_val[i]);
        else                 expq[i].push_back(32'(t));
        void'(rawq[i].pop_front());
      end
      if (temp_exists[i] && temp_read[i]) begin
        check(expq[i].size() != 0 && temp_data[i].data == expq[i][0],
              $sformatf("sensor %0d temperature %0d expected %0d", i, $signed(temp_data[i].data),
                        expq[i].size() ? $signed(expq[i][0]) : 0));
        if (expq[i].size()) void'(expq[i].pop_front());
      end
      if (mb_exists[i] && mb_read[i]) begin
        mon_msg_t m;
        m = mon_msg_t'(mb_data[i].data);
        if (m.kind == MSG_OUT) outv[i].push_back(mb_data[i].data);
      end
      n_alter  += int'(ev_alter[i]);
      n_report += int'(ev_report[i]);
      n_corr   += int'(ev_corr[i]);
    end
    n_tend += int'(tend_event);
  end

  task automatic drive(int cycles);
    for (int c = 0; c < cycles; c++) begin
      for (int i = 0; i < N; i++) begin
        sens_exists[i] = rawq[i].size() != 0;
        sens_data[i]   = '{ctrl: 1'b0, data: rawq[i].size() ? 32'(rawq[i][0]) : 32'd0};
        temp_read[i]   = temp_exists[i] && ($urandom_range(0, 99) < 45);
        mb_read[i]     = mb_exists[i] && ($urandom_range(0, 99) < 80);
      end
      @(posedge clk); #1;
    end
    for (int i = 0; i < N; i++) begin
      sens_exists[i] = 1'b0; temp_read[i] = 1'b0; mb_read[i] = 1'b0;
    end
  endtask

  initial begin
    for (int i = 0; i < 12; i++)
      rpt[i] = int'($rtoi(10000.0 * $exp(3950.0 * (1.0 / (-30.0 + 10.0 * i + 273.15) - 1.0 / 298.15)) + 0.5));
    for (int i = 0; i < 11; i++)
      kpt[i] = int'($rtoi(655360.0 / real'(rpt[i] - rpt[i+1]) + 0.5));
    for (int i = 0; i < N; i++) begin
      sens_exists[i] = 0; sens_data[i] = '0; temp_read[i] = 0;
      mb_read[i] = 0; mbc_write[i] = 0; mbc_data[i] = '0;
      for (int k = 0; k < NREAD; k++) begin
        real t;
        t = 10.0 + 8.0 * i + (36.0 - 4.0 * i) * $sin(real'(k) / (9.0 + 3.0 * i));
        rawq[i].push_back(res_of(t));
      end
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    // ---- random operation ----
    drive(NREAD * 14);
    for (int i = 0; i < N; i++) begin
      check(rawq[i].size() == 0, $sformatf("sensor %0d: %0d readings not taken", i, rawq[i].size()));
      check(expq[i].size() == 0, $sformatf("sensor %0d: %0d temperatures missing", i, expq[i].size()));
    end
    // ---- corrections from the processor ----
    for (int i = 0; i < N; i++) begin
      corr_val[i] = 32'(21 + i);
      mbc_write[i] = 1'b1; mbc_data[i] = '{ctrl: 1'b0, data: corr_val[i]};
    end
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) mbc_write[i] = 1'b0;
    drive(20);
    corr_phase = 1;
    for (int i = 0; i < N; i++) rawq[i].push_back(res_of(15.0));
    drive(40);
    corr_phase = 0;
    for (int i = 0; i < N; i++) rawq[i].push_back(res_of(16.0));
    drive(40);
    for (int i = 0; i < N; i++)
      check(expq[i].size() == 0 && rawq[i].size() == 0, $sformatf("sensor %0d drained", i));
    drive(60);
    // ---- log read-back: the newest entries are the newest output values ----
    begin
      int need [N];
      int addr;
      for (int i = 0; i < N; i++) need[i] = 5;
      addr = int'(log_wr_ptr);
      for (int k = 0; k < 15; k++) begin
        addr = (addr + 1023) % 1024;
        log_rd_en = 1'b1; log_rd_addr = 10'(addr);
        @(posedge clk); #1;
        log_rd_en = 1'b0;
        if (need[log_rd_data.mmw] > 0) begin
          int w;
          w = int'(log_rd_data.mmw);
          check(outv[w].size() != 0 && log_rd_data.msg == mon_msg_t'(outv[w][outv[w].size() - 1]),
                $sformatf("log entry at %0d", addr));
          if (outv[w].size()) void'(outv[w].pop_back());
          need[w]--;
        end
      end
    end
    $display("mechanisms: stall %0d alter %0d report %0d correction %0d tendency %0d log-wrap %0d err-seen %b",
             n_stall, n_alter, n_report, n_corr, n_tend, log_wrapped, err_seen);
    check(n_stall > 0,  "sensor stall happened");
    check(n_alter > 0,  "threshold alteration happened");
    check(n_report > 0, "error report happened");
    check(n_corr == N,  $sformatf("%0d corrections applied", n_corr));
    check(n_tend > 0,   "tendency turn happened");
    check(log_wrapped,  "log wrapped");
    check(err_seen == 3'b111, "every wrapper reported an error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
