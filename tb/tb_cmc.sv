// tb_cmc: self-checking test of the Central Monitoring Core with three
// wrappers. Each wrapper link offers a temperature series (output values)
// with interleaved input values and error messages. Checks that every
// message reaches its processor link in order, that a tendency event is
// raised exactly where a wrapper's series turns after three or more steps,
// that the log memory holds every output value in arrival order (read back
// through the log port), that errors set err_seen, and that a correction the
// processor writes for wrapper 2 comes out on wrapper 2's correction link.
// A second phase sends 300 random-walk values per wrapper with random
// processor pauses and checks every tendency event (source and direction)
// against a separate model of the turn rule, and the log write count.
module tb_cmc;
  import mon_pkg::*;

  localparam int unsigned N = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic      mmw_s_exists [N], mmw_s_read [N], mmw_m_write [N], mmw_m_full [N];
  fsl_word_t mmw_s_data [N], mmw_m_data [N];
  logic      mb_exists [N], mb_read [N], mbc_write [N], mbc_full [N];
  fsl_word_t mb_data [N], mbc_data [N];
  logic       log_rd_en = 1'b0, log_wrapped;
  logic [9:0] log_rd_addr = '0, log_wr_ptr;
  log_entry_t log_rd_data;
  logic [N-1:0] err_seen, tend_falling_now;
  logic tend_event, tend_falling;
  logic [1:0] tend_src;
  logic [15:0] drops;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmc #(.N_MMW(N)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] srcq [N][$];
  logic [31:0] mbq  [N][$];
  log_entry_t  logq [$];
  int events [N];
  int exp_events [N];
  bit phase2 = 0;
  bit exp_dir [N][$];
  int hist [N][$];

  // turn rule: a step against the current direction after >= 3 steps with
  // it; equal values ignored. Returns the directions (1 = now falling) of
  // the turns caused by the values from index 'from' on.
  function automatic void model_turns(int w, int from);
    int  last, run;
    bit  have_dir, fall;
    run = 0; have_dir = 0; fall = 0;
    last = hist[w][0];
    for (int k = 1; k < hist[w].size(); k++) begin
      int v;
      bit d;
      v = hist[w][k];
      if (v == last) continue;
      d = v < last;
      if (have_dir && d == fall) run++;
      else begin
        if (have_dir && run >= 3 && k >= from) exp_dir[w].push_back(d);
        run = 1;
      end
      have_dir = 1; fall = d; last = v;
    end
  endfunction

  // series per wrapper: values and expected turns
  //   0: 20 21 22 23 22 21 20 21  -> turn at 22 (after 3 up) and at 21 (after 3 down)
  //   1: 30 31 30 31 30           -> no turn (runs too short)
  //   2: 40 40 41 42 43 44 43     -> turn at 43
  int ser0 [8] = '{20, 21, 22, 23, 22, 21, 20, 21};
  int ser1 [5] = '{30, 31, 30, 31, 30};
  int ser2 [7] = '{40, 40, 41, 42, 43, 44, 43};

  task automatic add_series(int w, int vals [], int nval);
    for (int k = 0; k < nval; k++) begin
      srcq[w].push_back({4'd1, 4'd0, 8'(k), 16'(vals[k] * 100)});
      srcq[w].push_back({4'd2, 4'd1, 8'(k), 16'(vals[k])});
      hist[w].push_back(vals[k]);
      if (vals[k] > 43) srcq[w].push_back({4'd3, 4'd0, 8'b01, 16'(vals[k])});
    end
  endtask

  // processor side and status monitor
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) begin
      if (mb_exists[i] && mb_read[i]) begin
        check(mbq[i].size() != 0 && mb_data[i].data == mbq[i][0],
              $sformatf("processor link %0d got %h", i, mb_data[i].data));
        if (mbq[i].size()) void'(mbq[i].pop_front());
      end
      if (mmw_s_read[i]) begin
        mon_msg_t m;
        m = mon_msg_t'(srcq[i][0]);
        mbq[i].push_back(srcq[i][0]);
        if (m.kind == MSG_OUT) logq.push_back('{mmw: 4'(i), msg: m});
        void'(srcq[i].pop_front());
      end
    end
    if (tend_event) begin
      events[tend_src]++;
      if (phase2) begin
        check(exp_dir[tend_src].size() != 0 && tend_falling == exp_dir[tend_src][0],
              $sformatf("wrapper %0d: unexpected turn (falling=%0d)", tend_src, tend_falling));
        if (exp_dir[tend_src].size()) void'(exp_dir[tend_src].pop_front());
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      mmw_s_exists[i] = 0; mmw_s_data[i] = '0; mmw_m_full[i] = 0;
      mb_read[i] = 0; mbc_write[i] = 0; mbc_data[i] = '0; events[i] = 0;
    end
    exp_events = '{2, 0, 1};
    add_series(0, ser0, 8);
    add_series(1, ser1, 5);
    add_series(2, ser2, 7);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      for (int i = 0; i < N; i++) begin
        mmw_s_exists[i] = srcq[i].size() != 0 && ($urandom_range(0, 99) < 70);
        mmw_s_data[i]   = '{ctrl: 1'b0, data: srcq[i].size() ? srcq[i][0] : 32'd0};
        mb_read[i]      = mb_exists[i] && ($urandom_range(0, 99) < 50);
      end
      @(posedge clk); #1;
    end
    for (int i = 0; i < N; i++) begin
      mmw_s_exists[i] = 1'b0;
      mb_read[i] = 1'b0;
      check(srcq[i].size() == 0 && mbq[i].size() == 0, $sformatf("wrapper %0d drained", i));
      check(events[i] == exp_events[i], $sformatf("wrapper %0d: %0d tendency events", i, events[i]));
    end
    check(err_seen == 3'b100, $sformatf("err_seen %b", err_seen));
    check(32'(log_wr_ptr) == logq.size(), $sformatf("log holds %0d entries", log_wr_ptr));
    foreach (logq[k]) begin
      log_rd_en = 1'b1; log_rd_addr = 10'(k);
      @(posedge clk); #1;
      log_rd_en = 1'b0;
      check(log_rd_data == logq[k], $sformatf("log entry %0d: %h expected %h", k, log_rd_data, logq[k]));
    end
    // correction from the processor for wrapper 2
    mbc_write[2] = 1'b1; mbc_data[2] = '{ctrl: 1'b0, data: 32'd33};
    @(posedge clk); #1;
    mbc_write[2] = 1'b0;
    begin
      bit seen;
      seen = 0;
      repeat (5) begin
        if (mmw_m_write[2] && mmw_m_data[2].data == 32'd33) seen = 1;
        check(!mmw_m_write[0] && !mmw_m_write[1], "correction only to wrapper 2");
        @(posedge clk); #1;
      end
      check(seen, "correction reached wrapper 2");
    end
    // phase 2: random walks
    begin
      int base, n_out;
      n_out = logq.size();
      for (int i = 0; i < N; i++) begin
        int v, step, from;
        from = hist[i].size();
        v = hist[i][from - 1];
        step = 1;
        for (int k = 0; k < 300; k++) begin
          if ($urandom_range(0, 99) < 25) step = -step;
          v += ($urandom_range(0, 99) < 15) ? 0 : step;
          hist[i].push_back(v);
          if ($urandom_range(0, 99) < 30)
            srcq[i].push_back({4'd1, 4'd0, 8'(k), 16'(v * 100)});
          srcq[i].push_back({4'd2, 4'd1, 8'(k), 16'(v)});
          n_out++;
        end
        model_turns(i, from);
        events[i] = 0;
      end
      phase2 = 1;
      for (int cyc = 0; cyc < 4000; cyc++) begin
        for (int i = 0; i < N; i++) begin
          mmw_s_exists[i] = srcq[i].size() != 0 && ($urandom_range(0, 99) < 80);
          mmw_s_data[i]   = '{ctrl: 1'b0, data: srcq[i].size() ? srcq[i][0] : 32'd0};
          mb_read[i]      = mb_exists[i] && ($urandom_range(0, 99) < 60);
        end
        @(posedge clk); #1;
      end
      for (int i = 0; i < N; i++) begin
        mmw_s_exists[i] = 1'b0;
        mb_read[i] = 1'b0;
        check(srcq[i].size() == 0 && mbq[i].size() == 0, $sformatf("phase 2: wrapper %0d drained", i));
        check(exp_dir[i].size() == 0, $sformatf("phase 2: wrapper %0d missed %0d turns", i, exp_dir[i].size()));
        check(events[i] > 0, $sformatf("phase 2: wrapper %0d had turns", i));
      end
      check(32'(log_wr_ptr) == n_out % 1024, $sformatf("phase 2: log pointer %0d expected %0d", log_wr_ptr, n_out % 1024));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
