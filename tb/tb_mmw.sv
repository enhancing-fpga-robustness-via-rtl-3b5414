// tb_mmw: self-checking test of the Monitoring Module Wrapper with its
// default monitoring functions (slot 0: range -20..40, report; slot 1:
// threshold 50, replace by 50 and report; slot 1 prioritized) around a model
// core that passes each word on after one cycle.
// Checks every output word and every message to the central core against a
// model of the rules, the wrapper's added delay (two cycles from the core's
// write to the wrapper's write), a one-shot correction from the central core,
// and, under random back-pressure on all links, that nothing is lost.
// A second wrapper with FORK_OUT = 1 is checked for zero added delay (the
// word leaves in the cycle the core writes it), unaltered words in order
// under back-pressure, and error messages still sent to the central core.
// A third wrapper with MON_IN = 0 (only the output monitored) is checked for
// its output words and its messages: output values and errors, no inputs.
module tb_mmw;
  import mon_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic s_exists = 1'b0, s_read;
  fsl_word_t s_data = '0;
  logic core_s_exists, core_s_read, core_m_write, core_m_full;
  fsl_word_t core_s_data, core_m_data;
  logic m_write, m_full = 1'b0;
  fsl_word_t m_data;
  logic comm_m_write, comm_m_full = 1'b0;
  fsl_word_t comm_m_data;
  logic comm_s_exists = 1'b0, comm_s_read;
  fsl_word_t comm_s_data = '0;
  logic ev_alter, ev_corr, ev_report;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mmw dut (.*);

  // model core: one-word register, passes the word on unchanged
  logic      c_valid;
  fsl_word_t c_word;
  assign core_s_read  = core_s_exists && (!c_valid || !core_m_full);
  assign core_m_write = c_valid && !core_m_full;
  assign core_m_data  = c_word;
  always_ff @(posedge clk) begin
    if (rst) c_valid <= 1'b0;
    else if (core_s_read) begin c_valid <= 1'b1; c_word <= core_s_data; end
    else if (core_m_write) c_valid <= 1'b0;
  end

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

  logic [31:0] out_q [$];
  logic [31:0] msg_q [$];
  logic [7:0]  seq = 0;
  bit          corr_expected = 0;
  logic [31:0] corr_value;
  int unsigned t_core_wr = 0, t_out_wr = 0;

  // model: predict from each input word the wrapper reads
  always @(posedge clk) if (!rst) begin
    if (s_read && s_exists) begin
      int v;
      bit rng, thr;
      v   = $signed(s_data.data[15:0]);
      rng = (v < -20) || (v > 40);
      thr = (v >= 50);
      if (thr)                out_q.push_back(32'd50);
      else if (corr_expected) begin out_q.push_back(corr_value); corr_expected = 0; end
      else                    out_q.push_back(s_data.data);
      msg_q.push_back({4'd1, 4'd0, seq, s_data.data[15:0]});
      msg_q.push_back({4'd2, 4'd1, seq, s_data.data[15:0]});
      if (thr)      msg_q.push_back({4'd3, 4'd1, 8'({thr, rng}), s_data.data[15:0]});
      else if (rng) msg_q.push_back({4'd3, 4'd0, 8'({thr, rng}), s_data.data[15:0]});
      seq++;
    end
    if (core_m_write && !core_m_full) t_core_wr = cycle;
    if (m_write && !m_full) begin
      t_out_wr = cycle;
      check(out_q.size() != 0 && m_data.data == out_q[0],
            $sformatf("output %h expected %h", m_data.data, out_q.size() ? out_q[0] : 0));
      if (out_q.size()) void'(out_q.pop_front());
    end
    if (comm_m_write && !comm_m_full) begin
      check(msg_q.size() != 0 && comm_m_data.data == msg_q[0],
            $sformatf("message %h expected %h", comm_m_data.data, msg_q.size() ? msg_q[0] : 0));
      if (msg_q.size()) void'(msg_q.pop_front());
    end
  end

  task automatic send_one(int v);
    s_exists = 1'b1; s_data = '{ctrl: 1'b0, data: 32'(v)};
    do @(posedge clk); while (!(s_read));
    #1;
    s_exists = 1'b0;
  endtask


  // ---------------- forked-output wrapper ----------------
  logic f_s_exists = 1'b0, f_s_read;
  fsl_word_t f_s_data = '0;
  logic f_cs_exists, f_cs_read, f_cm_write, f_cm_full;
  fsl_word_t f_cs_data, f_cm_data;
  logic f_m_write, f_m_full = 1'b0;
  fsl_word_t f_m_data;
  logic f_comm_write;
  fsl_word_t f_comm_data;
  logic f_comm_read, f_alter, f_corr, f_report;
  logic      f_valid;
  fsl_word_t f_word;
  logic [31:0] f_out_q [$];
  int unsigned f_errs = 0;
  bit f_done = 0;

  mmw #(.FORK_OUT(1'b1)) fdut (
    .clk, .rst,
    .s_exists (f_s_exists), .s_data (f_s_data), .s_read (f_s_read),
    .core_s_exists (f_cs_exists), .core_s_data (f_cs_data), .core_s_read (f_cs_read),
    .core_m_write (f_cm_write), .core_m_data (f_cm_data), .core_m_full (f_cm_full),
    .m_write (f_m_write), .m_data (f_m_data), .m_full (f_m_full),
    .comm_m_write (f_comm_write), .comm_m_data (f_comm_data), .comm_m_full (1'b0),
    .comm_s_exists (1'b0), .comm_s_data ('0), .comm_s_read (f_comm_read),
    .ev_alter (f_alter), .ev_corr (f_corr), .ev_report (f_report)
  );

  assign f_cs_read  = f_cs_exists && (!f_valid || !f_cm_full);
  assign f_cm_write = f_valid && !f_cm_full;
  assign f_cm_data  = f_word;
  always_ff @(posedge clk) begin
    if (rst) f_valid <= 1'b0;
    else if (f_cs_read) begin f_valid <= 1'b1; f_word <= f_cs_data; end
    else if (f_cm_write) f_valid <= 1'b0;
  end

  always @(posedge clk) if (!rst) begin
    if (f_s_read && f_s_exists) f_out_q.push_back(f_s_data.data);
    if (f_cm_write || f_m_write) begin
      check(f_cm_write == f_m_write && f_m_data == f_cm_data, "fork: output leaves in the core's cycle");
      check(f_out_q.size() != 0 && f_m_data.data == f_out_q[0],
            $sformatf("fork: output %h expected %h", f_m_data.data, f_out_q.size() ? f_out_q[0] : 0));
      if (f_out_q.size()) void'(f_out_q.pop_front());
    end
    if (f_comm_write && f_comm_data.data[31:28] == 4'd3) f_errs++;
  end

  initial begin
    wait (!rst);
    @(posedge clk); #1;
    foreach (f_vals[k]) begin
      f_s_exists = 1'b1; f_s_data = '{ctrl: 1'b0, data: 32'(f_vals[k])};
      do @(posedge clk); while (!f_s_read);
      #1;
      f_s_exists = 1'b0;
      repeat (6) @(posedge clk); #1;
    end
    check(f_errs == 3, $sformatf("fork: %0d error messages, expected 3", f_errs));
    for (int cyc = 0; cyc < 3000; cyc++) begin
      f_s_exists = ($urandom_range(0, 99) < 70);
      f_s_data   = '{ctrl: 1'b0, data: 32'($urandom_range(0, 100) - 40)};
      f_m_full   = ($urandom_range(0, 99) < 30);
      @(posedge clk); #1;
    end
    f_s_exists = 1'b0; f_m_full = 1'b0;
    repeat (20) @(posedge clk); #1;
    check(f_out_q.size() == 0, $sformatf("fork: %0d words missing", f_out_q.size()));
    f_done = 1;
  end
  int f_vals [4] = '{23, 58, -30, 45};

  // ---------------- output-only wrapper (MON_IN = 0) ----------------
  logic o_s_exists = 1'b0, o_s_read;
  fsl_word_t o_s_data = '0;
  logic o_cs_exists, o_cs_read, o_cm_write, o_cm_full;
  fsl_word_t o_cs_data, o_cm_data;
  logic o_m_write, o_m_full = 1'b0;
  fsl_word_t o_m_data;
  logic o_comm_write, o_comm_full = 1'b0;
  fsl_word_t o_comm_data;
  logic o_comm_read, o_alter, o_corr, o_report;
  logic      o_valid;
  fsl_word_t o_word;
  logic [31:0] o_out_q [$];
  logic [31:0] o_msg_q [$];
  logic [7:0]  o_seq = 0;
  bit o_done = 0;

  mmw #(.MON_IN(1'b0)) odut (
    .clk, .rst,
    .s_exists (o_s_exists), .s_data (o_s_data), .s_read (o_s_read),
    .core_s_exists (o_cs_exists), .core_s_data (o_cs_data), .core_s_read (o_cs_read),
    .core_m_write (o_cm_write), .core_m_data (o_cm_data), .core_m_full (o_cm_full),
    .m_write (o_m_write), .m_data (o_m_data), .m_full (o_m_full),
    .comm_m_write (o_comm_write), .comm_m_data (o_comm_data), .comm_m_full (o_comm_full),
    .comm_s_exists (1'b0), .comm_s_data ('0), .comm_s_read (o_comm_read),
    .ev_alter (o_alter), .ev_corr (o_corr), .ev_report (o_report)
  );

  assign o_cs_read  = o_cs_exists && (!o_valid || !o_cm_full);
  assign o_cm_write = o_valid && !o_cm_full;
  assign o_cm_data  = o_word;
  always_ff @(posedge clk) begin
    if (rst) o_valid <= 1'b0;
    else if (o_cs_read) begin o_valid <= 1'b1; o_word <= o_cs_data; end
    else if (o_cm_write) o_valid <= 1'b0;
  end

  always @(posedge clk) if (!rst) begin
    if (o_s_read && o_s_exists) begin
      int v;
      bit rng, thr;
      v   = $signed(o_s_data.data[15:0]);
      rng = (v < -20) || (v > 40);
      thr = (v >= 50);
      o_out_q.push_back(thr ? 32'd50 : o_s_data.data);
      o_msg_q.push_back({4'd2, 4'd1, o_seq, o_s_data.data[15:0]});
      if (thr)      o_msg_q.push_back({4'd3, 4'd1, 8'({thr, rng}), o_s_data.data[15:0]});
      else if (rng) o_msg_q.push_back({4'd3, 4'd0, 8'({thr, rng}), o_s_data.data[15:0]});
      o_seq++;
    end
    if (o_m_write && !o_m_full) begin
      check(o_out_q.size() != 0 && o_m_data.data == o_out_q[0],
            $sformatf("output-only: output %h expected %h", o_m_data.data, o_out_q.size() ? o_out_q[0] : 0));
      if (o_out_q.size()) void'(o_out_q.pop_front());
    end
    if (o_comm_write && !o_comm_full) begin
      check(o_msg_q.size() != 0 && o_comm_data.data == o_msg_q[0],
            $sformatf("output-only: message %h expected %h", o_comm_data.data, o_msg_q.size() ? o_msg_q[0] : 0));
      if (o_msg_q.size()) void'(o_msg_q.pop_front());
    end
  end

  initial begin
    wait (!rst);
    @(posedge clk); #1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      o_s_exists  = ($urandom_range(0, 99) < 60);
      o_s_data    = '{ctrl: 1'b0, data: 32'($urandom_range(0, 100) - 40)};
      o_m_full    = ($urandom_range(0, 99) < 20);
      o_comm_full = ($urandom_range(0, 99) < 20);
      @(posedge clk); #1;
    end
    o_s_exists = 1'b0; o_m_full = 1'b0; o_comm_full = 1'b0;
    repeat (30) @(posedge clk); #1;
    check(o_out_q.size() == 0 && o_msg_q.size() == 0,
          $sformatf("output-only: %0d outputs %0d messages missing", o_out_q.size(), o_msg_q.size()));
    o_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    // single words: in range, range violation, threshold violation
    send_one(23);
    repeat (8) @(posedge clk); #1;
    check(t_out_wr - t_core_wr == 2, $sformatf("wrapper delay %0d", t_out_wr - t_core_wr));
    send_one(45);
    send_one(58);
    send_one(-30);
    repeat (10) @(posedge clk); #1;
    // correction from the central core replaces the next unaltered word
    comm_s_exists = 1'b1; comm_s_data = '{ctrl: 1'b0, data: 32'd21};
    @(posedge clk); #1;
    comm_s_exists = 1'b0;
    corr_expected = 1; corr_value = 32'd21;
    send_one(30);
    send_one(31);
    repeat (10) @(posedge clk); #1;
    check(out_q.size() == 0 && msg_q.size() == 0, "directed words delivered");
    // random stream with back-pressure
    for (int cyc = 0; cyc < 5000; cyc++) begin
      s_exists    = ($urandom_range(0, 99) < 60);
      s_data      = '{ctrl: 1'b0, data: 32'($urandom_range(0, 100) - 40)};
      m_full      = ($urandom_range(0, 99) < 20);
      comm_m_full = ($urandom_range(0, 99) < 20);
      @(posedge clk); #1;
    end
    s_exists = 1'b0; m_full = 1'b0; comm_m_full = 1'b0;
    repeat (30) @(posedge clk);
    check(out_q.size() == 0 && msg_q.size() == 0,
          $sformatf("%0d outputs %0d messages missing", out_q.size(), msg_q.size()));
    wait (f_done && o_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
