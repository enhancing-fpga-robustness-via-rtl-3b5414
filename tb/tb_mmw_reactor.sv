// tb_mmw_reactor: self-checking test of the wrapper's reactor.
// Random samples with random monitoring-function verdicts are offered while
// the output and CMC links are randomly full and corrections arrive at
// random. A reference model (written here from the rules: prioritized slot 1
// wins, then the lowest index; local alteration before a pending one-shot
// correction; messages IN, OUT, ERR in order) predicts every output word and
// every message. Also checks the rate: with free links, no errors and two
// messages per sample, one sample is taken every two cycles.
module tb_mmw_reactor;
  import mon_pkg::*;

  localparam int unsigned N_FN = 2;

  logic clk = 1'b0, rst = 1'b1;
  logic smp_valid = 1'b0, smp_ready;
  fsl_word_t smp_in = '0, smp_out = '0;
  logic [7:0] smp_seq = '0;
  logic [N_FN-1:0] fn_hit = '0, fn_alter = '0, fn_report = '0;
  val_t fn_alt_value [N_FN];
  logic corr_exists = 1'b0, corr_read;
  fsl_word_t corr_data = '0;
  logic o_write, o_full = 1'b0, msg_write, msg_full = 1'b0;
  fsl_word_t o_data, msg_data;
  logic ev_alter, ev_corr, ev_report;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mmw_reactor #(.N_FN(N_FN), .PRIO_FN(1)) dut (.*);

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

  // reference model state
  logic [31:0] out_q [$];
  logic [31:0] msg_q [$];
  bit  m_corr_pend = 0;
  logic [31:0] m_corr_word = 0;
  int n_accept = 0, n_alter = 0, n_corr = 0, n_report = 0;

  always @(posedge clk) if (!rst) begin
    // outputs leaving the reactor
    if (o_write && !o_full) begin
      check(out_q.size() != 0 && o_data.data == out_q[0],
            $sformatf("output %h expected %h", o_data.data, out_q.size() ? out_q[0] : 0));
      if (out_q.size()) void'(out_q.pop_front());
    end
    if (msg_write && !msg_full) begin
      check(msg_q.size() != 0 && msg_data.data == msg_q[0],
            $sformatf("message %h expected %h", msg_data.data, msg_q.size() ? msg_q[0] : 0));
      if (msg_q.size()) void'(msg_q.pop_front());
    end
    if (smp_valid && smp_ready) begin
      int w;
      bit alt, rep, cor;
      logic [31:0] o;
      w = fn_hit[1] ? 1 : 0;
      alt = (fn_hit != 0) && fn_alter[w];
      rep = (fn_hit != 0) && fn_report[w];
      cor = m_corr_pend && !alt;
      o = alt ? 32'(fn_alt_value[w]) : (cor ? m_corr_word : smp_out.data);
      out_q.push_back(o);
      msg_q.push_back({4'd1, 4'd0, smp_seq, smp_in.data[15:0]});
      msg_q.push_back({4'd2, 4'd1, smp_seq, smp_out.data[15:0]});
      if (rep) msg_q.push_back({4'd3, 4'(w), 8'(fn_hit), smp_out.data[15:0]});
      check(ev_alter == alt && ev_corr == cor && ev_report == rep, "event pulses");
      n_accept++; n_alter += alt; n_corr += cor; n_report += rep;
      if (cor) m_corr_pend = 0;
    end
    if (corr_exists) begin
      check(corr_read, "correction read at once");
      m_corr_pend = 1;
      m_corr_word = corr_data.data;
    end
  end

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    // rate with free links and no verdicts
    smp_valid = 1'b1;
    n0 = n_accept;
    repeat (100) begin
      smp_in.data = $urandom; smp_out.data = $urandom; smp_seq = smp_seq + 8'(smp_ready);
      @(posedge clk); #1;
    end
    check(n_accept - n0 == 50, $sformatf("%0d samples in 100 cycles", n_accept - n0));
    // random operation
    for (int cyc = 0; cyc < 6000; cyc++) begin
      smp_valid = ($urandom_range(0, 99) < 70);
      if (smp_ready || !smp_valid) begin
        smp_in.data  = $urandom;
        smp_out.data = $urandom;
        smp_seq      = 8'($urandom);
        fn_hit       = 2'($urandom);
        fn_alter     = fn_hit & 2'($urandom);
        fn_report    = fn_hit & 2'($urandom);
        fn_alt_value[0] = val_t'($urandom);
        fn_alt_value[1] = val_t'($urandom);
      end
      o_full      = ($urandom_range(0, 99) < 25);
      msg_full    = ($urandom_range(0, 99) < 25);
      corr_exists = ($urandom_range(0, 99) < 5);
      corr_data   = '{ctrl: 1'b0, data: $urandom};
      @(posedge clk); #1;
    end
    smp_valid = 1'b0; corr_exists = 1'b0; o_full = 1'b0; msg_full = 1'b0;
    repeat (10) @(posedge clk);
    check(out_q.size() == 0 && msg_q.size() == 0, "all words delivered");
    check(n_alter > 0 && n_corr > 0 && n_report > 0,
          $sformatf("alter %0d corr %0d report %0d", n_alter, n_corr, n_report));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
