// tb_cmc_tendency: self-checking test of the central tendency function.
// Directed: a source rising three steps and then falling gives one event
// (now falling); rising only two steps before falling gives none; equal
// values change nothing. Random: three interleaved random walks checked
// cycle by cycle against a model kept here (per source: last value,
// direction, length of the current run; event on a turn after at least
// MIN_RUN steps).
module tb_cmc_tendency;
  import mon_pkg::*;

  localparam int unsigned N_SRC = 3, MIN_RUN = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic [1:0] in_src = '0;
  val_t in_value = '0;
  logic event_o, ev_falling;
  logic [N_SRC-1:0] dir_falling;
  int checks = 0, failures = 0;
  int n_events = 0;

  always #5 clk = ~clk;

  cmc_tendency #(.N_SRC(N_SRC), .MIN_RUN(MIN_RUN)) dut (.*);

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

  // model
  int  m_last [N_SRC];
  bit  m_have [N_SRC], m_hdir [N_SRC], m_fall [N_SRC];
  int  m_run  [N_SRC];

  task automatic offer(int src, int v, output bit ev);
    bit exp_ev, up, dn;
    in_valid = 1'b1; in_src = 2'(src); in_value = val_t'(v);
    #1;
    up = m_have[src] && v > m_last[src];
    dn = m_have[src] && v < m_last[src];
    exp_ev = (up || dn) && m_hdir[src] && (dn != m_fall[src]) && m_run[src] >= MIN_RUN;
    check(event_o == exp_ev, $sformatf("src %0d value %0d event %b expected %b", src, v, event_o, exp_ev));
    if (exp_ev) check(ev_falling == dn, "event direction");
    ev = event_o;
    if (event_o) n_events++;
    @(posedge clk); #1;
    in_valid = 1'b0;
    if (up || dn) begin
      if (m_hdir[src] && dn == m_fall[src]) m_run[src]++;
      else m_run[src] = 1;
      m_hdir[src] = 1; m_fall[src] = dn;
    end
    m_last[src] = v; m_have[src] = 1;
    check(dir_falling[src] == m_fall[src], "direction status");
  endtask

  initial begin
    bit ev;
    int seqa [6] = '{10, 11, 12, 13, 13, 12};
    int seqb [4] = '{20, 21, 22, 21};
    foreach (m_have[i]) begin m_have[i] = 0; m_hdir[i] = 0; m_fall[i] = 0; m_run[i] = 0; m_last[i] = 0; end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    foreach (seqa[i]) begin
      offer(0, seqa[i], ev);
      check(ev == (i == 5), $sformatf("directed turn at step %0d", i));
    end
    foreach (seqb[i]) begin
      offer(1, seqb[i], ev);
      check(!ev, "short run gives no event");
    end
    for (int k = 0; k < 3000; k++) begin
      int s, v;
      s = $urandom_range(0, N_SRC - 1);
      v = m_last[s] + $urandom_range(0, 4) - 2;
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
      end
      offer(s, v, ev);
    end
    check(n_events > 10, $sformatf("%0d events", n_events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
