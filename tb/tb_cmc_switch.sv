// tb_cmc_switch: self-checking test of the CMC communication switch with
// three wrappers, all bound to the processor and to the tendency function,
// logging every value. Random messages wait on the wrapper links while the
// processor links are randomly full. Checks: at most one message per cycle;
// none taken from a wrapper whose processor link is full; every message of
// every wrapper reaches its processor link in order; output values (and only
// they) go to the tendency function with the right source and are logged;
// error messages set err_seen; the round robin serves every wrapper under
// load; corrections pass straight through and are counted as dropped when
// the wrapper link is full.
module tb_cmc_switch;
  import mon_pkg::*;

  localparam int unsigned N = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic      mmw_s_exists [N], mmw_s_read [N], mmw_m_write [N], mmw_m_full [N];
  fsl_word_t mmw_s_data [N], mmw_m_data [N];
  logic      mb_m_write [N], mb_m_full [N], mb_s_exists [N], mb_s_read [N];
  fsl_word_t mb_m_data [N], mb_s_data [N];
  logic      cf_valid, cf_event = 1'b0;
  logic [1:0] cf_src;
  val_t      cf_value;
  logic      log_wr;
  log_entry_t log_entry;
  logic [N-1:0] err_seen;
  logic [15:0] drops;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmc_switch #(.N_MMW(N)) dut (.*);

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

  logic [31:0] srcq [N][$];      // messages waiting on each wrapper link
  logic [31:0] sent [N][$];      // taken, expected on the processor link
  int served [N];
  bit exp_err [N];
  int exp_drops = 0;

  function automatic logic [31:0] rand_msg(int i);
    logic [3:0] kind;
    kind = 4'($urandom_range(1, 3));
    return {kind, 4'(i), 8'($urandom), 16'($urandom)};
  endfunction

  initial begin
    int nread;
    for (int i = 0; i < N; i++) begin
      served[i] = 0; exp_err[i] = 0;
      mmw_s_exists[i] = 0; mmw_s_data[i] = '0; mmw_m_full[i] = 0;
      mb_m_full[i] = 0; mb_s_exists[i] = 0; mb_s_data[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      for (int i = 0; i < N; i++) begin
        if (srcq[i].size() < 4 && $urandom_range(0, 99) < 40) srcq[i].push_back(rand_msg(i));
        mmw_s_exists[i] = srcq[i].size() != 0;
        mmw_s_data[i]   = '{ctrl: 1'b0, data: srcq[i].size() ? srcq[i][0] : 32'd0};
        mb_m_full[i]    = $urandom_range(0, 99) < 30;
        mb_s_exists[i]  = $urandom_range(0, 99) < 10;
        mb_s_data[i]    = '{ctrl: 1'b0, data: $urandom};
        mmw_m_full[i]   = $urandom_range(0, 99) < 30;
      end
      #1;
      nread = 0;
      for (int i = 0; i < N; i++) begin
        // corrections
        check(mb_s_read[i] == mb_s_exists[i], "correction link always read");
        check(mmw_m_write[i] == (mb_s_exists[i] && !mmw_m_full[i]) &&
              (!mmw_m_write[i] || mmw_m_data[i] == mb_s_data[i]), "correction passed on");
        if (mb_s_exists[i] && mmw_m_full[i]) exp_drops++;
        if (mmw_s_read[i]) begin
          mon_msg_t m;
          m = mon_msg_t'(srcq[i][0]);
          nread++;
          check(mmw_s_exists[i] && !mb_m_full[i], "read only with a word and room");
          check(mb_m_write[i] && mb_m_data[i].data == srcq[i][0], "to processor link");
          check(cf_valid == (m.kind == MSG_OUT), "tendency gets output values only");
          if (cf_valid) begin
            check(32'(cf_src) == i && cf_value == m.value, "tendency source and value");
            check(log_wr && log_entry.mmw == 4'(i) && log_entry.msg == m, "value logged");
          end
          if (m.kind == MSG_ERR) exp_err[i] = 1;
          served[i]++;
          void'(srcq[i].pop_front());
        end else
          check(!mb_m_write[i], "no processor write without a read");
      end
      check(nread <= 1, "one message per cycle");
      check(nread == 1 || !cf_valid, "no tendency input without a message");
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) check(err_seen[i] == exp_err[i], "err_seen");
      check(32'(drops) == exp_drops, $sformatf("drops %0d expected %0d", drops, exp_drops));
    end
    for (int i = 0; i < N; i++)
      check(served[i] > 500, $sformatf("wrapper %0d served %0d times", i, served[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
