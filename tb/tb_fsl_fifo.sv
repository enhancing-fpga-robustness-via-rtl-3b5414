// tb_fsl_fifo: self-checking test of the FSL link buffer.
// Single-clock link: fills it to its depth (checks full and that the word
// count is exactly DEPTH), drains it in order, then runs random simultaneous
// writes and reads against a queue model, checking every word read and the
// exists/full flags each cycle.
// Two-clock link (ASYNC = 1, 8 words, master clock 10 ns, slave clock 7 ns):
// checks full after exactly 8 writes with no reads, then streams 3000 words
// with random pauses on both sides and checks order and completeness.
module tb_fsl_fifo;
  import mon_pkg::*;

  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst = 1'b1;
  logic m_write = 1'b0, m_full, s_read = 1'b0, s_exists;
  fsl_word_t m_data = '0, s_data;
  int checks = 0, failures = 0;
  fsl_word_t model [$];

  logic s_clk = 1'b0;
  always #5 clk = ~clk;
  always #3.5 s_clk = ~s_clk;

  fsl_fifo #(.DEPTH(DEPTH)) dut (.*);

  // two-clock link
  logic a_write = 1'b0, a_full, a_read = 1'b0, a_exists;
  fsl_word_t a_wdata = '0, a_rdata;
  fsl_fifo #(.DEPTH(8), .ASYNC(1'b1)) dut_async (
    .clk, .s_clk, .rst,
    .m_write (a_write), .m_data (a_wdata), .m_full (a_full),
    .s_read  (a_read),  .s_data (a_rdata), .s_exists (a_exists)
  );
  int unsigned a_sent = 0, a_got = 0;
  bit a_stream = 0;

  // slave side of the two-clock link, in its own clock domain
  always @(posedge s_clk) begin
    if (a_stream && a_read && a_exists) begin
      check(a_rdata.data == a_got, $sformatf("async word %0d got %0d", a_got, a_rdata.data));
      a_got++;
    end
    #1;
    a_read = a_stream && a_exists && ($urandom_range(0, 99) < 60);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(!s_exists && !m_full, "empty after reset");
    // fill
    n = 0;
    while (!m_full && n < 100) begin
      m_write <= 1'b1;
      m_data  <= '{ctrl: n[0], data: 32'hA000_0000 + n};
      @(posedge clk);
      n++;
      m_write <= 1'b0;
      #1;
    end
    check(n == DEPTH, $sformatf("full after %0d words", n));
    check(s_exists, "exists when full");
    // drain
    for (int i = 0; i < DEPTH; i++) begin
      check(s_exists && s_data.data == 32'hA000_0000 + i && s_data.ctrl == i[0],
            $sformatf("drain word %0d got %h", i, s_data.data));
      s_read <= s_exists;
      @(posedge clk);
      s_read <= 1'b0;
      #1;
    end
    check(!s_exists, "empty after drain");
    // random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit w, r;
      fsl_word_t d;
      w = ($urandom_range(0, 99) < 55) && !m_full;
      r = ($urandom_range(0, 99) < 50) && s_exists;
      d = '{ctrl: 1'($urandom), data: $urandom};
      check(s_exists == (model.size() != 0), "exists matches model");
      check(m_full == (model.size() == DEPTH), "full matches model");
      if (r) check(s_data == model[0], $sformatf("random read %h vs %h", s_data.data, model[0].data));
      m_write <= w; m_data <= d; s_read <= r;
      @(posedge clk);
      if (r) void'(model.pop_front());
      if (w) model.push_back(d);
      m_write <= 1'b0; s_read <= 1'b0;
      #1;
    end
    // ---- two-clock link ----
    n = 0;
    while (!a_full && n < 100) begin
      a_write = 1'b1; a_wdata = '{ctrl: 1'b0, data: 32'(n)};
      @(posedge clk); #1;
      n++;
      a_write = 1'b0;
      repeat (4) @(posedge clk);
      #1;
    end
    check(n == 8, $sformatf("async link full after %0d words", n));
    a_stream = 1;               // reader starts; words 0..7 come first
    a_sent = n;
    while (a_sent < 3000) begin
      a_write = !a_full && ($urandom_range(0, 99) < 60);
      a_wdata = '{ctrl: 1'b0, data: a_sent};
      @(posedge clk);
      if (a_write) a_sent++;
      #1;
      a_write = 1'b0;
    end
    repeat (40) @(posedge clk);
    check(a_got == 3000, $sformatf("async link delivered %0d of 3000 words", a_got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
