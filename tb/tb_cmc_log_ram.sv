// tb_cmc_log_ram: self-checking test of the log file memory.
// Writes DEPTH+5 entries (checking the write pointer, the wrap flag after
// exactly DEPTH writes and the overwrite of the oldest entries), reads every
// address back with its one-cycle read latency, and checks that reset clears
// the pointer.
module tb_cmc_log_ram;
  import mon_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0, wrapped;
  log_entry_t wr_entry = '0, rd_data;
  logic [5:0] rd_addr = '0, wr_ptr;
  int checks = 0, failures = 0;
  log_entry_t model [DEPTH];

  always #5 clk = ~clk;

  cmc_log_ram #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check(wr_ptr == 0 && !wrapped, "empty after reset");
    for (int i = 0; i < DEPTH + 5; i++) begin
      log_entry_t e;
      e = '{mmw: 4'(i % 3), msg: mon_msg_t'($urandom)};
      wr_en = 1'b1; wr_entry = e;
      @(posedge clk); #1;
      model[i % DEPTH] = e;
      check(32'(wr_ptr) == (i + 1) % DEPTH, $sformatf("write pointer %0d after %0d writes", wr_ptr, i + 1));
      check(wrapped == (i + 1 >= DEPTH), $sformatf("wrap flag after %0d writes", i + 1));
    end
    wr_en = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1'b1; rd_addr = 6'(a);
      @(posedge clk); #1;
      rd_en = 1'b0;
      check(rd_data == model[a], $sformatf("entry %0d: %h expected %h", a, rd_data, model[a]));
    end
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    check(wr_ptr == 0 && !wrapped, "pointer cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
