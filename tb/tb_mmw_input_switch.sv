// tb_mmw_input_switch: self-checking test of the wrapper's input switch.
// A model core takes input words in order and, after a random delay, writes
// the output word in+1000 for each; the sample consumer is randomly not
// ready. Every sample must pair the output with the input it came from, with
// sequence numbers counting up. A burst of inputs without outputs must fill
// the buffer after exactly PROC_TIME+3 words and then drop in_room.
module tb_mmw_input_switch;
  import mon_pkg::*;

  localparam int unsigned PROC_TIME = 2;

  logic clk = 1'b0, rst = 1'b1;
  logic in_fire = 1'b0, in_room, c_write = 1'b0, c_full;
  fsl_word_t in_data = '0, c_data = '0, smp_in, smp_out;
  logic smp_valid, smp_ready = 1'b0;
  logic [7:0] smp_seq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mmw_input_switch #(.MON_IN(1'b1), .PROC_TIME(PROC_TIME)) dut (.*);

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

  int unsigned core_q [$];   // inputs inside the model core
  int unsigned n_samples = 0;
  logic [7:0] exp_seq = 0;

  // sample checker
  always @(posedge clk) begin
    if (!rst && smp_valid && smp_ready) begin
      check(smp_out.data == smp_in.data + 1000,
            $sformatf("pair in %0d out %0d", smp_in.data, smp_out.data));
      check(smp_seq == exp_seq, $sformatf("seq %0d expected %0d", smp_seq, exp_seq));
      exp_seq <= exp_seq + 1;
      n_samples++;
    end
  end

  initial begin
    int unsigned next_in, n;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    // buffer fills after PROC_TIME+3 inputs when no output arrives
    n = 0;
    while (in_room && n < 50) begin
      in_fire = 1'b1; in_data = '{ctrl: 1'b0, data: 32'(n)};
      @(posedge clk); #1;
      core_q.push_back(n);
      n++;
    end
    in_fire = 1'b0;
    check(n == PROC_TIME + 3, $sformatf("buffer full after %0d inputs", n));
    check(!in_room, "in_room low when full");
    next_in = n;
    // random traffic
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit fire_in, fire_out, took;
      fire_in  = in_room && ($urandom_range(0, 99) < 60);
      fire_out = (core_q.size() != 0) && ($urandom_range(0, 99) < 60);
      in_fire = fire_in;  in_data = '{ctrl: 1'b0, data: 32'(next_in)};
      smp_ready = ($urandom_range(0, 99) < 70);
      c_write = fire_out;
      c_data  = '{ctrl: 1'b0, data: (core_q.size() != 0) ? 32'(core_q[0] + 1000) : 32'd0};
      #1;
      took = fire_out && !c_full;
      @(posedge clk);
      if (fire_in) begin core_q.push_back(next_in); next_in++; end
      if (took) void'(core_q.pop_front());
      #1;
    end
    in_fire = 1'b0; c_write = 1'b0;
    @(posedge clk);
    check(n_samples > 1000, $sformatf("%0d samples", n_samples));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
