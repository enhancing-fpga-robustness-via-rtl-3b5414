// mmw_input_switch: entry stage of a Monitoring Module Wrapper (MMW).
//
// The wrapped core's monitored output port is routed through this switch;
// a monitored input port of the core is only observed. Every input word the
// core reads is copied into a buffer and held there until the core delivers
// the output word that belongs to it; the two are then handed on together as
// one sample (input value, output value, sequence number) to the monitoring
// functions and the reactor. The core processes words in order, so the
// oldest buffered input belongs to the next output.
//
// The buffer is sized from the core's processing time, PROC_TIME, which the
// designer states when configuring the wrapper: at most PROC_TIME+1 inputs
// can be inside a core that takes one word per cycle, and two more words of
// margin are kept. If the buffer is full anyway, in_room drops and the
// wrapper stops the core from reading further input (a stall, never a loss).
// Pairing in order, the buffer margin and the stall are this design's
// choices; the framework says only that the input is buffered until the
// matching output appears, using the stated processing time.
//
// With MON_IN = 0 only the output is monitored and no buffer is built.
// Timing: combinational from core output to sample; the core's write is
// held (c_full) until the sample is taken (smp_ready).
module mmw_input_switch
  import mon_pkg::*;
#(
  parameter bit          MON_IN    = 1'b1,
  parameter int unsigned PROC_TIME = 2
) (
  input  logic      clk,
  input  logic      rst,
  // observed input port of the core: a word moves when in_fire is high
  input  logic      in_fire,
  input  fsl_word_t in_data,
  output logic      in_room,      // the core may read another input word
  // monitored output port of the core (the core is the FSL master)
  input  logic      c_write,
  input  fsl_word_t c_data,
  output logic      c_full,
  // paired sample towards the monitoring functions and the reactor
  output logic      smp_valid,
  input  logic      smp_ready,
  output fsl_word_t smp_in,
  output fsl_word_t smp_out,
  output logic [7:0] smp_seq
);

  localparam int unsigned BUF_DEPTH = PROC_TIME + 3;

  logic       have_in;
  logic       take;
  logic [7:0] seq;

  if (MON_IN) begin : g_buf
    logic buf_full;
    fsl_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk      (clk),
      .s_clk    (clk),
      .rst      (rst),
      .m_write  (in_fire),
      .m_data   (in_data),
      .m_full   (buf_full),
      .s_read   (take),
      .s_data   (smp_in),
      .s_exists (have_in)
    );
    assign in_room = !buf_full;
  end else begin : g_nobuf
    assign have_in = 1'b1;
    assign smp_in  = '0;
    assign in_room = 1'b1;
  end

  assign smp_valid = c_write && have_in;
  assign smp_out   = c_data;
  assign smp_seq   = seq;
  assign take      = smp_valid && smp_ready;
  assign c_full    = !(smp_ready && have_in);

  always_ff @(posedge clk) begin
    if (rst)       seq <= '0;
    else if (take) seq <= seq + 1'b1;
  end

endmodule
