// fsl_fifo: one Fast Simplex Link (FSL) channel, a first-in first-out buffer
// of adjustable depth between one master and one slave.
//
// The master writes a word (m_write with m_data) in any cycle in which
// m_full is low; the slave sees the oldest word on s_data while s_exists is
// high and takes it with s_read. One word can be written and one read in
// every clock cycle. The buffer catches short bursts, as FSL does in the
// framework.
//
// Two forms, chosen by ASYNC:
//   ASYNC = 0  one clock (clk) for both sides, s_clk unused. Read and write
//              may happen together also when the buffer is full or empty; a
//              word becomes visible one cycle after it was written.
//   ASYNC = 1  master side on clk, slave side on s_clk, for links between
//              clock regions. Read and write pointers cross in Gray code
//              through two flip-flops each, so a written word becomes visible
//              to the slave two to three s_clk cycles later, and a freed slot
//              to the master two to three clk cycles later. DEPTH must be a
//              power of two.
//
// Interface naming follows the FSL master/slave convention. Reset (rst) is
// synchronous and active high and empties the link; in the two-clock form it
// must be held for at least two cycles of the slower clock. DEPTH=16 is the
// usual default of the FSL link and is this design's choice; the framework
// only calls the depth adjustable and says the link can join clock regions.
// Writing while full and reading while empty break the protocol and are
// caught by assertions.
module fsl_fifo
  import mon_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter bit          ASYNC = 1'b0
) (
  input  logic      clk,          // master-side clock (both sides if ASYNC = 0)
  input  logic      s_clk,        // slave-side clock when ASYNC = 1
  input  logic      rst,
  // master side
  input  logic      m_write,
  input  fsl_word_t m_data,
  output logic      m_full,
  // slave side
  input  logic      s_read,
  output fsl_word_t s_data,
  output logic      s_exists
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fsl_word_t mem [DEPTH];

  if (!ASYNC) begin : g_sync
    logic [AW-1:0]      wr_ptr, rd_ptr;
    logic [AW:0]        count;

    logic do_wr, do_rd;
    assign do_wr = m_write && !m_full;
    assign do_rd = s_read && s_exists;

    assign m_full   = (count == (AW+1)'(DEPTH));
    assign s_exists = (count != '0);
    assign s_data   = mem[rd_ptr];

    function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
      return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
    endfunction

    always_ff @(posedge clk) begin
      if (do_wr) mem[wr_ptr] <= m_data;
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        wr_ptr <= '0;
        rd_ptr <= '0;
        count  <= '0;
      end else begin
        if (do_wr) wr_ptr <= incr(wr_ptr);
        if (do_rd) rd_ptr <= incr(rd_ptr);
        case ({do_wr, do_rd})
          2'b10:   count <= count + 1'b1;
          2'b01:   count <= count - 1'b1;
          default: count <= count;
        endcase
      end
    end
  end else begin : g_async

    logic [AW:0] wbin, rbin, wgray, rgray;
    logic [AW:0] rgray_m1, rgray_m2;   // read pointer seen on the master side
    logic [AW:0] wgray_s1, wgray_s2;   // write pointer seen on the slave side
    logic do_wr, do_rd;

    assign do_wr = m_write && !m_full;
    assign do_rd = s_read && s_exists;
    assign wgray = wbin ^ (wbin >> 1);
    assign rgray = rbin ^ (rbin >> 1);
    assign m_full   = (wgray == (rgray_m2 ^ ((AW+1)'(3) << (AW - 1))));
    assign s_exists = (rgray != wgray_s2);
    assign s_data   = mem[rbin[AW-1:0]];

    always_ff @(posedge clk) begin
      if (do_wr) mem[wbin[AW-1:0]] <= m_data;
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        wbin     <= '0;
        rgray_m1 <= '0;
        rgray_m2 <= '0;
      end else begin
        if (do_wr) wbin <= wbin + 1'b1;
        rgray_m1 <= rgray;
        rgray_m2 <= rgray_m1;
      end
    end

    always_ff @(posedge s_clk) begin
      if (rst) begin
        rbin     <= '0;
        wgray_s1 <= '0;
        wgray_s2 <= '0;
      end else begin
        if (do_rd) rbin <= rbin + 1'b1;
        wgray_s1 <= wgray;
        wgray_s2 <= wgray_s1;
      end
    end

    if ((DEPTH & (DEPTH - 1)) != 0 || DEPTH < 2) begin : g_depth_check
      $error("fsl_fifo: ASYNC needs a power-of-two DEPTH of at least 2");
    end
  end

  // FSL protocol rules.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) !(m_write && m_full))
    else $error("fsl_fifo: write while full");
  if (!ASYNC) begin : g_rd_rule
    a_no_read_when_empty: assert property (@(posedge clk) disable iff (rst) !(s_read && !s_exists))
      else $error("fsl_fifo: read while empty");
  end else begin : g_rd_rule_async
    a_no_read_when_empty: assert property (@(posedge s_clk) disable iff (rst) !(s_read && !s_exists))
      else $error("fsl_fifo: read while empty");
  end

endmodule
