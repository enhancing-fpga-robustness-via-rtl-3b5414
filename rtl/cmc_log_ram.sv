// cmc_log_ram: log file memory block of the central monitoring core.
//
// A circular buffer in block RAM that keeps monitored values for central
// monitoring functions (and the processor) that judge data from the past.
// Each entry holds the index of the wrapper it came from and the 32-bit
// monitoring message (36 bits, the width of one block-RAM word with parity
// bits). Writes go to consecutive addresses and wrap at DEPTH, overwriting
// the oldest entry; wr_ptr is the next address to be written and wrapped
// tells that the buffer has been filled at least once.
//
// Timing: one write per cycle; a read (rd_en with rd_addr) returns its entry
// on rd_data in the next cycle, as a block RAM does. A read of the address
// being written in the same cycle returns the old entry. Reset (synchronous,
// active high) clears the pointer, not the contents. The framework makes the
// size adjustable and places the log in block RAM; DEPTH=1024 (one 36-kbit
// block RAM) and the circular organisation are this design's choices.
module cmc_log_ram
  import mon_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  log_entry_t               wr_entry,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output log_entry_t               rd_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  output logic                     wrapped
);

  localparam int unsigned AW = $clog2(DEPTH);

  log_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_entry;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
    end else if (wr_en) begin
      wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (wr_ptr == AW'(DEPTH - 1)) wrapped <= 1'b1;
    end
  end

endmodule
