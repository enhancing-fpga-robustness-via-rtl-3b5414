// cmc_tendency: central monitoring function that watches the tendency of a
// monitored value and signals when it turns, e.g. a temperature that starts
// to fall after a period of rising.
//
// It keeps, for each of N_SRC monitored sources, the last value, the current
// direction (rising or falling) and how many steps in a row went that way.
// A new value equal to the last one changes nothing. A step against the
// current direction after at least MIN_RUN steps with it is a change of
// tendency: event rises for that cycle with the source and the new direction
// (ev_falling = 1: now falling). A step against a shorter run only starts a
// new run. The first value of a source only sets its reference.
//
// Timing: the verdict is combinational on the offered value (in_valid), the
// state is updated on the clock edge, so one value per cycle is judged.
// dir_falling shows each source's current direction. Reset (synchronous,
// active high) forgets all history. The run length MIN_RUN and the rule for
// equal values are this design's choices: the framework names the function
// and its purpose only.
module cmc_tendency
  import mon_pkg::*;
#(
  parameter int unsigned N_SRC   = 3,
  parameter int unsigned MIN_RUN = 3
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [$clog2(N_SRC+1)-1:0] in_src,
  input  val_t                     in_value,
  output logic                     event_o,
  output logic                     ev_falling,
  output logic [N_SRC-1:0]         dir_falling
);

  localparam int unsigned RW = $clog2(MIN_RUN + 1) + 1;

  val_t           last    [N_SRC];
  logic [N_SRC-1:0] have_last, have_dir, falling;
  logic [RW-1:0]  run     [N_SRC];

  logic    up, down, same_dir, sel_ok;
  logic [RW-1:0] cur_run;
  val_t    cur_last;
  logic    cur_have_last, cur_have_dir, cur_falling;

  assign sel_ok = in_valid && (32'(in_src) < N_SRC);

  always_comb begin
    cur_last = '0; cur_have_last = 1'b0; cur_have_dir = 1'b0; cur_falling = 1'b0; cur_run = '0;
    for (int i = 0; i < N_SRC; i++)
      if (32'(in_src) == i) begin
        cur_last      = last[i];
        cur_have_last = have_last[i];
        cur_have_dir  = have_dir[i];
        cur_falling   = falling[i];
        cur_run       = run[i];
      end
    up       = cur_have_last && (in_value > cur_last);
    down     = cur_have_last && (in_value < cur_last);
    same_dir = cur_have_dir && (down == cur_falling);
  end

  assign event_o     = sel_ok && (up || down) && cur_have_dir && !same_dir &&
                       (32'(cur_run) >= MIN_RUN);
  assign ev_falling  = down;
  assign dir_falling = falling;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_last <= '0;
      have_dir  <= '0;
      falling   <= '0;
      for (int i = 0; i < N_SRC; i++) begin
        last[i] <= '0;
        run[i]  <= '0;
      end
    end else if (sel_ok) begin
      for (int i = 0; i < N_SRC; i++)
        if (32'(in_src) == i) begin
          last[i]      <= in_value;
          have_last[i] <= 1'b1;
          if (up || down) begin
            have_dir[i] <= 1'b1;
            falling[i]  <= down;
            if (same_dir) run[i] <= (32'(run[i]) >= MIN_RUN) ? run[i] : run[i] + 1'b1;
            else          run[i] <= RW'(1);
          end
        end
    end
  end

endmodule
