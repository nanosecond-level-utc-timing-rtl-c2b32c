// utc_clock: the card's UTC time register.
//
// Holds the UTC second and a count of 25 ns ticks of the clean 40 MHz clock
// within that second. The second is loaded from the UTC time message that
// arrives once per second; the tick count restarts at zero on the same edge.
// Between messages the register runs on by itself and carries into the
// seconds after TICKS_PER_SEC ticks, so a lost message costs nothing while
// the clock stays locked. The value time-tags every output pulse.
//
// Interface: load/load_sec from the message receiver; sec/tick registered;
// sec_start is high during tick 0 of each second.
// Timing: on the edge where load is high, sec <= load_sec and tick <= 0.
// That the loaded second starts at that edge is this design's convention; the
// receiver latency is a constant the sender can take into account.
module utc_clock
  import ctrp_pkg::*;
#(
  parameter int unsigned TICKS_PER_SEC = 40_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [31:0]       load_sec,
  output logic [31:0]       sec,
  output logic [TICK_W-1:0] tick,
  output logic              sec_start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec  <= '0;
      tick <= '0;
    end else if (load) begin
      sec  <= load_sec;
      tick <= '0;
    end else if (tick == TICK_W'(TICKS_PER_SEC - 1)) begin
      sec  <= sec + 1'b1;
      tick <= '0;
    end else begin
      tick <= tick + 1'b1;
    end
  end

  assign sec_start = (tick == '0);

endmodule
