// counter_channel: one configurable output counter of the timing receiver.
//
// An action from the table loads the counter with a configuration and arms
// it. The start mode chooses what starts the count: the load itself, an edge
// on one of the front-panel start inputs, or the moment the previous counter
// fires (counters can be chained). The clock mode chooses what is counted:
// cycles of the clean 40 MHz, which is locked to UTC, or edges of one of the
// front-panel clocks. When `delay` ticks have been counted the counter fires:
// it drives a PULSE_W-cycle pulse on the front panel if out_fp is set, an
// interrupt strobe if out_irq is set, and records the UTC time of the firing.
// These modes follow the CTRP counter configuration; the delay field, the
// fixed pulse width and the restart-on-reload rule are this design's choices.
//
// Interface: start_pulse, clk_tick and prev_fire are one-cycle strobes in the
// 40 MHz domain (external signals are synchronised and edge-detected
// outside). fire is a one-cycle strobe for chaining; irq a one-cycle strobe.
// Timing: with the 40 MHz selected, fire is high delay+1 cycles after the
// start strobe (or the load in immediate mode) and out_fp rises one cycle
// after fire; stamp_* hold the UTC value of the fire cycle.
module counter_channel
  import ctrp_pkg::*;
#(
  parameter int unsigned NSTART  = 2,
  parameter int unsigned NEXTCLK = 2,
  parameter int unsigned PULSE_W = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  counter_cfg_t      load_cfg,
  input  logic [NSTART-1:0] start_pulse,
  input  logic [NEXTCLK-1:0] clk_tick,
  input  logic              prev_fire,
  input  logic [31:0]       utc_sec,
  input  logic [TICK_W-1:0] utc_tick,
  output logic              fire,
  output logic              out_fp,
  output logic              irq,
  output logic [31:0]       stamp_sec,
  output logic [TICK_W-1:0] stamp_tick,
  output logic              armed
);

  localparam int unsigned PW = $clog2(PULSE_W + 1);

  typedef enum logic [1:0] { C_IDLE, C_ARMED, C_COUNT } cstate_t;

  cstate_t      state;
  counter_cfg_t cfg;
  logic [31:0]  remaining;
  logic [PW-1:0] pulse_cnt;
  logic         start_now, tick_now;

  initial begin
    assert (NSTART <= 4 && NEXTCLK <= 3)
      else $error("counter_channel: start_sel and clk_sel are 2-bit fields");
  end

  // start strobe selected by the start mode; tick strobe selected by the
  // clock mode (index 0: the 40 MHz itself, ticking every cycle)
  logic [3:0] start_vec, tick_vec;
  assign start_vec = 4'(start_pulse);
  assign tick_vec  = {3'(clk_tick), 1'b1};

  always_comb begin
    unique case (cfg.start_mode)
      START_EXTERNAL: start_now = start_vec[cfg.start_sel];
      START_CHAINED:  start_now = prev_fire;
      default:        start_now = 1'b0;
    endcase
  end

  assign tick_now = tick_vec[cfg.clk_sel];

  assign fire  = (state == C_COUNT) && tick_now && remaining == '0 && !load;
  assign armed = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      cfg        <= '0;
      remaining  <= '0;
      pulse_cnt  <= '0;
      out_fp     <= 1'b0;
      irq        <= 1'b0;
      stamp_sec  <= '0;
      stamp_tick <= '0;
    end else begin
      irq <= 1'b0;
      if (load) begin
        cfg       <= load_cfg;
        remaining <= load_cfg.delay;
        state     <= (load_cfg.start_mode == START_IMMEDIATE) ? C_COUNT : C_ARMED;
      end else begin
        unique case (state)
          C_ARMED: if (start_now) state <= C_COUNT;
          C_COUNT: begin
            if (tick_now) begin
              if (remaining == '0) state <= C_IDLE;
              else                 remaining <= remaining - 1'b1;
            end
          end
          default: ;
        endcase
      end
      // output pulse and time tag
      if (fire) begin
        stamp_sec  <= utc_sec;
        stamp_tick <= utc_tick;
        irq        <= cfg.out_irq;
        if (cfg.out_fp) begin
          out_fp    <= 1'b1;
          pulse_cnt <= PW'(PULSE_W - 1);
        end
      end else if (pulse_cnt != '0) begin
        pulse_cnt <= pulse_cnt - 1'b1;
      end else begin
        out_fp <= 1'b0;
      end
    end
  end

endmodule
