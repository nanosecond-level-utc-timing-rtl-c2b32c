// phase_detector: counter-based phase detector of the clock-recovery PLL.
//
// Runs on a free-running oscillator that is unrelated to the 40 MHz. It
// counts oscillator ticks from each rising edge of the incoming GMT signal to
// the next rising edge of the clean 40 MHz produced by the VCXO. One
// measurement has a resolution of one tick; since the oscillator is
// unrelated, the quantisation error varies from one measurement to the next,
// and the average of 2^avg_log2 measurements resolves the phase far below a
// tick. This is the structure of the CTRP PLL. The identical two-flip-flop
// synchronisers on both inputs, the power-of-two averaging and the output
// format are this design's choices.
//
// Interface: gmt_in and clk40_in are asynchronous (the 40 MHz is sampled as
// data). avg is the mean count in ticks with FRAC fraction bits, whatever
// the number averaged; avg_valid strobes for one cycle when a new mean is
// ready. avg_log2 above FRAC is treated as FRAC. When both edges are seen on
// the same oscillator cycle the count is 0, so the reading is unambiguous only
// while the GMT edge lies more than one oscillator period from either 40 MHz
// edge; the loop setpoint belongs in the middle of the 25 ns. A GMT edge that arrives
// while a measurement is open is ignored; a count saturates at its maximum.
module phase_detector #(
  parameter int unsigned CNT_W = 8,
  parameter int unsigned FRAC  = 8,
  localparam int unsigned OUT_W = CNT_W + FRAC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gmt_in,
  input  logic             clk40_in,
  input  logic [3:0]       avg_log2,
  output logic             avg_valid,
  output logic [OUT_W-1:0] avg
);

  logic [2:0]       s_gmt, s_c40;      // two synchroniser stages + previous
  logic             gmt_rise, c40_rise;
  logic             open_meas;
  logic [CNT_W-1:0] cnt;
  logic [OUT_W-1:0] acc;               // sum of up to 2^FRAC counts
  logic [FRAC:0]    n_done;
  logic [3:0]       l2;
  logic             done;
  logic [CNT_W-1:0] val;

  assign gmt_rise = s_gmt[1] & ~s_gmt[2];
  assign c40_rise = s_c40[1] & ~s_c40[2];
  // a measurement ends at the first 40 MHz edge after the GMT edge; both
  // edges in the same cycle give a count of zero
  assign done     = c40_rise && (open_meas || gmt_rise);
  assign val      = open_meas ? cnt : '0;
  assign l2       = (avg_log2 > 4'(FRAC)) ? 4'(FRAC) : avg_log2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_gmt     <= '0;
      s_c40     <= '0;
      open_meas <= 1'b0;
      cnt       <= '0;
      acc       <= '0;
      n_done    <= '0;
      avg       <= '0;
      avg_valid <= 1'b0;
    end else begin
      s_gmt     <= {s_gmt[1:0], gmt_in};
      s_c40     <= {s_c40[1:0], clk40_in};
      avg_valid <= 1'b0;
      if (done) begin
        open_meas <= 1'b0;
        if (n_done + 1'b1 == (FRAC+1)'(1) << l2) begin
          avg       <= (acc + OUT_W'(val)) << (4'(FRAC) - l2);
          avg_valid <= 1'b1;
          acc       <= '0;
          n_done    <= '0;
        end else begin
          acc    <= acc + OUT_W'(val);
          n_done <= n_done + 1'b1;
        end
      end else if (open_meas) begin
        if (cnt != '1) cnt <= cnt + 1'b1;
      end else if (gmt_rise) begin
        open_meas <= 1'b1;
        cnt       <= CNT_W'(1);
      end
    end
  end

endmodule
