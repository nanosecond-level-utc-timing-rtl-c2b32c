// pi_controller: loop filter of the clock-recovery PLL.
//
// Every new phase average from the phase detector gives an error
// e = phase - setpoint. The controller keeps an integral I += ki*e and drives
// the VCXO control DAC with mid-scale + (kp*e + I) >>> SHIFT, saturated to the
// DAC range. Both coefficients are programmable, which lets the same loop be
// tuned for different loop bandwidths. A larger phase count means the clean
// 40 MHz edge comes later than wanted, so a positive error raises the DAC code
// and speeds up the VCXO. The PI structure with programmable coefficients is
// that of the CTRP; the number formats, the shift, the clamp of the integral
// to the range that the output can use (anti-windup) and the behaviour while
// disabled (integral cleared, DAC at mid-scale) are this design's choices.
//
// Interface: in_valid/phase from the phase detector, unsigned with the same
// scaling as setpoint; kp, ki signed. dac_code is registered; dac_load strobes
// for one cycle when it changes value or is rewritten.
// Timing: dac_code and dac_load follow in_valid by two cycles.
module pi_controller #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned DAC_W = 16,
  parameter int unsigned SHIFT = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  phase,
  input  logic [IN_W-1:0]  setpoint,
  input  logic signed [15:0] kp,
  input  logic signed [15:0] ki,
  output logic [DAC_W-1:0] dac_code,
  output logic             dac_load
);

  localparam int unsigned EW = IN_W + 1;          // error
  localparam int unsigned PW = EW + 16;           // product
  localparam int unsigned AW = DAC_W + SHIFT + 2; // integral and sum
  localparam logic signed [AW-1:0] I_MAX =  (AW'(1) <<< (DAC_W + SHIFT - 1));
  localparam logic signed [AW-1:0] I_MIN = -(AW'(1) <<< (DAC_W + SHIFT - 1));
  localparam logic signed [DAC_W+1:0] MID = (DAC_W+2)'(1) <<< (DAC_W - 1);

  logic signed [EW-1:0] err;
  logic signed [PW-1:0] p_term, i_step;
  logic signed [AW-1:0] integ, integ_next;
  logic                 stage1;
  logic [DAC_W-1:0]     dac_next;

  assign err = $signed({1'b0, phase}) - $signed({1'b0, setpoint});

  // integral with clamping
  always_comb begin
    logic signed [PW:0] t;
    t = (PW+1)'(integ) + (PW+1)'(i_step);
    if (t > (PW+1)'(I_MAX))      integ_next = I_MAX;
    else if (t < (PW+1)'(I_MIN)) integ_next = I_MIN;
    else                         integ_next = AW'(t);
  end

  // output: mid-scale plus the scaled PI sum, saturated to the DAC range
  always_comb begin
    logic signed [AW+1:0] v;
    v = (AW+2)'(MID) + (AW+2)'((p_term + PW'(integ_next)) >>> SHIFT);
    if (v < 0)                           dac_next = '0;
    else if (v > (AW+2)'({DAC_W{1'b1}})) dac_next = '1;
    else                                 dac_next = DAC_W'(v);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_term   <= '0;
      i_step   <= '0;
      integ    <= '0;
      stage1   <= 1'b0;
      dac_code <= DAC_W'(MID);
      dac_load <= 1'b0;
    end else begin
      stage1   <= 1'b0;
      dac_load <= 1'b0;
      if (!enable) begin
        integ    <= '0;
        p_term   <= '0;
        i_step   <= '0;
        if (dac_code != DAC_W'(MID)) begin
          dac_code <= DAC_W'(MID);
          dac_load <= 1'b1;
        end
      end else begin
        if (in_valid) begin
          // stage 1: products
          p_term <= PW'(err) * PW'(kp);
          i_step <= PW'(err) * PW'(ki);
          stage1 <= 1'b1;
        end
        if (stage1) begin
          // stage 2: integrate and drive the DAC
          integ    <= integ_next;
          dac_load <= 1'b1;
          dac_code <= dac_next;
        end
      end
    end
  end

endmodule
