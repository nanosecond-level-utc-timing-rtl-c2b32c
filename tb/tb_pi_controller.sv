// tb_pi_controller: self-checking test of the PLL loop filter.
//
// Feeds random phase values with random coefficients and compares every DAC
// code with an integer model of the controller computed in the testbench
// (error, clamped integral, arithmetic shift, saturation), including runs
// that drive the output into both rails. Checks the two-cycle latency from
// in_valid to dac_load and that disabling clears the integral and returns
// the DAC to mid-scale.
module tb_pi_controller;
  localparam int unsigned SHIFT = 8;
  localparam longint IMAX = longint'(1) << (16 + SHIFT - 1);

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, in_valid = 1'b0;
  logic [15:0] phase = '0, setpoint = 16'd3000;
  logic signed [15:0] kp = '0, ki = '0;
  logic [15:0] dac_code;
  logic dac_load;
  int checks = 0, failures = 0, n_top = 0, n_bot = 0;
  longint integ = 0, exp_dac = 0;
  longint cyc = 0, t_in = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pi_controller #(.IN_W(16), .DAC_W(16), .SHIFT(SHIFT)) dut (
    .clk, .rst_n, .enable, .in_valid, .phase, .setpoint, .kp, .ki, .dac_code, .dac_load);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floor_shift(longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  task automatic step(input logic [15:0] ph);
    longint e, v;
    e = longint'(ph) - longint'(setpoint);
    integ = integ + longint'(ki) * e;
    if (integ > IMAX) integ = IMAX;
    if (integ < -IMAX) integ = -IMAX;
    v = 32768 + floor_shift(longint'(kp) * e + integ);
    exp_dac = (v < 0) ? 0 : (v > 65535) ? 65535 : v;
    if (exp_dac == 65535) n_top++;
    if (exp_dac == 0) n_bot++;
    @(negedge clk);
    in_valid = 1'b1; phase = ph; t_in = cyc;
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk iff dac_load);
    checks++;
    if (dac_code != 16'(exp_dac) || cyc - t_in != 2) begin
      failures++;
      if (failures < 10) $display("phase %0d: dac %0d expected %0d, latency %0d", ph, dac_code, exp_dac, cyc - t_in);
    end
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (dac_code != 16'h8000) begin failures++; $display("not mid-scale after reset"); end
    enable = 1'b1;
    for (int run = 0; run < 8; run++) begin
      kp = 16'($signed($urandom_range(4000)) - 2000);
      ki = 16'($signed($urandom_range(200)) - 100);
      if (run == 6) begin kp = 16'sd30000; ki = 16'sd3000; end   // drive into the rails
      for (int k = 0; k < 200; k++)
        step(16'(int'(setpoint) + $signed($urandom_range(2000)) - 1000 + ((run == 6) ? ((k < 100) ? 900 : -900) : 0)));
    end
    // disable: integral cleared, mid-scale
    enable = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (dac_code != 16'h8000) begin failures++; $display("not mid-scale when disabled"); end
    integ = 0;
    enable = 1'b1; kp = 16'sd100; ki = 16'sd10;
    step(setpoint + 16'd50);
    checks++;
    if (n_top == 0 || n_bot == 0) begin failures++; $display("rails not reached %0d %0d", n_top, n_bot); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
