// vcxo_model: behavioural model of the VCXO and its control DAC.
//
// Not synthesizable. Produces a square wave near 40 MHz whose frequency
// depends linearly on the DAC code: f = 40 MHz * (1 + (OFFSET_PPM +
// (code - 32768) * PULL_PPM / 32768) * 1e-6). The default pull range of
// +-100 ppm over the full code range and the 30 ppm offset at mid-scale are
// typical crystal figures chosen for the test, not values of any real part.
// The code takes effect at the next edge. Edge times are accumulated as
// reals and rounded only when scheduled, at femtosecond precision, so that
// a step of a few parts per billion is not lost to rounding.
`timescale 1ns/1fs
module vcxo_model #(
  parameter real OFFSET_PPM = 30.0,
  parameter real PULL_PPM   = 100.0
) (
  input  logic [15:0] code,
  output logic        clk
);
  real half_ns, t_edge;
  initial begin
    clk    = 1'b0;
    t_edge = 0.0;
    forever begin
      half_ns = 12.5 / (1.0 + (OFFSET_PPM + (real'(code) - 32768.0) * PULL_PPM / 32768.0) * 1e-6);
      t_edge += half_ns;
      #(t_edge - $realtime) clk = ~clk;
    end
  end
endmodule
