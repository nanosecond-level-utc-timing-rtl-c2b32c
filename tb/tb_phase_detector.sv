// tb_phase_detector: self-checking test of the counter phase detector.
//
// The oscillator runs at 1/7.3 ns, unrelated to the 40 MHz. The GMT stand-in
// is a 500 kHz square wave whose rising edges come phi ns before a rising
// edge of the 40 MHz. With no averaging every single measurement must be
// floor or ceil of phi/7.3 ticks; with 256 measurements averaged the mean
// must come within 0.1 tick of phi/7.3. Phases across the unambiguous range
// (one oscillator period away from either 40 MHz edge) are tried, and the
// number of results per second of signal is checked against 2^avg_log2.
`timescale 1ns/1ps
module tb_phase_detector;
  localparam real TOSC = 7.3;

  logic clk = 1'b0, rst_n = 1'b0, clk40 = 1'b0, gmt = 1'b0;
  logic [3:0] avg_log2 = '0;
  logic avg_valid;
  logic [15:0] avg;
  int checks = 0, failures = 0, n_avg = 0;
  real phi = 10.0;
  real last_avg;
  bit  settled = 1'b0;              // skip results that span a phase change

  always #(TOSC / 2) clk = ~clk;
  always #12.5 clk40 = ~clk40;        // rising edges at 12.5 + 25k

  // GMT edges phi before a 40 MHz edge, every 1 us, re-timed from the
  // current phi at every period
  initial begin
    for (int k = 1; ; k++) begin
      #(real'(k) * 1000.0 + 12.5 - phi - $realtime);
      gmt = 1'b1;
      #500;
      gmt = 1'b0;
    end
  end

  phase_detector #(.CNT_W(8), .FRAC(8)) dut (
    .clk, .rst_n, .gmt_in(gmt), .clk40_in(clk40), .avg_log2, .avg_valid, .avg);

  always @(posedge clk) if (avg_valid) begin
    n_avg++;
    last_avg = real'(avg) / 256.0;
    if (avg_log2 == 0 && settled) begin
      checks++;
      if (avg[7:0] != 0 || (avg[15:8] != $floor(phi / TOSC) && avg[15:8] != $ceil(phi / TOSC))) begin
        failures++;
        $display("phi %f: single count %0d", phi, avg[15:8]);
      end
    end
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real phis [4] = '{7.9, 10.2, 12.7, 16.9};
    #20 rst_n = 1'b1;
    foreach (phis[i]) begin
      phi = phis[i];
      avg_log2 = 4'd0;
      settled = 1'b0;
      #3_000;
      settled = 1'b1;
      #40_000;
      settled = 1'b0;
      avg_log2 = 4'd8;
      @(posedge clk iff avg_valid);   // discard a result spanning the change
      n_avg = 0;
      repeat (2) @(posedge clk iff avg_valid);
      checks++;
      if (last_avg < phi / TOSC - 0.1 || last_avg > phi / TOSC + 0.1) begin
        failures++;
        $display("phi %f ns: mean %f ticks, expected %f", phi, last_avg, phi / TOSC);
      end
    end
    // rate: 2^avg_log2 measurements per result, one per GMT rising edge (1 us)
    avg_log2 = 4'd4;
    @(posedge clk iff avg_valid);
    n_avg = 0;
    #160_000;
    checks++;
    if (n_avg < 9 || n_avg > 11) begin failures++; $display("%0d results in 160 us, expected 10", n_avg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
