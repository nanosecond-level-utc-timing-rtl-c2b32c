// tb_utc_clock: self-checking test of the UTC time register.
//
// Runs with a short second (TICKS_PER_SEC = 1000) and compares sec/tick on
// every cycle with a reference model kept in the testbench: loads at random
// moments, free-running carries into the seconds, sec_start on tick 0.
module tb_utc_clock;
  import ctrp_pkg::*;
  localparam int unsigned TPS = 1000;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [31:0] load_sec = '0, sec;
  logic [TICK_W-1:0] tick;
  logic sec_start;
  int checks = 0, failures = 0, carries = 0;
  longint ref_sec = 0, ref_tick = 0;

  always #12.5 clk = ~clk;

  utc_clock #(.TICKS_PER_SEC(TPS)) dut (.clk, .rst_n, .load, .load_sec, .sec, .tick, .sec_start);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same edges
  always @(posedge clk) if (rst_n) begin
    if (load) begin ref_sec = load_sec; ref_tick = 0; end
    else if (ref_tick == TPS - 1) begin ref_sec++; ref_tick = 0; carries++; end
    else ref_tick++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      checks++;
      if (sec != 32'(ref_sec) || tick != TICK_W'(ref_tick) || sec_start != (ref_tick == 0)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: sec %0d tick %0d, expected %0d %0d", cyc, sec, tick, ref_sec, ref_tick);
      end
      load = 1'b0;
      if ($urandom_range(2999) == 0 || cyc == 100) begin
        load     = 1'b1;
        load_sec = $urandom();
      end
    end
    checks++;
    if (carries < 5) begin failures++; $display("too few carries %0d", carries); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
