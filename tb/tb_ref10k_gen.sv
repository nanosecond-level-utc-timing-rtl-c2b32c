// tb_ref10k_gen: self-checking test of the 10 kHz UTC reference.
//
// At the default DIV = 4000 (10 kHz from 40 MHz) checks that each rising
// edge of ref_out comes exactly one cycle after a multiple of DIV cycles
// counted from the last sync, that the high time is HIGH_CLKS, and that a
// sync in mid-period realigns the train.
module tb_ref10k_gen;
  localparam int unsigned DIV = 4000;

  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, ref_out;
  int checks = 0, failures = 0, rises = 0;
  longint since_sync = 0, high_len = 0;
  logic prev = 1'b0;
  bit   synced = 1'b0, rise_seen = 1'b0;

  always #12.5 clk = ~clk;

  ref10k_gen #(.DIV(DIV)) dut (.clk, .rst_n, .sync, .ref_out);

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // since_sync counts cycles since the edge that sampled sync (tick numbering)
  always @(posedge clk) begin
    if (sync) since_sync <= 0; else since_sync <= since_sync + 1;
  end

  always @(negedge clk) if (rst_n) begin
    if (sync) begin synced = 1'b1; rise_seen = 1'b0; end
    if (ref_out && !prev && synced) begin
      rises++;
      rise_seen = 1'b1;
      checks++;
      if (since_sync % DIV != 1) begin
        failures++;
        $display("rise at tick %0d", since_sync);
      end
    end
    if (!ref_out && prev && rise_seen) begin
      checks++;
      if (high_len != DIV / 2) begin failures++; $display("high for %0d", high_len); end
    end
    high_len = ref_out ? high_len + 1 : 0;
    prev = ref_out;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    sync = 1'b1; @(negedge clk); sync = 1'b0;
    repeat (5 * DIV + 1234) @(negedge clk);
    sync = 1'b1; @(negedge clk); sync = 1'b0;
    repeat (5 * DIV) @(negedge clk);
    checks++;
    if (rises < 9) begin failures++; $display("only %0d rising edges", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
