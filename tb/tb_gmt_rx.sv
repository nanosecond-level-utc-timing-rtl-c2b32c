// tb_gmt_rx: self-checking test of the GMT frame receiver.
//
// Sends random frames Manchester-coded at BIT_CLKS cycles per bit, with each
// line edge moved by a random jitter of up to +-1 cycle, and checks every
// decoded word and its latency. Then sends a frame with a wrong parity bit
// and one with a code violation and checks that each gives msg_err and no
// msg_valid.
module tb_gmt_rx;
  import ctrp_pkg::*;

  localparam int unsigned BIT_CLKS = 80;
  localparam int unsigned Q        = BIT_CLKS / 4;

  logic clk = 1'b0, rst_n = 1'b0, line = 1'b0;
  logic msg_valid, msg_err;
  logic [MSG_W-1:0] msg;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [MSG_W-1:0] last_msg;
  longint cyc = 0, t_valid = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  gmt_rx #(.BIT_CLKS(BIT_CLKS)) dut (.clk, .rst_n, .gmt_in(line), .msg_valid, .msg, .msg_err);

  always @(posedge clk) begin
    if (msg_valid) begin n_valid++; last_msg = msg; t_valid = cyc; end
    if (msg_err) n_err++;
  end

  task automatic send_bit(input logic b, input bit jit = 1'b1);
    // '1' = low then high, '0' = high then low; mid-bit edge jittered
    int j;
    j = jit ? int'($urandom_range(2)) - 1 : 0;
    line = ~b;
    repeat (BIT_CLKS / 2 + j) @(negedge clk);
    line = b;
    repeat (BIT_CLKS / 2 - j) @(negedge clk);
  endtask

  // frame with an optional parity error or code violation at bit viol_at
  longint t_mid_parity;
  task automatic send_frame(input logic [MSG_W-1:0] d, input bit bad_par, input int viol_at);
    logic p;
    p = ~^d ^ bad_par;                        // odd parity over data + p
    send_bit(1'b1, 1'b0);                     // start bit sets the timing
    for (int i = MSG_W - 1; i >= 0; i--) begin
      if (MSG_W - 1 - i == viol_at) begin
        line = d[i]; repeat (BIT_CLKS) @(negedge clk);   // no mid-bit edge
      end else send_bit(d[i]);
    end
    line = ~p;
    repeat (BIT_CLKS / 2) @(negedge clk);
    t_mid_parity = cyc;
    line = p;
    repeat (BIT_CLKS / 2) @(negedge clk);
    line = 1'b0;
    repeat (3 * BIT_CLKS) @(negedge clk);     // idle gap
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MSG_W-1:0] d;
    int v0, e0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (200) @(negedge clk);
    for (int k = 0; k < 30; k++) begin
      d = {$urandom(), $urandom()};
      if (k == 0) d = '0;
      if (k == 1) d = '1;
      v0 = n_valid; e0 = n_err;
      send_frame(d, 1'b0, -1);
      checks++;
      if (n_valid != v0 + 1 || n_err != e0 || last_msg != d) begin
        failures++;
        $display("frame %0d: sent %h got %h valid %0d err %0d", k, d, last_msg, n_valid - v0, n_err - e0);
      end
      checks++;
      // valid registered Q+3 cycles after the parity mid-bit edge
      if (t_valid - t_mid_parity != Q + 3) begin
        failures++;
        $display("frame %0d: latency %0d", k, t_valid - t_mid_parity);
      end
    end
    // parity error
    v0 = n_valid; e0 = n_err;
    send_frame(40'h01_1234_5678, 1'b1, -1);
    checks++;
    if (n_valid != v0 || n_err != e0 + 1) begin failures++; $display("parity error not flagged"); end
    // code violation in data bit 7
    v0 = n_valid; e0 = n_err;
    send_frame(40'h02_0000_00AA, 1'b0, 7);
    checks++;
    if (n_valid != v0 || n_err < e0 + 1) begin failures++; $display("code violation not flagged"); end
    // receiver recovers
    v0 = n_valid;
    send_frame(40'h02_CAFE_F00D, 1'b0, -1);
    checks++;
    if (n_valid != v0 + 1 || last_msg != 40'h02_CAFE_F00D) begin failures++; $display("no recovery"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
