// tb_hptdc_readout: self-checking test of the HPTDC parallel readout.
//
// A stand-in for the HPTDC's readout FIFO presents words with data_ready and
// moves to the next word when it sees get_data. The CPU side pops words at a
// random pace, sometimes slower than they arrive so the local FIFO fills
// and the source is held off. Every word must arrive once, in order, the
// count must track the words held, and words must never be taken faster
// than one every two cycles.
module tb_hptdc_readout;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic data_ready, get_data, pop = 1'b0, empty;
  logic [31:0] tdc_data, rd_data;
  logic [4:0] count;
  int checks = 0, failures = 0, n_src = 0, n_got = 0, n_full = 0;
  logic [31:0] src_q [$];
  longint last_take = -10, cyc = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hptdc_readout #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .data_ready, .get_data, .tdc_data, .pop, .rd_data, .empty, .count);

  // source: words 0xA5000000 + n, the next presented after get_data
  assign data_ready = rst_n && n_src < 200;
  assign tdc_data   = 32'hA500_0000 + 32'(n_src);
  always @(posedge clk) if (rst_n && get_data) begin
    checks++;
    if (cyc - last_take < 2) begin failures++; $display("taken too fast"); end
    last_take = cyc;
    n_src <= n_src + 1;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_got < 200) begin
      @(negedge clk);
      pop = 1'b0;
      if (count == 5'(DEPTH)) n_full++;
      if (!empty && $urandom_range((n_got < 100) ? 9 : 1) == 0) begin
        checks++;
        if (rd_data != 32'hA500_0000 + 32'(n_got)) begin
          failures++; $display("word %0d: %h", n_got, rd_data);
        end
        pop = 1'b1;
        n_got++;
      end
    end
    @(negedge clk); pop = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (!empty || count != 0 || n_full == 0) begin failures++; $display("end state: empty %b count %0d full seen %0d", empty, count, n_full); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
