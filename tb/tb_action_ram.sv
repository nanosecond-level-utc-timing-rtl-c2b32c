// tb_action_ram: self-checking test of the action table array.
//
// Writes random entries to random addresses while reading others, and checks
// each read one cycle after its address against a copy of the table kept in
// the testbench, including a read of an address written on the same edge
// (which returns the old entry).
module tb_action_ram;
  import ctrp_pkg::*;
  localparam int unsigned ACTIONS = 256;
  localparam int unsigned AW = $clog2(ACTIONS);

  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  action_t wdata = '0, rdata;
  action_t model [ACTIONS];
  action_t expect_q;
  bit      expect_v = 1'b0;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  action_ram #(.ACTIONS(ACTIONS)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic action_t rnd_action();
    action_t a;
    a = action_t'({$urandom(), $urandom(), $urandom()});
    return a;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill the whole table
    for (int i = 0; i < ACTIONS; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = rnd_action(); model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rdata != expect_q) begin
          failures++;
          if (failures < 10) $display("read mismatch at step %0d", k);
        end
      end
      raddr    = AW'($urandom_range(ACTIONS - 1));
      expect_q = model[raddr];              // value before this edge's write
      expect_v = 1'b1;
      we = ($urandom_range(1) == 1);
      waddr = (k % 7 == 0) ? raddr : AW'($urandom_range(ACTIONS - 1));
      wdata = rnd_action();
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
