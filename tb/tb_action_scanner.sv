// tb_action_scanner: self-checking test of the action-table lookup.
//
// Uses the real action_ram with a small table (ACTIONS = 32). Fills it with
// entries, some matching a chosen frame, some disabled, some for other frames,
// sends the frame and checks that exactly the matching enabled entries give
// load strobes, on the right counter, with their configuration, in table
// order, with entry k acted on k+2 cycles after msg_valid, the last entry
// of the table included. Also checks busy
// and the overrun strobe for a frame sent during a scan.
module tb_action_scanner;
  import ctrp_pkg::*;
  localparam int unsigned ACTIONS = 32;
  localparam int unsigned NCH = 5;
  localparam int unsigned AW = $clog2(ACTIONS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr;
  action_t wdata = '0, rdata;
  logic msg_valid = 1'b0;
  logic [MSG_W-1:0] msg = '0;
  logic [NCH-1:0] load;
  counter_cfg_t load_cfg;
  logic busy, overrun;
  action_t tbl [ACTIONS];
  int checks = 0, failures = 0;
  longint cyc = 0, t_msg = 0;
  int exp_k [$];
  int n_over = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  action_ram #(.ACTIONS(ACTIONS)) u_ram (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  action_scanner #(.ACTIONS(ACTIONS), .NCH(NCH)) dut (
    .clk, .rst_n, .msg_valid, .msg, .raddr, .rdata, .load, .load_cfg, .busy, .overrun);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check every load strobe against the expected list
  always @(negedge clk) if (rst_n) begin
    if (overrun) n_over++;
    if (load != '0) begin
      int k;
      checks++;
      if (exp_k.size() == 0) begin
        failures++; $display("unexpected load %b", load);
      end else begin
        k = exp_k.pop_front();
        if (load != NCH'(1) << tbl[k].channel || load_cfg != tbl[k].cfg || cyc - t_msg != longint'(k + 2)) begin
          failures++;
          $display("entry %0d: load %b cfg %h at %0d", k, load, load_cfg, cyc - t_msg);
        end
      end
    end
  end

  task automatic scan(input logic [MSG_W-1:0] m);
    exp_k.delete();
    for (int i = 0; i < ACTIONS; i++)
      if (tbl[i].en && tbl[i].event_code == m && tbl[i].channel < NCH) exp_k.push_back(i);
    @(negedge clk);
    msg_valid = 1'b1; msg = m; t_msg = cyc;
    @(negedge clk);
    msg_valid = 1'b0;
    checks++;
    if (!busy) begin failures++; $display("not busy"); end
    repeat (ACTIONS + 4) @(negedge clk);
    checks++;
    if (busy || exp_k.size() != 0) begin failures++; $display("scan incomplete: %0d left", exp_k.size()); end
  endtask

  initial begin
    logic [MSG_W-1:0] ev_a, ev_b;
    ev_a = 40'h02_0000_0101;
    ev_b = 40'h02_0000_0202;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < ACTIONS; i++) begin
      action_t a;
      a = action_t'({$urandom(), $urandom(), $urandom()});
      unique case (i % 4)
        0: begin a.en = 1'b1; a.event_code = ev_a; end
        1: begin a.en = 1'b0; a.event_code = ev_a; end
        2: begin a.en = 1'b1; a.event_code = ev_b; end
        default: a.en = 1'b1;
      endcase
      a.channel = 3'(i % 6);                // channel 5 is outside NCH: ignored
      if (i == ACTIONS - 1) begin a.en = 1'b1; a.event_code = ev_a; a.channel = 3'd1; end  // last entry counts too
      tbl[i] = a;
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = a;
    end
    @(negedge clk); we = 1'b0;
    scan(ev_a);
    scan(ev_b);
    scan(40'h03_DEAD_BEEF);
    // overrun: second frame during a scan
    @(negedge clk); msg_valid = 1'b1; msg = 40'h03_0000_0000;
    @(negedge clk); msg = 40'h03_0000_0001;
    @(negedge clk); msg_valid = 1'b0;
    repeat (ACTIONS + 4) @(negedge clk);
    checks++;
    if (n_over != 1) begin failures++; $display("overrun count %0d", n_over); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
