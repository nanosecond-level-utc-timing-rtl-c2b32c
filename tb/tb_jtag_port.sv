// tb_jtag_port: self-checking test of the software JTAG register.
//
// Checks the reset state, then bit-bangs a JTAG shift through the register
// the way driver software does (TMS/TDI set with TCK low, then TCK high),
// against a small shift-register stand-in for the HPTDC's TAP data register
// whose TDO is read back through the register. Each written pattern must
// appear on the pins one cycle after the write, and the word shifted out
// must equal the word shifted in one pass earlier.
module tb_jtag_port;
  logic clk = 1'b0, rst_n = 1'b0, wr = 1'b0;
  logic [3:0] wdata = '0;
  logic [4:0] rdata;
  logic tck, tms, tdi, trst_n, tdo;
  logic [31:0] dr = 32'h0;            // device-side shift register
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  jtag_port dut (.clk, .rst_n, .wr, .wdata, .rdata, .tck, .tms, .tdi, .trst_n, .tdo);

  // device: shifts on rising TCK while TRST_N is high, TDO = LSB
  always @(posedge tck) if (trst_n) dr <= {tdi, dr[31:1]};
  assign tdo = dr[0];

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_reg(input logic [3:0] v);
    @(negedge clk); wr = 1'b1; wdata = v;
    @(negedge clk); wr = 1'b0;
    checks++;
    if ({trst_n, tdi, tms, tck} != v || rdata[3:0] != v) begin
      failures++; $display("pins %b expected %b", {trst_n, tdi, tms, tck}, v);
    end
  endtask

  task automatic shift_word(input logic [31:0] din, output logic [31:0] dout);
    for (int i = 0; i < 32; i++) begin
      write_reg({1'b1, din[i], 1'b0, 1'b0});
      repeat (3) @(negedge clk);         // TDO synchroniser
      dout[i] = rdata[4];
      write_reg({1'b1, din[i], 1'b0, 1'b1});
    end
  endtask

  initial begin
    logic [31:0] a, b, o;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (trst_n !== 1'b0 || tck !== 1'b0) begin failures++; $display("reset state"); end
    a = $urandom(); b = $urandom();
    write_reg(4'b1000);
    shift_word(a, o);
    shift_word(b, o);
    checks++;
    if (o != a) begin failures++; $display("shifted out %h expected %h", o, a); end
    write_reg(4'b0110);
    write_reg(4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
