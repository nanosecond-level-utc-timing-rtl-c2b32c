// jtag_port: software-driven JTAG port for the HPTDC.
//
// The HPTDC is configured through its JTAG port. Instead of a JTAG engine,
// each JTAG line is a bit of a register the CPU reads and writes, and the
// driver software toggles TCK, TMS and TDI and samples TDO itself. This is
// how the CTRP does it; the bit positions and the reset state (TRST_N low,
// holding the chip's JTAG logic in reset) are this design's choices.
//
// Register: [0] TCK, [1] TMS, [2] TDI, [3] TRST_N, [4] TDO (read only).
// Timing: the outputs change on the clock edge after wr. TDO passes a
// two-flip-flop synchroniser, so it reads back two cycles late; software
// clocks the port at bus speed, far below the 40 MHz.
module jtag_port (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [3:0] wdata,
  output logic [4:0] rdata,
  output logic       tck,
  output logic       tms,
  output logic       tdi,
  output logic       trst_n,
  input  logic       tdo
);

  logic [1:0] tdo_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {trst_n, tdi, tms, tck} <= 4'b0000;
      tdo_sync                <= '0;
    end else begin
      tdo_sync <= {tdo_sync[0], tdo};
      if (wr) {trst_n, tdi, tms, tck} <= wdata;
    end
  end

  assign rdata = {tdo_sync[1], trst_n, tdi, tms, tck};

endmodule
