// hptdc_readout: FPGA side of the HPTDC parallel readout port.
//
// The HPTDC stores its time tags in its own readout FIFO and hands them out
// one 32-bit word at a time on a parallel port. This block copies words into
// a local FIFO that the CPU empties through the register map. The handshake
// is this design's choice: a word is valid while data_ready is high; the
// block takes it, pulses get_data for one cycle, and leaves one idle cycle so
// data_ready can update before the next word. While the local FIFO is full
// no word is taken, so back-pressure leaves the words in the HPTDC.
//
// Interface: pop removes the oldest word, shown on rd_data while !empty;
// count is the number of words held. Timing: at most one word every two cycles (20 Mwords/s).
module hptdc_readout #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              data_ready,
  output logic              get_data,
  input  logic [DATA_W-1:0] tdc_data,
  input  logic              pop,
  output logic [DATA_W-1:0] rd_data,
  output logic              empty,
  output logic [AW:0]       count
);

  logic full, take;

  assign take = data_ready && !full && !get_data;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push   (take),
    .wr_data(tdc_data),
    .pop,
    .rd_data,
    .empty,
    .full,
    .count
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) get_data <= 1'b0;
    else        get_data <= take;
  end

endmodule
