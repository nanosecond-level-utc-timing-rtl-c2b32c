// gmt_rx: receiver for the 500 kb/s General Machine Timing message stream.
//
// The line is sampled by the clean 40 MHz clock after a two-flip-flop
// synchroniser, so one bit lasts BIT_CLKS = 80 cycles. Frames are taken to be
// Manchester coded (this design's choice; the network only fixes the rate):
// the line idles low, a '1' is low-then-high and a '0' high-then-low. A frame
// is a start bit '1', MSG_W data bits MSB first and one odd-parity bit over
// the data. The rising edge in the middle of the start bit sets the bit
// timing; every following bit is sampled a quarter bit before and a quarter
// bit after its middle, and the two halves must differ. Because the sender
// works from the same 40 MHz reference, no re-alignment on later edges is
// needed: the sampling points stay 20 cycles away from every edge.
//
// Interface: msg_valid is a one-cycle strobe with msg holding the frame;
// msg_err is a one-cycle strobe for a code violation or a parity error, after
// which the receiver waits for the next start edge.
// Timing: msg_valid rises BIT_CLKS/4 + 3 cycles after the middle of the parity
// bit on the line (two synchroniser stages, one for the edge, one output
// register).
module gmt_rx
  import ctrp_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 80,
  parameter int unsigned NBITS    = MSG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gmt_in,
  output logic             msg_valid,
  output logic [NBITS-1:0] msg,
  output logic             msg_err
);

  localparam int unsigned Q     = BIT_CLKS / 4;
  localparam int unsigned PW    = $clog2(BIT_CLKS);
  localparam int unsigned BW    = $clog2(NBITS + 2);

  typedef enum logic { S_IDLE, S_BITS } state_t;

  logic [2:0]       sync;              // [0],[1] synchroniser, [2] previous
  logic             line, line_rise;
  state_t           state;
  logic [PW-1:0]    phase;             // 0 at the middle of the current bit
  logic [BW-1:0]    nbit;              // bits completed after the start bit
  logic             first_half;
  logic [NBITS:0]   shreg;             // data bits then parity

  assign line      = sync[1];
  assign line_rise = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= '0;
      state      <= S_IDLE;
      phase      <= '0;
      nbit       <= '0;
      first_half <= 1'b0;
      shreg      <= '0;
      msg_valid  <= 1'b0;
      msg_err    <= 1'b0;
      msg        <= '0;
    end else begin
      sync      <= {sync[1:0], gmt_in};
      msg_valid <= 1'b0;
      msg_err   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (line_rise) begin       // middle of the start bit
            state <= S_BITS;
            phase <= PW'(1);
            nbit  <= '0;
          end
        end
        S_BITS: begin
          phase <= (phase == PW'(BIT_CLKS - 1)) ? '0 : phase + 1'b1;
          if (phase == PW'(BIT_CLKS - Q)) begin
            first_half <= line;      // first half of the next bit
          end
          if (phase == PW'(Q) && nbit == '0 && !line) begin
            // start bit must still be high a quarter bit after its edge
            state   <= S_IDLE;
            msg_err <= 1'b1;
          end
          if (phase == PW'(Q) && nbit != '0) begin
            if (first_half == line) begin
              state   <= S_IDLE;     // code violation
              msg_err <= 1'b1;
            end else begin
              shreg <= {shreg[NBITS-1:0], line};
              if (nbit == BW'(NBITS + 1)) begin
                state <= S_IDLE;
                if (^{shreg[NBITS-1:0], line}) begin
                  msg_valid <= 1'b1;
                  msg       <= shreg[NBITS-1:0];
                end else begin
                  msg_err <= 1'b1;
                end
              end
            end
          end
          if (phase == PW'(BIT_CLKS - 1)) begin
            nbit <= nbit + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
