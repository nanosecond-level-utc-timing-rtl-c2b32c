// action_scanner: looks up the actions to take for a received GMT frame.
//
// When a frame arrives, the scanner reads the whole action table, one entry
// per clock, and for every enabled entry whose event equals the frame it
// issues a one-cycle load strobe to the counter the entry names, together
// with the entry's counter configuration. Matching the whole 40-bit frame,
// and letting a later entry for the same counter override an earlier one,
// are this design's choices.
//
// Interface: msg_valid/msg from the receiver; raddr/rdata to the table
// (rdata one cycle after raddr); load is one-hot over the NCH counters with
// load_cfg valid in the same cycle. busy is high during a scan. A frame that
// arrives during a scan is dropped and flagged by a one-cycle overrun strobe
// (frames are 82 us apart at the least, a scan lasts ACTIONS+1 cycles).
// Timing: entry k is acted on k+2 cycles after msg_valid.
module action_scanner
  import ctrp_pkg::*;
#(
  parameter int unsigned ACTIONS = 256,
  parameter int unsigned NCH     = 5,
  localparam int unsigned AW     = $clog2(ACTIONS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             msg_valid,
  input  logic [MSG_W-1:0] msg,
  output logic [AW-1:0]    raddr,
  input  action_t          rdata,
  output logic [NCH-1:0]   load,
  output counter_cfg_t     load_cfg,
  output logic             busy,
  output logic             overrun
);

  logic [MSG_W-1:0] cur_msg;
  logic             rd_valid;          // rdata holds a table entry this cycle
  logic             last_issued;       // raddr has reached the last entry

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      raddr       <= '0;
      rd_valid    <= 1'b0;
      last_issued <= 1'b0;
      cur_msg     <= '0;
      overrun     <= 1'b0;
    end else begin
      overrun <= msg_valid && busy;
      if (!busy) begin
        rd_valid <= 1'b0;
        if (msg_valid) begin
          busy        <= 1'b1;
          cur_msg     <= msg;
          raddr       <= '0;
          last_issued <= 1'b0;
        end
      end else begin
        rd_valid <= !last_issued;
        if (!last_issued) begin
          if (raddr == AW'(ACTIONS - 1)) last_issued <= 1'b1;
          else                           raddr       <= raddr + 1'b1;
        end else if (!rd_valid) begin
          busy <= 1'b0;                // last entry has been examined
        end
      end
    end
  end

  always_comb begin
    load     = '0;
    load_cfg = rdata.cfg;
    if (rd_valid && rdata.en && rdata.event_code == cur_msg && 32'(rdata.channel) < NCH)
      load[rdata.channel] = 1'b1;
  end

endmodule
