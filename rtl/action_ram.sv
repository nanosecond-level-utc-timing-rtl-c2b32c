// action_ram: the action table.
//
// Each entry says which GMT frame triggers it, which counter it loads and the
// configuration it loads that counter with (ctrp_pkg::action_t). The host
// writes entries through the register map; the scanner reads one entry per
// clock. On the card the table lives in board RAM behind the FPGA; here it is
// an on-chip array with the same one-cycle synchronous read that such a RAM
// gives, which is this design's choice.
//
// Interface: one write port (we, waddr, wdata), one read port
// (raddr -> rdata on the next edge). The array has no reset: the host writes
// every entry it relies on, clearing the enable bit of unused ones.
module action_ram
  import ctrp_pkg::*;
#(
  parameter int unsigned ACTIONS = 256,
  localparam int unsigned AW     = $clog2(ACTIONS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  action_t       wdata,
  input  logic [AW-1:0] raddr,
  output action_t       rdata
);

  action_t mem [ACTIONS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
