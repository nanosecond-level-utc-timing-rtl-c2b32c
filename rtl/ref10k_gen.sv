// ref10k_gen: 10 kHz reference pulse train locked to UTC.
//
// The HPTDC time-tags pulses on a free-running scale. Tagging this reference
// as well lets software place any other tag on the UTC scale: every rising
// edge of ref_out falls on a UTC tick that is a multiple of DIV (4000 ticks of
// 25 ns = 100 us). A counter of DIV cycles restarts whenever the UTC register
// is loaded (sync), so the edges stay aligned with the UTC second.
// The 50 % duty cycle (HIGH_CLKS) is this design's choice.
//
// Timing: ref_out is registered; it rises one cycle after the cycle in which
// the counter is 0, i.e. one cycle after UTC ticks 0, DIV, 2*DIV, ...
module ref10k_gen #(
  parameter int unsigned DIV       = 4000,
  parameter int unsigned HIGH_CLKS = DIV / 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,
  output logic ref_out
);

  localparam int unsigned CW = $clog2(DIV);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ref_out <= 1'b0;
    end else begin
      if (sync || cnt == CW'(DIV - 1)) cnt <= '0;
      else                             cnt <= cnt + 1'b1;
      ref_out <= sync ? 1'b0 : (cnt < CW'(HIGH_CLKS));
    end
  end

endmodule
