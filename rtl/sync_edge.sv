// sync_edge: synchroniser and rising-edge detector for asynchronous inputs.
//
// Each of the N inputs passes two flip-flops into the clk domain; a third
// flip-flop gives the previous value, and rise is a one-cycle strobe per
// rising edge. Used for the front-panel start and clock inputs, which must
// therefore stay below half the clock rate. Latency: rise is high in the
// third cycle after the input edge is first sampled.
module sync_edge #(
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic [N-1:0] rise
);

  logic [N-1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= in;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign rise = s2 & ~s3;

endmodule
