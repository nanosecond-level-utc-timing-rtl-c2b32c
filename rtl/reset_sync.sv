// reset_sync: reset synchroniser.
//
// Asserts rst_n_out asynchronously with rst_n_in and releases it two clock
// edges after rst_n_in is released, so every flip-flop of the clock domain
// leaves reset on the same edge.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic r1;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      r1        <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      r1        <= 1'b1;
      rst_n_out <= r1;
    end
  end

endmodule
