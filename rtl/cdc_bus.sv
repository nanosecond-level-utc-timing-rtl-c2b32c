// cdc_bus: two-flip-flop transfer of slowly changing configuration.
//
// Samples a W-bit word from another clock domain through two flip-flops per
// bit. Bits may arrive one cycle apart when the word changes, so this is only
// for quasi-static settings: the PLL coefficients are meant to be written
// with the loop disabled.
module cdc_bus #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);

  logic [W-1:0] s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1  <= '0;
      out <= '0;
    end else begin
      s1  <= in;
      out <= s1;
    end
  end

endmodule
