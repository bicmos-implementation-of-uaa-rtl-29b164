// Two-flop synchronizer for a single level signal crossing into the clk
// domain. Output follows the input two rising edges of clk later. Used
// for the reference frequency and the quasi-static control bits that the
// divider-clock domain reads from the oscillator domain.
module sync2 #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VALUE;
      q    <= RESET_VALUE;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
