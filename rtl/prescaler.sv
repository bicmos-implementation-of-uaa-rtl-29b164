// Fixed divide-by-8 prescaler.
//
// Three toggle stages in cascade scale the RF input (up to 1.3 GHz) down
// to a rate the programmable divider can count (up to 165 MHz). Written
// here as a synchronous 3-bit counter on the RF clock: its top bit is the
// same square wave that the last toggle stage of the ripple chain gives.
//
// Interface: clk is the amplified RF input, rst_n an asynchronous active-
// low reset (also used to stop the prescaler when it is bypassed), fout the
// divided clock with 50 % duty, one period per 2**STAGES input periods.
// The ratio 8 and the three-stage structure follow the design; the
// synchronous counter form is this model's choice.
module prescaler #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic fout
);

  logic [STAGES-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q + 1'b1;
  end

  assign fout = q[STAGES-1];

endmodule
