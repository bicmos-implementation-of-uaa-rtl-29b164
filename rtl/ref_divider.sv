// Reference divider: derives the PLL reference from the 4 MHz oscillator.
//
// Eleven divide-by-2 stages (FF10..FF20) in cascade give a ratio of
// 2^11 = 2048. The last three stages can be bypassed so the clock passes
// straight through them: R0 = 1 bypasses FF20, R1 = 1 bypasses FF18 and
// FF19, giving (R0,R1) = 00 -> 2048, 10 -> 1024, 01 -> 512, 11 -> 256.
// The output of the sixth stage (FF15, 4 MHz / 64 = 62.5 kHz) is brought
// out for the test pin.
//
// Written as a synchronous counter on the oscillator clock: stage i
// toggles when every active stage below it is 1, and a bypassed stage
// passes its input through, so the output of the chain is the square wave
// of the last active stage. clk is the oscillator, rst_n an asynchronous
// active-low reset, r0/r1 the ratio select (quasi-static control bits),
// fref the reference (50 % duty), f62k5 the test tap.
// The stage count, the bypass of the last three stages and the ratio table
// follow the design; the synchronous form is this model's choice.
module ref_divider #(
  parameter int unsigned STAGES   = 11,
  parameter int unsigned TAP_62K5 = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic r0,
  input  logic r1,
  output logic fref,
  output logic f62k5
);

  logic [STAGES-1:0] q, byp, en, o;

  always_comb begin
    byp = '0;
    byp[STAGES-3] = r1;   // FF18
    byp[STAGES-2] = r1;   // FF19
    byp[STAGES-1] = r0;   // FF20
  end

  assign en[0] = 1'b1;
  assign o[0]  = q[0];
  for (genvar i = 1; i < STAGES; i++) begin : g_chain
    assign en[i] = en[i-1] && (byp[i-1] || q[i-1]);
    assign o[i]  = byp[i] ? o[i-1] : q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else begin
      for (int i = 0; i < STAGES; i++)
        if (en[i] && !byp[i]) q[i] <= ~q[i];
        else if (byp[i])      q[i] <= 1'b0;
    end
  end

  assign fref  = o[STAGES-1];
  assign f62k5 = q[TAP_62K5-1];

endmodule
