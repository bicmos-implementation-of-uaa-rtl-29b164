// Latches B: second rank of the double-latch frequency register.
//
// The divider must never preload from a ratio that is half written, and
// latches A are written from the bus at any time. Latches B therefore take
// latches A only at a divider preload (tdi, the divider's PL_ECL strobe)
// and only when a new value is waiting. "Waiting" is signalled across the
// clock domains by a_toggle, which changes on every write of latches A:
// it is synchronized into the divider clock domain, and by the time the
// change arrives latches A have been stable for two clocks, so they can be
// sampled safely.
//
// Interface: clk is the divider input clock, rst_n an asynchronous active-
// low reset that loads N = 256, freq_a the latches A word, n the ratio fed
// to the divider. n changes on the clock edge that ends a PL_ECL cycle, so
// the divider loads the new ratio in all its sections during the next
// division cycle. The double-latch scheme and the transfer at preload
// follow the design; the toggle handshake is this model's choice.
module latch_b
  import uaa4802_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NBITS-1:0] freq_a,
  input  logic             a_toggle,
  input  logic             tdi,
  output logic [NBITS-1:0] n
);

  logic tog_s, tog_seen;

  sync2 u_sync (.clk, .rst_n, .d(a_toggle), .q(tog_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n        <= N_POWER_ON;
      tog_seen <= 1'b0;
    end else if (tdi && (tog_s != tog_seen)) begin
      n        <= freq_a;
      tog_seen <= tog_s;
    end
  end

endmodule
