// Programmable divider: a 15-bit preloadable down counter with sectioned
// preload, dividing its input clock by N = 8 .. 32767 in steps of one.
//
// How it works. The counter is split the way the BiCMOS divider is built:
// a fast 3-stage front section D1-D3 (the ECL stages) and a slow section
// D4-D15 that is itself cut into the subsections D4, D5-D6, D7-D10 and
// D11-D15. Each subsection owns a preload flag (the RS latches of the
// CMOS decoder). A subsection raises its flag once it has counted down to
// zero and every subsection above it is already preloading (the top one
// needs no permission); while its flag is up it holds the preload bits of
// N and ignores borrows from below. The chain is released from the top:
// PL_D5-D6 clears PL_D11-D15, DECODE (D4 at zero with PL_D5-D6 up) clears
// PL_D7-D10, PL_D4 clears PL_D5-D6. PL_D4 is the ECL latch: it is set by
// DECODE and cleared by PL_ECL, which fires when the front section reaches
// zero while PL_D4 is up. In the PL_ECL cycle the front section takes its
// preload bits and the count restarts from N, so one division cycle is
// exactly N input clocks and the slow stages get several clocks to settle
// instead of one. When the front section is preloaded with 000 the first
// clock after PL_ECL wraps it to 111 and toggles D4 at once; that is the
// case the special D4 stage exists for.
//
// Interface and timing. Everything is clocked on the rising edge of clk,
// the divider input (the prescaler or Preamp2 output). n is the division
// ratio from latches B; it is read level-sensitively while a section
// preloads, so it must only change right after a PL_ECL cycle. fdiv is the
// divided output, the D4 preload signal (active high here): it is high for
// 7 clocks of every N. pl_ecl is high for the one clock in which the
// counter restarts from N; it also strobes the transfer into latches B.
// rst_n (asynchronous, active low) starts an initial preload: the first
// clock after reset loads N into all stages.
//
// Taken from the design: the stage split, the preload order and the flag
// set/clear rules, the output taken from the D4 preload signal, the range
// 8..32767. This model's own choices: it is one synchronous circuit on the
// input clock, not a ripple counter, so the analog recovery times that
// motivate the sectioning become plain clock cycles; fdiv is active high;
// a ratio below 8 is outside the supported range and gives no defined output.
module prog_divider
  import uaa4802_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NBITS-1:0] n,
  output logic             fdiv,
  output logic             pl_ecl
);

  logic [2:0] s13;     // D1-D3, front (ECL) section
  logic       s4;      // D4
  logic [1:0] s56;     // D5-D6
  logic [3:0] s710;    // D7-D10
  logic [4:0] s1115;   // D11-D15
  logic       pl_d4, pl_56, pl_710, pl_1115;
  logic       init;

  logic [2:0] s13_eff;
  logic       s4_eff, s4_frz, decode;
  logic       b3, b4, b56, b710;
  logic [2:0] s13_nx;
  logic       s4_nx;
  logic [1:0] s56_nx;
  logic [3:0] s710_nx;
  logic [4:0] s1115_nx;

  always_comb begin
    pl_ecl  = pl_d4 && (s13 == 3'd0);
    // Front section: takes its preload bits in the PL_ECL cycle.
    s13_eff = pl_ecl ? n[2:0] : s13;
    s13_nx  = s13_eff - 3'd1;
    b3      = (s13_eff == 3'd0);
    // D4: held at its preload bit while PL_D4 is up, released by PL_ECL.
    s4_frz  = pl_d4 && !pl_ecl;
    s4_eff  = pl_d4 ? n[3] : s4;
    s4_nx   = s4_frz ? n[3] : (s4_eff ^ b3);
    b4      = !s4_frz && b3 && !s4_eff;
    // Slow subsections: frozen at their preload bits while flagged.
    s56_nx  = pl_56 ? n[5:4] : s56 - {1'b0, b4};
    b56     = !pl_56 && b4 && (s56 == 2'd0);
    s710_nx = pl_710 ? n[9:6] : s710 - {3'b0, b56};
    b710    = !pl_710 && b56 && (s710 == 4'd0);
    s1115_nx = pl_1115 ? n[14:10] : s1115 - {4'b0, b710};
    // CMOS decoder for D4.
    decode  = pl_56 && !s4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init    <= 1'b1;
      s13     <= '0;
      s4      <= 1'b0;
      s56     <= '0;
      s710    <= '0;
      s1115   <= '0;
      pl_d4   <= 1'b0;
      pl_56   <= 1'b0;
      pl_710  <= 1'b0;
      pl_1115 <= 1'b0;
    end else if (init) begin
      // Power-on preload of every stage.
      init  <= 1'b0;
      s13   <= n[2:0];
      s4    <= n[3];
      s56   <= n[5:4];
      s710  <= n[9:6];
      s1115 <= n[14:10];
    end else begin
      s13   <= s13_nx;
      s4    <= s4_nx;
      s56   <= s56_nx;
      s710  <= s710_nx;
      s1115 <= s1115_nx;
      // RS latches, set dominant.
      pl_1115 <= (s1115 == 5'd0) || (pl_1115 && !pl_56);
      pl_710  <= ((s710 == 4'd0) && pl_1115) || (pl_710 && !decode);
      pl_56   <= ((s56 == 2'd0) && pl_710) || (pl_56 && !pl_d4);
      // ECL latch: set by DECODE, reset by PL_ECL.
      pl_d4   <= !pl_ecl && (pl_d4 || decode);
    end
  end

  assign fdiv = pl_d4;

endmodule
