// UAA 4802 PLL frequency synthesizer, digital core of the BiCMOS version.
//
// The synthesizer sets a TV tuner's local oscillator to N times the
// reference frequency. The VCO signal comes in amplified (rf_clk through
// Preamp1, rf2_clk through Preamp2); either the divide-by-8 prescaler or,
// when the control bit P bypasses it, Preamp2 clocks the 15-bit
// programmable divider (ratio N = 8..32767). The 4 MHz oscillator clock
// feeds the reference divider (ratio 2048/1024/512/256). The phase/
// frequency detector compares the two divided signals and drives the
// charge pump of the external loop filter. N and the control and band
// bits arrive over the two-wire M-Bus, pass through a shift register into
// latches A (and the control latches), and reach the divider through
// latches B, which are written only when the divider preloads.
//
// Clock domains: osc_clk runs the bus receiver, the shift register and
// latches A, the control latches and the reference divider. The divider
// clock (prescaler output or rf2_clk, chosen by P) runs the divider,
// latches B, the phase detector and FBY2; the reference, TES and TRI are
// synchronized into it. The divider clock is the OR of the two paths with
// the unused one held off, as in the original where only one preamplifier
// draws current at a time; P should be changed only while the loop is
// not expected to hold lock. rst_n is the power-on reset, asynchronous and
// active low.
//
// Ports outside the digital core: out1_n/out2_n go to the charge pump,
// bb[7:0] to the open-collector band buffers (1 = buffer on), sda_pull to
// the SDA pull-down, prescaler_on to the preamplifier current switch.
// fdiv and fref are the two phase detector inputs, brought out for
// observation. Two internal signals stay unused at this level: ava, the
// receiver's "addressed" flag, which the receiver uses itself, and FBY2,
// which only reaches a pin through the test multiplexer. Block structure
// and signal flow follow the design; the
// clocking of the low-speed logic by the oscillator is this design's
// choice.
module uaa4802_top
  import uaa4802_pkg::*;
(
  input  logic       rst_n,
  input  logic       rf_clk,
  input  logic       rf2_clk,
  input  logic       osc_clk,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_pull,
  output logic       out1_n,
  output logic       out2_n,
  output logic [7:0] bb,
  output logic       prescaler_on,
  output logic       fdiv,
  output logic       fref
);

  // ---- oscillator domain: bus, latches A, control, reference divider
  logic             ava, dat, clo, dtf, dtb, a_toggle;
  logic [NBITS-1:0] freq_a;
  ctrl_t            ctrl;
  logic             f62k5;

  mbus_receiver u_mbus (
    .clk(osc_clk), .rst_n, .scl, .sda, .sda_pull, .ava, .dat, .clo, .dtf, .dtb
  );

  shift_latches u_latches (
    .clk(osc_clk), .rst_n, .dat, .clo, .dtf, .dtb, .freq_a, .ctrl, .a_toggle
  );

  ref_divider u_refdiv (
    .clk(osc_clk), .rst_n, .r0(ctrl.r0), .r1(ctrl.r1), .fref, .f62k5
  );

  // ---- input selection: prescaler or Preamp2 path
  logic fpre, div_clk, pre_rst_n;

  assign prescaler_on = !ctrl.p;
  assign pre_rst_n    = rst_n && prescaler_on;

  prescaler u_pre (.clk(rf_clk), .rst_n(pre_rst_n), .fout(fpre));

  assign div_clk = (fpre && prescaler_on) || (rf2_clk && !prescaler_on);

  // ---- divider clock domain
  logic [NBITS-1:0] n;
  logic             pl_ecl, fref_s, tes, tri_en, tes_s, tri_s, fby2;

  latch_b u_latch_b (
    .clk(div_clk), .rst_n, .freq_a, .a_toggle, .tdi(pl_ecl), .n
  );

  prog_divider u_div (.clk(div_clk), .rst_n, .n, .fdiv, .pl_ecl);

  sync2 u_sync_fref (.clk(div_clk), .rst_n, .d(fref),   .q(fref_s));
  sync2 u_sync_tes  (.clk(div_clk), .rst_n, .d(tes),    .q(tes_s));
  sync2 u_sync_tri  (.clk(div_clk), .rst_n, .d(tri_en), .q(tri_s));

  phase_detector u_pd (
    .clk(div_clk), .rst_n, .fref(fref_s), .fdiv, .tes(tes_s), .tri_en(tri_s),
    .out1_n, .out2_n
  );

  test_control u_test (
    .clk(div_clk), .rst_n, .r2(ctrl.r2), .r3(ctrl.r3), .r6(ctrl.r6), .t(ctrl.t),
    .band(ctrl.band), .f62k5, .fref, .fdiv, .bb, .tes, .tri_en, .fby2
  );

endmodule
