// End-to-end testbench for uaa4802_top, with the top at its defaults.
//
// The testbench plays the tuner around the chip: a 4 MHz oscillator
// (period 5000 time units), the amplified VCO signal on rf_clk (period 20,
// so the prescaler output runs at 1/8 of it), a separate low-frequency
// input on rf2_clk (period 60), and an M-Bus master whose SCL half period
// is 20 oscillator periods, the 100 kHz / 4 MHz ratio of the real part.
// It checks, against periods worked out from the register values alone:
//   1. power-on: N = 256 and reference ratio 2048;
//   2. a control/band write (CA CO BA): reference ratio 256, band buffer
//      outputs equal to the band byte;
//   3. a frequency write (CA FM FL) of N = 8000: the divider output period
//      becomes 8 * N rf periods after the double-latch transfer, which is
//      exactly one reference period. The loop is then closed through a
//      behavioural VCO, and once the phase has settled only short pulses
//      (the alive zone and its balancing UP pulse) may remain;
//   4. N = 7000 (VCO too fast: DOWN pulses only) and N = 9000 (VCO too
//      slow: UP pulses only), sent as four-byte transfers in both orders;
//   5. prescaler bypass (P = 1): the divider counts rf2_clk directly;
//   6. a transfer to a foreign address, which must change nothing;
//   7. the test pins (62.5 kHz, FREF, FBY2), reference ratios 1024 and
//      512, and the phase detector test states selected by R2, R3, R6, T.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_uaa4802_top;

  localparam int TOSC = 5000;
  localparam int TRF  = 20;
  localparam int TRF2 = 60;

  logic rst_n = 1'b1, rf_clk = 1'b0, rf2_clk = 1'b0, osc_clk = 1'b0;
  logic scl, sda_o, sda_line, sda_pull, out1_n, out2_n, prescaler_on, fdiv, fref;
  logic [7:0] bb;
  logic pin10, pin11;
  always_comb pin10 = bb[4];
  always_comb pin11 = bb[5];
  int checks = 0, failures = 0;

  assign sda_line = sda_o && !sda_pull;

  uaa4802_top dut (
    .rst_n, .rf_clk, .rf2_clk, .osc_clk, .scl, .sda(sda_line), .sda_pull,
    .out1_n, .out2_n, .bb, .prescaler_on, .fdiv, .fref
  );

  mbus_master #(.HALF(100000)) u_m (.scl, .sda_o, .sda(sda_line));

  always #(TOSC / 2) osc_clk = !osc_clk;
  // The VCO. With loop_closed set it is steered by the detector outputs
  // like a first-order phase loop: every divider clock spent with OUT2
  // (DOWN) low retards the next rf edge by KPD time units, every one with
  // OUT1 (UP) low advances it. The loop settles where the UP pulse balances
  // the alive-zone pulse, i.e. with fdiv in phase with fref.
  localparam int KPD = 40;
  bit loop_closed = 0;
  int pend = 0;
  always @(posedge dut.div_clk)
    if (loop_closed) begin
      if (!out2_n) pend += KPD;
      if (!out1_n) pend -= KPD;
    end
  always begin
    int d;
    #(TRF / 2) rf_clk = 1'b1;
    d = pend;
    if (d < 1 - TRF / 2) d = 1 - TRF / 2;
    pend -= d;
    #(TRF / 2 + d) rf_clk = 1'b0;
  end
  always #(TRF2 / 2) rf2_clk = !rf2_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters
  int n_ack = 0, n_nack = 0, n_dtf = 0, n_dtb = 0, n_nupdate = 0;
  int n_up = 0, n_down = 0, n_alive_only = 0, n_bypass = 0, n_refratio = 0;
  int n_tristate = 0, n_upper = 0, n_lower = 0, n_tap = 0, n_fby2 = 0;

  always @(posedge osc_clk) begin
    if (dut.dtf) n_dtf++;
    if (dut.dtb) n_dtb++;
  end
  logic [14:0] n_prev = 15'd256;
  always @(posedge dut.div_clk) begin
    if (dut.n != n_prev) n_nupdate++;
    n_prev = dut.n;
  end

  // ---- period measurement of a signal, in time units
  task automatic period_of(ref logic sig, input int count, output longint per, output bit stable);
    longint t0, t1, first;
    stable = 1;
    @(posedge sig);
    t0 = $time;
    first = -1;
    for (int i = 0; i < count; i++) begin
      @(posedge sig);
      t1 = $time;
      if (first < 0) first = t1 - t0;
      else if (t1 - t0 != first) stable = 0;
      t0 = t1;
    end
    per = first;
  endtask

  // ---- low-pulse statistics of the detector outputs over a time span
  longint uplen_max;
  task automatic pd_stats(input longint span, output int up_pulses, output int dn_pulses,
                          output longint dn_max);
    longint t_end, t_dn;
    logic p1, p2;
    longint t_up;
    up_pulses = 0; dn_pulses = 0; dn_max = 0; uplen_max = 0; t_up = 0;
    p1 = out1_n; p2 = out2_n;
    t_end = $time + span;
    t_dn = 0;
    while ($time < t_end) begin
      @(posedge dut.div_clk); #0;
      if (!out1_n && p1) begin up_pulses++; t_up = $time; end
      if (out1_n && !p1 && $time - t_up > uplen_max) uplen_max = $time - t_up;
      if (!out2_n && p2) begin dn_pulses++; t_dn = $time; end
      if (out2_n && !p2 && $time - t_dn > dn_max) dn_max = $time - t_dn;
      p1 = out1_n; p2 = out2_n;
    end
  endtask

  task automatic xfer(input logic [7:0] bytes[$], input bit expect_ack);
    bit ack;
    u_m.start();
    foreach (bytes[i]) begin
      u_m.send_byte(bytes[i], ack);
      if (ack) n_ack++; else n_nack++;
      check(ack == expect_ack, $sformatf("byte %0d (%h): ack %0d", i, bytes[i], ack));
    end
    u_m.stop();
  endtask

  function automatic logic [7:0] co_byte(bit r6, bit t, bit p, bit r3, bit r2, bit r1, bit r0);
    return {1'b1, r6, t, p, r3, r2, r1, r0};
  endfunction

  initial begin
    longint per;
    bit st;
    int up, dn;
    longint dnmax;

    #1 rst_n = 1'b0;
    #(3 * TOSC);
    rst_n = 1'b1;

    // 1. power-on values
    period_of(fdiv, 3, per, st);
    check(per == 8 * 256 * TRF && st, $sformatf("power-on fdiv period %0d", per));
    period_of(fref, 2, per, st);
    check(per == 2048 * TOSC && st, $sformatf("power-on fref period %0d", per));
    check(prescaler_on, "prescaler in use at power-on");

    // 2. control and band: R0 = R1 = 1 (ratio 256), band 0x5A
    xfer('{8'hC2, co_byte(0, 0, 0, 0, 0, 1, 1), 8'h5A}, 1);
    period_of(fref, 3, per, st);
    check(per == 256 * TOSC && st, $sformatf("fref period %0d at ratio 256", per));
    if (per == 256 * TOSC) n_refratio++;
    check(bb == 8'h5A, $sformatf("band outputs %h", bb));

    // 3. N = 8000: fdiv period equals the reference period
    xfer('{8'hC2, {1'b0, 7'(8000 >> 8)}, 8'(8000)}, 1);
    repeat (3) @(posedge fdiv);
    period_of(fdiv, 3, per, st);
    check(per == 8 * 8000 * TRF && st, $sformatf("fdiv period %0d at N=8000", per));
    check(dut.n == 15'd8000, "latches B hold 8000");
    // close the loop and let the phase settle
    loop_closed = 1;
    #(64'd60 * 256 * TOSC);
    pd_stats(6 * 256 * TOSC, up, dn, dnmax);
    check(dn >= 5 && dnmax <= 4 * 8 * TRF, $sformatf("locked: %0d DOWN pulses, longest %0d", dn, dnmax));
    check(uplen_max <= 4 * 8 * TRF, $sformatf("locked: longest UP pulse %0d", uplen_max));
    if (dn >= 5 && dnmax <= 4 * 8 * TRF && uplen_max <= 4 * 8 * TRF) n_alive_only++;
    loop_closed = 0;
    pend = 0;

    // 4a. N = 7000 with a four-byte transfer (control first): VCO too fast
    xfer('{8'hC2, co_byte(0, 0, 0, 0, 0, 1, 1), 8'h5A, {1'b0, 7'(7000 >> 8)}, 8'(7000)}, 1);
    repeat (3) @(posedge fdiv);
    period_of(fdiv, 2, per, st);
    check(per == 8 * 7000 * TRF && st, $sformatf("fdiv period %0d at N=7000", per));
    pd_stats(8 * 256 * TOSC, up, dn, dnmax);
    check(up == 0 && dn > 0 && dnmax > 8 * 8 * TRF, $sformatf("N=7000: UP %0d DOWN %0d longest %0d", up, dn, dnmax));
    if (up == 0 && dnmax > 8 * 8 * TRF) n_down++;

    // 4b. N = 9000 with a four-byte transfer (frequency first): VCO too slow
    xfer('{8'hC2, {1'b0, 7'(9000 >> 8)}, 8'(9000), co_byte(0, 0, 0, 0, 0, 1, 1), 8'h5A}, 1);
    repeat (3) @(posedge fdiv);
    period_of(fdiv, 2, per, st);
    check(per == 8 * 9000 * TRF && st, $sformatf("fdiv period %0d at N=9000", per));
    pd_stats(8 * 256 * TOSC, up, dn, dnmax);
    check(up > 0 && dnmax <= 4 * 8 * TRF, $sformatf("N=9000: UP %0d DOWN longest %0d", up, dnmax));
    if (up > 0) n_up++;

    // 5. prescaler bypass: P = 1, N = 1000 on rf2_clk
    xfer('{8'hC2, co_byte(0, 0, 1, 0, 0, 1, 1), 8'h5A, {1'b0, 7'(1000 >> 8)}, 8'(1000)}, 1);
    check(!prescaler_on, "prescaler switched off");
    repeat (3) @(posedge fdiv);
    period_of(fdiv, 3, per, st);
    check(per == 1000 * TRF2 && st, $sformatf("bypass fdiv period %0d", per));
    if (per == 1000 * TRF2) n_bypass++;
    // and back to the prescaler
    xfer('{8'hC2, co_byte(0, 0, 0, 0, 0, 1, 1), 8'h5A, {1'b0, 7'(8000 >> 8)}, 8'(8000)}, 1);
    repeat (3) @(posedge fdiv);
    period_of(fdiv, 2, per, st);
    check(per == 8 * 8000 * TRF && st, $sformatf("fdiv period %0d back on prescaler", per));

    // 6. foreign address: nothing changes
    xfer('{8'hC4, {1'b0, 7'(100 >> 8)}, 8'(100)}, 0);
    repeat (3) @(posedge fdiv);
    period_of(fdiv, 2, per, st);
    check(per == 8 * 8000 * TRF, "foreign address left N alone");

    // 7a. test pin 10 = 62.5 kHz (R2R3 = 01), ratio 1024 (R0 = 1)
    xfer('{8'hC2, co_byte(0, 0, 0, 1, 0, 0, 1), 8'h00}, 1);
    period_of(pin10, 3, per, st);
    check(per == 64 * TOSC && st, $sformatf("pin 10 62.5 kHz period %0d", per));
    if (per == 64 * TOSC) n_tap++;
    period_of(fref, 2, per, st);
    check(per == 1024 * TOSC, $sformatf("fref period %0d at ratio 1024", per));
    if (per == 1024 * TOSC) n_refratio++;
    // 7b. pin 10 = FREF, pin 11 = FBY2 (R2R3 = 10), ratio 512 (R1 = 1)
    xfer('{8'hC2, co_byte(0, 0, 0, 0, 1, 1, 0), 8'h00}, 1);
    period_of(pin10, 2, per, st);
    check(per == 512 * TOSC, $sformatf("pin 10 FREF period %0d", per));
    if (per == 512 * TOSC) n_refratio++;
    period_of(pin11, 2, per, st);
    check(per == 2 * 8 * 8000 * TRF && st, $sformatf("pin 11 FBY2 period %0d", per));
    if (per == 2 * 8 * 8000 * TRF) n_fby2++;
    // 7c. detector test states: T = 1 (tristate), R6 = 1 (upper), R6 = T = 1 (lower)
    xfer('{8'hC2, co_byte(0, 1, 0, 0, 0, 1, 1), 8'h00}, 1);
    #(4 * TOSC);
    pd_stats(4 * 256 * TOSC, up, dn, dnmax);
    check(up == 0 && dn == 0 && out1_n && out2_n, "tristate: both outputs off");
    if (up == 0 && dn == 0) n_tristate++;
    xfer('{8'hC2, co_byte(1, 0, 0, 0, 0, 1, 1), 8'h00}, 1);
    #(4 * TOSC);
    check(out1_n && !out2_n, "upper source only");
    if (out1_n && !out2_n) n_upper++;
    xfer('{8'hC2, co_byte(1, 1, 0, 0, 0, 1, 1), 8'h00}, 1);
    #(4 * TOSC);
    check(!out1_n && out2_n, "lower source only");
    if (!out1_n && out2_n) n_lower++;
    // R2 = 1 overrides R6: back to normal
    xfer('{8'hC2, co_byte(1, 0, 0, 0, 1, 1, 1), 8'h00}, 1);
    #(4 * TOSC);
    pd_stats(6 * 256 * TOSC, up, dn, dnmax);
    check(dn >= 5, "R2 = 1: detector back in normal operation");

    // ---- every mechanism must have happened
    $display("mechanisms: ack=%0d nack=%0d dtf=%0d dtb=%0d latchB=%0d up=%0d down=%0d alive=%0d",
             n_ack, n_nack, n_dtf, n_dtb, n_nupdate, n_up, n_down, n_alive_only);
    $display("            bypass=%0d refratio=%0d tap=%0d fby2=%0d tristate=%0d upper=%0d lower=%0d",
             n_bypass, n_refratio, n_tap, n_fby2, n_tristate, n_upper, n_lower);
    check(n_ack > 0, "acknowledge never seen");
    check(n_nack > 0, "foreign address never refused");
    check(n_dtf > 0, "no frequency pair latched");
    check(n_dtb > 0, "no control pair latched");
    check(n_nupdate >= 5, "latches B transfer too rare");
    check(n_up > 0, "UP correction never seen");
    check(n_down > 0, "DOWN correction never seen");
    check(n_alive_only > 0, "alive-zone-only state never seen");
    check(n_bypass > 0, "prescaler bypass never used");
    check(n_refratio >= 3, "reference ratio switch not exercised");
    check(n_tap > 0 && n_fby2 > 0, "test pins not exercised");
    check(n_tristate > 0 && n_upper > 0 && n_lower > 0, "detector test states not exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd4_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
