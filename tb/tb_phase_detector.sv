// Testbench for phase_detector.
//
// The testbench generates fref and fdiv as square waves synchronous to the
// sampling clock, with chosen periods and a chosen offset between them, and
// measures, per reference period, how many clocks each active-low output is
// low. Expected values follow from the detector's definition:
//   equal frequency, fref leading by d: OUT1 low d clocks, OUT2 low only
//     for the alive-zone pulse (ALIVE clocks);
//   equal frequency, fref lagging by d: OUT1 never low, OUT2 low d+ALIVE;
//   zero phase error: only the alive-zone pulse on OUT2;
//   fref slower than fdiv: OUT1 never low, OUT2 pulsed;
//   fref faster than fdiv: OUT1 pulsed, OUT2 only alive pulses;
//   test states TES,TRI = 01, 10, 11: outputs forced as in the state table.
module tb_phase_detector;
  localparam int ALIVE = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fref = 1'b0, fdiv = 1'b0, tes = 1'b0, tri_en = 1'b0;
  logic out1_n, out2_n;
  int checks = 0, failures = 0;

  phase_detector #(.ALIVE_CYCLES(ALIVE)) dut (.clk, .rst_n, .fref, .fdiv, .tes, .tri_en, .out1_n, .out2_n);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Runs the two waveforms for `cycles` clocks; returns clocks with each
  // output low and the number of separate low pulses of each.
  task automatic run(input int pref, input int pdiv, input int off, input int cycles,
                     output int low1, output int low2, output int pulses1, output int pulses2);
    int cr, cd;
    logic p1, p2;
    cr = 0; cd = -off; low1 = 0; low2 = 0; pulses1 = 0; pulses2 = 0;
    p1 = 1'b1; p2 = 1'b1;
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      fref = (cr % pref) < pref / 2 && cr >= 0;
      fdiv = (cd >= 0) && ((cd % pdiv) < pdiv / 2);
      cr++; cd++;
      @(posedge clk); #1;
      if (!out1_n) low1++;
      if (!out2_n) low2++;
      if (!out1_n && p1) pulses1++;
      if (!out2_n && p2) pulses2++;
      p1 = out1_n; p2 = out2_n;
    end
  endtask

  task automatic settle();
    @(negedge clk);
    fref = 1'b0; fdiv = 1'b0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int l1, l2, n1, n2;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    settle();

    // fref leads fdiv by 5 clocks, period 40, 10 periods
    run(40, 40, 5, 400, l1, l2, n1, n2);
    check(l1 == 10 * 5, $sformatf("lead: OUT1 low %0d", l1));
    check(n1 == 10, $sformatf("lead: OUT1 pulses %0d", n1));
    check(l2 == 10 * ALIVE && n2 == 10, $sformatf("lead: OUT2 low %0d in %0d pulses", l2, n2));
    settle();

    // fref lags fdiv by 7 clocks
    run(40, 40, -7, 400, l1, l2, n1, n2);
    check(l1 == 0, $sformatf("lag: OUT1 low %0d", l1));
    // the window can end inside one DOWN pulse
    check(n2 >= 10 && n2 <= 11 && l2 >= 10 * (7 + ALIVE) && l2 < n2 * (7 + ALIVE),
          $sformatf("lag: OUT2 low %0d in %0d pulses", l2, n2));
    settle();

    // in phase: alive-zone pulses only
    run(40, 40, 0, 400, l1, l2, n1, n2);
    check(l1 == 0, $sformatf("in phase: OUT1 low %0d", l1));
    check(l2 == 10 * ALIVE && n2 == 10, $sformatf("in phase: OUT2 low %0d in %0d pulses", l2, n2));
    settle();

    // fref slower than fdiv
    run(64, 40, 0, 1280, l1, l2, n1, n2);
    check(l1 == 0, $sformatf("fref<fdiv: OUT1 low %0d", l1));
    check(l2 > 1280 / 4, $sformatf("fref<fdiv: OUT2 low only %0d", l2));
    settle();

    // fref faster than fdiv
    run(40, 64, 0, 1280, l1, l2, n1, n2);
    check(l1 > 1280 / 4, $sformatf("fref>fdiv: OUT1 low only %0d", l1));
    check(l2 == n2 * ALIVE, $sformatf("fref>fdiv: OUT2 low %0d in %0d pulses", l2, n2));
    settle();

    // test states
    tes = 1'b0; tri_en = 1'b1;
    run(40, 64, 0, 200, l1, l2, n1, n2);
    check(l1 == 0 && l2 == 0, "TES,TRI=01: both outputs off");
    tes = 1'b1; tri_en = 1'b0;
    run(40, 64, 0, 200, l1, l2, n1, n2);
    check(l1 == 0 && l2 == 200, "TES,TRI=10: OUT2 low only");
    tes = 1'b1; tri_en = 1'b1;
    run(64, 40, 0, 200, l1, l2, n1, n2);
    check(l1 == 200 && l2 == 0, "TES,TRI=11: OUT1 low only");
    tes = 1'b0; tri_en = 1'b0;
    settle();
    run(40, 40, 5, 400, l1, l2, n1, n2);
    check(l1 == 10 * 5, $sformatf("back to normal: OUT1 low %0d", l1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
