// Testbench for prog_divider.
//
// For a list of division ratios (the range ends 8 and 32767, ratios just
// around each subsection boundary, ratios whose low bits are zero, which
// exercise the immediate D4 toggle after preload, and random ratios) it
// sets n, lets the divider settle for two division cycles and then checks
// over several cycles that
//   - PL_ECL comes exactly once every N clocks,
//   - fdiv rises exactly once every N clocks and is high for 7 clocks,
//   - fdiv falls on the clock right after PL_ECL.
// The expected values come from the ratio alone, not from the counter.
// A ratio change is applied the way latches B apply it, right after a
// PL_ECL clock. A watchdog ends the run if the divider stops.
module tb_prog_divider;
  import uaa4802_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NBITS-1:0] n;
  logic fdiv, pl_ecl;
  int checks = 0, failures = 0;

  prog_divider dut (.clk, .rst_n, .n, .fdiv, .pl_ecl);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Monitor: clock count and the times of PL_ECL clocks and fdiv edges.
  longint cyc = 0;
  longint t_pl[$], t_rise[$], t_fall[$];
  logic   fdiv_d = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (pl_ecl) t_pl.push_back(cyc);
    if (fdiv && !fdiv_d) t_rise.push_back(cyc);
    if (!fdiv && fdiv_d) t_fall.push_back(cyc);
    fdiv_d = fdiv;
  end

  task automatic wait_pl(input int k);
    repeat (k) begin
      do @(posedge clk); while (!pl_ecl);
    end
  endtask

  task automatic run_ratio(input int unsigned ratio, input int unsigned periods);
    wait_pl(1);
    n <= NBITS'(ratio);     // change just after a PL_ECL clock, as latches B do
    wait_pl(3);
    @(negedge clk);
    t_pl.delete(); t_rise.delete(); t_fall.delete();
    wait_pl(periods + 1);
    @(negedge clk);
    for (int i = 1; i < t_pl.size(); i++)
      check(t_pl[i] - t_pl[i-1] == longint'(ratio),
            $sformatf("N=%0d PL_ECL spacing %0d", ratio, t_pl[i] - t_pl[i-1]));
    for (int i = 1; i < t_rise.size(); i++)
      check(t_rise[i] - t_rise[i-1] == longint'(ratio),
            $sformatf("N=%0d fdiv rise spacing %0d", ratio, t_rise[i] - t_rise[i-1]));
    check(t_rise.size() >= int'(periods), $sformatf("N=%0d only %0d fdiv pulses", ratio, t_rise.size()));
    foreach (t_fall[i]) if (t_fall[i] > t_pl[0]) begin
      // fdiv (sampled before the edge) is seen low one clock after PL_ECL
      bit found = 0;
      foreach (t_pl[j]) if (t_fall[i] == t_pl[j] + 1) found = 1;
      check(found, $sformatf("N=%0d fdiv fall at %0d not after PL_ECL", ratio, t_fall[i]));
      foreach (t_rise[j])
        if (t_rise[j] < t_fall[i] && t_fall[i] - t_rise[j] < longint'(ratio))
          check(t_fall[i] - t_rise[j] == 7,
                $sformatf("N=%0d fdiv high for %0d clocks", ratio, t_fall[i] - t_rise[j]));
    end
  endtask

  int unsigned ratios[$] = '{8, 9, 15, 16, 17, 23, 24, 31, 32, 33, 63, 64, 65,
                             100, 255, 256, 257, 1023, 1024, 1025, 1032, 4096,
                             5000, 16384, 32767, 32760, 8};

  initial begin
    n = N_POWER_ON;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // Power-on ratio first.
    run_ratio(256, 3);
    foreach (ratios[i]) run_ratio(ratios[i], (ratios[i] > 4000) ? 2 : 4);
    for (int i = 0; i < 12; i++) run_ratio(8 + ($urandom % 32760), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
