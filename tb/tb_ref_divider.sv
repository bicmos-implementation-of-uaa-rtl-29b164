// Testbench for ref_divider: for each setting of R0,R1 it measures the
// oscillator clocks between rising edges of fref (2048, 1024, 512, 256),
// the high time (half the period) and the period of the 62.5 kHz tap (64
// clocks, independent of R0,R1).
module tb_ref_divider;
  logic clk = 1'b0, rst_n = 1'b0, r0 = 1'b0, r1 = 1'b0, fref, f62k5;
  int checks = 0, failures = 0;

  ref_divider dut (.clk, .rst_n, .r0, .r1, .fref, .f62k5);

  always #5 clk = !clk;

  longint cyc = 0, fr_rise[$], tap_rise[$], fr_fall[$];
  logic fref_d = 1'b0, tap_d = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (fref && !fref_d) fr_rise.push_back(cyc);
    if (!fref && fref_d) fr_fall.push_back(cyc);
    if (f62k5 && !tap_d) tap_rise.push_back(cyc);
    fref_d = fref;
    tap_d = f62k5;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit a0, input bit a1, input int ratio);
    r0 = a0; r1 = a1;
    repeat (3 * 2048) @(posedge clk);
    @(negedge clk);
    fr_rise.delete(); fr_fall.delete(); tap_rise.delete();
    repeat (4 * ratio + 10) @(posedge clk);
    @(negedge clk);
    check(fr_rise.size() >= 4, $sformatf("R0R1=%0d%0d only %0d edges", a0, a1, fr_rise.size()));
    for (int i = 1; i < fr_rise.size(); i++)
      check(fr_rise[i] - fr_rise[i-1] == ratio,
            $sformatf("R0R1=%0d%0d period %0d expected %0d", a0, a1, fr_rise[i] - fr_rise[i-1], ratio));
    foreach (fr_fall[i])
      foreach (fr_rise[j])
        if (fr_rise[j] < fr_fall[i] && fr_fall[i] - fr_rise[j] < ratio)
          check(fr_fall[i] - fr_rise[j] == ratio / 2, "fref duty cycle");
    for (int i = 1; i < tap_rise.size(); i++)
      check(tap_rise[i] - tap_rise[i-1] == 64, "62.5 kHz tap period");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0, 2048);
    run(1, 0, 1024);
    run(0, 1, 512);
    run(1, 1, 256);
    run(0, 0, 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
