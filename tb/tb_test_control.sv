// Testbench for test_control: for every combination of R2, R3 the band
// outputs BB5/BB6 must carry the band bits or the selected test signals
// (62.5 kHz, FREF, FBY2); for every combination of R2, R6, T the TES/TRI
// outputs must follow TES = (not R2) and R6, TRI = T; FBY2 must toggle
// once per rising edge of fdiv.
module tb_test_control;
  logic clk = 1'b0, rst_n = 1'b0;
  logic r2, r3, r6, t, f62k5, fref, fdiv = 1'b0;
  logic [7:0] band, bb;
  logic tes, tri_en, fby2;
  int checks = 0, failures = 0;

  test_control dut (.clk, .rst_n, .r2, .r3, .r6, .t, .band, .f62k5, .fref, .fdiv, .bb, .tes, .tri_en, .fby2);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] exp_bb;
    logic f0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      {r2, r3, r6, t, f62k5, fref} = 6'($urandom);
      band = 8'($urandom);
      #1;
      exp_bb = band;
      if (!r2 && r3) exp_bb[4] = f62k5;
      if (r2 && !r3) begin exp_bb[4] = fref; exp_bb[5] = fby2; end
      check(bb == exp_bb, $sformatf("bb %b expected %b (R2R3=%b%b)", bb, exp_bb, r2, r3));
      check(tes == (!r2 && r6), "TES");
      check(tri_en == t, "TRI");
    end
    // FBY2: one toggle per fdiv rising edge
    f0 = fby2;
    for (int k = 1; k <= 10; k++) begin
      @(negedge clk); fdiv = 1'b1;
      repeat (3) @(negedge clk);
      fdiv = 1'b0;
      repeat (4) @(negedge clk);
      check(fby2 == (f0 ^ k[0]), $sformatf("FBY2 after %0d pulses", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
