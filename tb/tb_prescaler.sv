// Testbench for prescaler: counts RF clocks between rising edges of the
// output (must be 8) and checks the 50 % duty cycle (4 clocks high), and
// that the output stays low while the prescaler is held off.
module tb_prescaler;
  logic clk = 1'b0, rst_n = 1'b0, fout;
  int checks = 0, failures = 0;

  prescaler dut (.clk, .rst_n, .fout);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int c, hi;
    logic prev;
    repeat (20) begin
      @(posedge clk); #1;
      check(!fout, "output low while held off");
    end
    rst_n = 1'b1;
    // wait for the first rising edge
    do begin
      prev = fout;
      @(posedge clk); #1;
    end while (!(fout && !prev));
    for (int k = 0; k < 50; k++) begin
      c = 0; hi = 0;
      do begin
        prev = fout;
        @(posedge clk); #1;
        c++;
        if (fout) hi++;
      end while (!(fout && !prev));
      check(c == 8, $sformatf("period %0d", c));
      check(hi == 4, $sformatf("high clocks %0d", hi));
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
