// Testbench for latch_b: latches A are written at random times in their
// own (slower) clock domain; the testbench checks that n keeps N = 256
// until a tdi strobe, changes only on the clock after a tdi strobe, then
// always to the value latches A hold, and that it takes a new value at the
// first tdi after the write has had time to cross (three divider clocks).
module tb_latch_b;
  import uaa4802_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tdi = 1'b0;
  logic aclk = 1'b0;
  logic [NBITS-1:0] freq_a = 15'd256, n;
  logic a_toggle = 1'b0;
  int checks = 0, failures = 0;

  latch_b dut (.clk, .rst_n, .freq_a, .a_toggle, .tdi, .n);

  always #5 clk = !clk;
  always #37 aclk = !aclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // tdi every 23 divider clocks
  int cnt = 0;
  always @(posedge clk) begin
    cnt <= (cnt == 22) ? 0 : cnt + 1;
    tdi <= (cnt == 22);
  end

  // checker
  logic [NBITS-1:0] n_d;
  logic tdi_d;
  int updates = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && n != n_d) begin
      check(tdi_d, "n changed without a tdi strobe");
      check(n == freq_a, "n differs from latches A");
      updates++;
    end
    n_d = n;
    tdi_d = tdi;
  end

  initial begin
    n_d = N_POWER_ON;
    repeat (3) @(posedge clk);
    check(n == 15'd256, "power-on N");
    rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      logic [NBITS-1:0] v;
      v = 15'($urandom) | 15'd8;
      @(posedge aclk);
      freq_a <= v;
      a_toggle <= !a_toggle;
      // wait for the transfer: at most one tdi period plus the sync delay
      repeat (2 * 23 + 4) @(posedge clk);
      #2;
      check(n == v, $sformatf("write %0d: n=%h expected %h", k, n, v));
      repeat ($urandom % 40) @(posedge clk);
    end
    check(updates >= 25, $sformatf("only %0d updates", updates));
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
