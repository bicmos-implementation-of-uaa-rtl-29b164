// Testbench for shift_latches: checks the power-on values (N = 256,
// control all zero), then shifts random 16-bit byte pairs in bit by bit
// and, after dtf or dtb, compares latches A or the control latches with
// the low 15 bits of the pair; the other latch group must keep its value
// and a_toggle must change only on a frequency write.
module tb_shift_latches;
  import uaa4802_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, dat = 1'b0, clo = 1'b0, dtf = 1'b0, dtb = 1'b0;
  logic [NBITS-1:0] freq_a;
  ctrl_t ctrl;
  logic a_toggle;
  int checks = 0, failures = 0;

  shift_latches dut (.clk, .rst_n, .dat, .clo, .dtf, .dtb, .freq_a, .ctrl, .a_toggle);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic shift_pair(input logic [15:0] v);
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk);
      dat = v[i]; clo = 1'b1;
      @(negedge clk);
      clo = 1'b0;
      repeat (2) @(negedge clk);
    end
  endtask

  initial begin
    logic [14:0] exp_f, exp_c;
    logic tog;
    repeat (3) @(posedge clk);
    check(freq_a == 15'd256, $sformatf("power-on N %0d", freq_a));
    check(ctrl == '0, "power-on control");
    rst_n = 1'b1;
    exp_f = 15'd256; exp_c = '0;
    for (int k = 0; k < 40; k++) begin
      logic [15:0] v;
      bit is_f;
      v = 16'($urandom);
      is_f = !v[15];
      tog = a_toggle;
      shift_pair(v);
      @(negedge clk);
      if (is_f) dtf = 1'b1; else dtb = 1'b1;
      @(negedge clk);
      dtf = 1'b0; dtb = 1'b0;
      if (is_f) exp_f = v[14:0]; else exp_c = v[14:0];
      check(freq_a == exp_f, $sformatf("latches A %h expected %h", freq_a, exp_f));
      check(ctrl == exp_c, $sformatf("control %h expected %h", ctrl, exp_c));
      check(a_toggle == (tog ^ is_f), "a_toggle");
    end
    // field placement of the control word: 1 R6 T P R3 R2 R1 R0 / P7..P0
    shift_pair(16'b1_1000000_1000_0001);
    @(negedge clk); dtb = 1'b1; @(negedge clk); dtb = 1'b0;
    check(ctrl.r6 && !ctrl.t && !ctrl.p && ctrl.band == 8'h81, "R6 and band field placement");
    shift_pair(16'b1_0010001_0000_0000);
    @(negedge clk); dtb = 1'b1; @(negedge clk); dtb = 1'b0;
    check(ctrl.p && ctrl.r0 && !ctrl.r1 && !ctrl.r6, "P and R0 field placement");
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
