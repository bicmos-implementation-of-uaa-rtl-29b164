// Testbench for mbus_receiver.
//
// A behavioural bus master sends the transfer types of the bus protocol
// (control/band pair, frequency pair, both pairs in either order), a
// transfer to a foreign address, a transfer with three data bytes and one
// with five. The testbench rebuilds the 15-bit words from the dat/clo
// stream itself and checks: acknowledge after the address and after each
// of the first four data bytes (and none for a foreign address or a fifth
// byte), that dtf or dtb fires once per complete pair with the right
// function bit, that the word shifted in before the strobe is the pair
// without its function bit, and that an odd third byte is not latched.
module tb_mbus_receiver;
  import uaa4802_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scl, sda_o, sda_line, sda_pull, ava, dat, clo, dtf, dtb;
  int checks = 0, failures = 0;

  assign sda_line = sda_o && !sda_pull;

  mbus_receiver dut (.clk, .rst_n, .scl, .sda(sda_line), .sda_pull, .ava, .dat, .clo, .dtf, .dtb);
  mbus_master #(.HALF(200)) u_m (.scl, .sda_o, .sda(sda_line));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference shift register and strobe log.
  logic [14:0] sr = '0;
  int n_dtf = 0, n_dtb = 0;
  logic [14:0] last_word;
  always @(posedge clk) begin
    if (dtf) begin n_dtf++; last_word = sr; end
    if (dtb) begin n_dtb++; last_word = sr; end
    if (clo) sr = {sr[13:0], dat};
  end

  task automatic xfer(input logic [7:0] bytes[$], input bit exp_ack[$]);
    bit ack;
    u_m.start();
    foreach (bytes[i]) begin
      u_m.send_byte(bytes[i], ack);
      check(ack == exp_ack[i], $sformatf("byte %0d ack=%0d expected %0d", i, ack, exp_ack[i]));
    end
    u_m.stop();
    repeat (20) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    // CA CO BA: control pair, function bit 1
    n_dtf = 0; n_dtb = 0;
    xfer('{8'hC2, 8'b1_1010101, 8'hA5}, '{1, 1, 1});
    check(n_dtb == 1 && n_dtf == 0, "control pair: one dtb");
    check(last_word == 15'b1010101_10100101, $sformatf("control word %h", last_word));

    // CA FM FL: frequency pair, function bit 0, N = 0x1234
    n_dtf = 0; n_dtb = 0;
    xfer('{8'hC2, 8'h12, 8'h34}, '{1, 1, 1});
    check(n_dtf == 1 && n_dtb == 0, "frequency pair: one dtf");
    check(last_word == 15'h1234, $sformatf("frequency word %h", last_word));

    // CA CO BA FM FL
    n_dtf = 0; n_dtb = 0;
    xfer('{8'hC2, 8'hFF, 8'h0F, 8'h55, 8'h55}, '{1, 1, 1, 1, 1});
    check(n_dtf == 1 && n_dtb == 1, "four data bytes: dtb and dtf");
    check(last_word == 15'h5555, $sformatf("second pair word %h", last_word));

    // CA FM FL CO BA
    n_dtf = 0; n_dtb = 0;
    xfer('{8'hC2, 8'h7F, 8'hFF, 8'h80, 8'h01}, '{1, 1, 1, 1, 1});
    check(n_dtf == 1 && n_dtb == 1, "frequency then control");
    check(last_word == 15'h0001, $sformatf("control word %h", last_word));

    // foreign address: no acknowledge, nothing passed on
    n_dtf = 0; n_dtb = 0;
    xfer('{8'hC0, 8'h12, 8'h34}, '{0, 0, 0});
    check(n_dtf == 0 && n_dtb == 0 && !ava, "foreign address ignored");

    // three data bytes: third one discarded
    n_dtf = 0; n_dtb = 0;
    xfer('{8'hC2, 8'h01, 8'h00, 8'h80}, '{1, 1, 1, 1});
    check(n_dtf == 1 && n_dtb == 0, "three data bytes: one pair latched");
    check(last_word == 15'h0100, $sformatf("three bytes word %h", last_word));

    // five data bytes: fifth not acknowledged, ignored
    n_dtf = 0; n_dtb = 0;
    xfer('{8'hC2, 8'h01, 8'h00, 8'h81, 8'h00, 8'hFF}, '{1, 1, 1, 1, 1, 0});
    check(n_dtf == 1 && n_dtb == 1, "five data bytes: two pairs");
    check(last_word == 15'h0100, $sformatf("five bytes word %h", last_word));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
