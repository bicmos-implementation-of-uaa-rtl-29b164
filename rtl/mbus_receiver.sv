// M-Bus receiver: a receive-only slave on the two-wire (I2C-compatible)
// bus that carries tuning and control data into the synthesizer.
//
// A transfer is START, the chip address byte, then two or four data bytes,
// then STOP; every byte is followed by an acknowledge clock in which the
// receiver pulls SDA low. Data bytes come in pairs; the first bit of the
// first byte of a pair is the function bit: 0 for a frequency pair (FM,
// FL), 1 for a control/band pair (CO, BA). The bits of the data bytes are
// passed out one by one (dat with the strobe clo) to the 15-stage shift
// register, and when the second byte of a pair is complete dtf or dtb
// tells the latches to take the register. A third data byte without a
// fourth is never latched, and bytes after the fourth are not acknowledged
// and are ignored. Nothing is acknowledged or passed on unless the address
// byte was 11000010 (ava).
//
// Interface and timing: clk is the 4 MHz oscillator clock, which samples
// SCL and SDA through two-flop synchronizers, so SCL may run up to
// 100 kHz with ample margin. A data bit is taken at the rising edge of
// SCL; START and STOP are SDA edges while SCL is high. sda_pull (1 = pull
// SDA low) rises after the SCL falling edge that ends the eighth bit and
// falls after the falling edge of the acknowledge clock. clo, dtf and dtb
// are one-clock strobes.
//
// Byte layout, address, pairing, acknowledge points and the discarding of
// a third or fifth byte follow the design. The original counts SCL clocks
// with an asynchronous ripple counter clocked by SCL itself; sampling the
// bus with the oscillator clock and counting bits and bytes in binary is
// this model's choice, as is not acknowledging bytes after the fourth.
module mbus_receiver
  import uaa4802_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic scl,
  input  logic sda,
  output logic sda_pull,
  output logic ava,
  output logic dat,
  output logic clo,
  output logic dtf,
  output logic dtb
);

  logic       scl_s, sda_s, scl_d, sda_d;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic       active, seen_rise, func;
  logic [3:0] bitcnt;       // 0..7 data bits, 8 = acknowledge slot
  logic [2:0] bytecnt;      // 0 = address, 1..4 data, 5 = ignore
  logic [7:0] addr_sr;

  sync2 #(.RESET_VALUE(1'b1)) u_sync_scl (.clk, .rst_n, .d(scl), .q(scl_s));
  sync2 #(.RESET_VALUE(1'b1)) u_sync_sda (.clk, .rst_n, .d(sda), .q(sda_s));

  assign scl_rise = scl_s && !scl_d;
  assign scl_fall = !scl_s && scl_d;
  assign start_c  = scl_s && scl_d && sda_d && !sda_s;
  assign stop_c   = scl_s && scl_d && !sda_d && sda_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_d     <= 1'b1;
      sda_d     <= 1'b1;
      active    <= 1'b0;
      seen_rise <= 1'b0;
      func      <= 1'b0;
      bitcnt    <= '0;
      bytecnt   <= '0;
      addr_sr   <= '0;
      ava       <= 1'b0;
      sda_pull  <= 1'b0;
      dat       <= 1'b0;
      clo       <= 1'b0;
      dtf       <= 1'b0;
      dtb       <= 1'b0;
    end else begin
      scl_d <= scl_s;
      sda_d <= sda_s;
      clo   <= 1'b0;
      dtf   <= 1'b0;
      dtb   <= 1'b0;
      if (start_c) begin
        active    <= 1'b1;
        seen_rise <= 1'b0;
        bitcnt    <= '0;
        bytecnt   <= '0;
        ava       <= 1'b0;
        sda_pull  <= 1'b0;
      end else if (stop_c) begin
        active   <= 1'b0;
        sda_pull <= 1'b0;
      end else if (active && scl_rise) begin
        seen_rise <= 1'b1;
        if (bitcnt < 4'd8) begin
          addr_sr <= {addr_sr[6:0], sda_s};
          if (ava && bytecnt >= 3'd1 && bytecnt <= 3'd4) begin
            dat <= sda_s;
            clo <= 1'b1;
            if (bitcnt == 4'd0 && (bytecnt == 3'd1 || bytecnt == 3'd3))
              func <= sda_s;
          end
        end
      end else if (active && scl_fall && seen_rise) begin
        seen_rise <= 1'b0;
        if (bitcnt == 4'd7) begin
          bitcnt <= 4'd8;
          if (bytecnt == 3'd0) begin
            ava      <= (addr_sr == CHIP_ADDR);
            sda_pull <= (addr_sr == CHIP_ADDR);
          end else if (bytecnt <= 3'd4) begin
            sda_pull <= ava;
            if (ava && (bytecnt == 3'd2 || bytecnt == 3'd4)) begin
              dtf <= !func;
              dtb <= func;
            end
          end
        end else if (bitcnt == 4'd8) begin
          sda_pull <= 1'b0;
          bitcnt   <= '0;
          if (bytecnt != 3'd5) bytecnt <= bytecnt + 3'd1;
        end else begin
          bitcnt <= bitcnt + 4'd1;
        end
      end
    end
  end

endmodule
