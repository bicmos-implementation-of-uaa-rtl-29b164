// Test control: test-pin multiplexer and phase detector test inputs.
//
// Two of the band buffer outputs (pin 10 on BB5, pin 11 on BB6) can show
// internal signals, selected by the control bits R2 and R3:
//   R2 R3 = 01: pin 10 = 62.5 kHz tap of the reference divider
//   R2 R3 = 10: pin 10 = FREF, pin 11 = FBY2 (divider output divided by 2)
//   otherwise  the pins are ordinary band outputs.
// The phase detector test inputs are TRI = T and TES = (not R2) and R6.
// FBY2 is a toggle flip-flop on each rising edge of the divider output.
//
// Interface: clk is the divider clock (fdiv is synchronous to it), rst_n
// an asynchronous active-low reset for the FBY2 flip-flop; bb is the
// logic drive of band buffers BB1..BB8 (1 = buffer on, pin low). The
// selection table, the TES/TRI equations and FBY2 follow the design; the
// assignment of pins 10 and 11 to BB5 and BB6 is this model's reading.
module test_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       r2,
  input  logic       r3,
  input  logic       r6,
  input  logic       t,
  input  logic [7:0] band,
  input  logic       f62k5,
  input  logic       fref,
  input  logic       fdiv,
  output logic [7:0] bb,
  output logic       tes,
  output logic       tri_en,
  output logic       fby2
);

  logic fdiv_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fdiv_d <= 1'b0;
      fby2   <= 1'b0;
    end else begin
      fdiv_d <= fdiv;
      if (fdiv && !fdiv_d) fby2 <= !fby2;
    end
  end

  always_comb begin
    bb = band;
    unique case ({r2, r3})
      2'b01:   bb[4] = f62k5;
      2'b10: begin
        bb[4] = fref;
        bb[5] = fby2;
      end
      default: ;
    endcase
    tes    = !r2 && r6;
    tri_en = t;
  end

endmodule
