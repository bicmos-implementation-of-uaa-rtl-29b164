// Phase/frequency detector (type 4) with alive zone and test states.
//
// Two state bits remember which of the two inputs has shown a rising edge
// first: a reference edge sets UP, a divider edge sets DOWN, and once both
// are set both are cleared. The output that is set for longer drives the
// charge pump, so the average correction is proportional to the phase
// error and, when the frequencies differ, only one output is ever pulsed:
// the detector is frequency sensitive and independent of duty cycle.
// Every time the pair is cleared, DOWN is held for ALIVE_CYCLES more
// clocks: this is the alive zone, a small pulse on OUT2 in every cycle
// that keeps the loop out of the dead zone near zero phase error.
//
// Outputs are active low like the originals: out1_n (UP latch, OUT1) low
// makes the charge pump sink current, out2_n (DOWN latch, OUT2) low makes
// it source current; both high is the high-impedance state. tes and tri
// force test states: 00 normal, 01 both off (tristate), 10 OUT2 low only
// (upper source), 11 OUT1 low only (lower source).
//
// Timing: clk samples fref and fdiv, which must already be synchronous to
// it; an edge is seen one clock after it is sampled, and the outputs are
// registered, so a pulse width is the edge separation in clocks. The
// detector behaviour, the alive-zone pulse on OUT2 and the test table
// follow the design. That it is sampled by a clock (the original is an
// asynchronous gate network) and the alive-zone length in clocks (the
// original is a 12-inverter delay chain of about 10 ns) are this model's
// choices.
module phase_detector #(
  parameter int unsigned ALIVE_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fref,
  input  logic fdiv,
  input  logic tes,
  input  logic tri_en,
  output logic out1_n,
  output logic out2_n
);

  localparam int unsigned AW = $clog2(ALIVE_CYCLES + 1);

  logic          fref_d, fdiv_d;
  logic          up_q, dn_q;
  logic [AW-1:0] alive;
  logic          up_set, dn_set;

  assign up_set = (fref && !fref_d) || up_q;
  assign dn_set = (fdiv && !fdiv_d) || dn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fref_d <= 1'b0;
      fdiv_d <= 1'b0;
      up_q   <= 1'b0;
      dn_q   <= 1'b0;
      alive  <= '0;
    end else begin
      fref_d <= fref;
      fdiv_d <= fdiv;
      if (up_set && dn_set) begin
        up_q  <= 1'b0;
        dn_q  <= 1'b0;
        alive <= AW'(ALIVE_CYCLES);
      end else begin
        up_q  <= up_set;
        dn_q  <= dn_set;
        if (alive != '0) alive <= alive - 1'b1;
      end
    end
  end

  always_comb begin
    unique case ({tes, tri_en})
      2'b00: begin out1_n = !up_q; out2_n = !(dn_q || (alive != '0)); end
      2'b01: begin out1_n = 1'b1;  out2_n = 1'b1;  end
      2'b10: begin out1_n = 1'b1;  out2_n = 1'b0;  end
      default: begin out1_n = 1'b0; out2_n = 1'b1; end
    endcase
  end

endmodule
