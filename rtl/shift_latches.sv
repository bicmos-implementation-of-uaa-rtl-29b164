// Shift register and first-rank latches for the M-Bus data.
//
// A 15-stage shift register takes each data bit the bus receiver passes
// on (dat, strobed by clo), first bit first, so after the 16 bits of a byte
// pair it holds the pair without its function bit, the first data bit in
// the top stage. dtf copies it into latches A, the frequency word Q15..Q1
// (division ratio N = sum of 2^(i-1) Qi); dtb copies it into the control
// and band latches, R6 T P R3 R2 R1 R0 P7..P0. a_toggle changes state on
// every write of latches A so that the divider-clock domain can see that a
// new ratio is waiting (see latch_b).
//
// Timing: all on the rising edge of clk (the oscillator clock); a latch
// holds its new value from the clock after the dtf/dtb strobe. rst_n
// (asynchronous, active low, the power-on reset) loads N = 256 (only Q9
// set, the preset latch 9) and clears the control latches: reference ratio
// 2048, prescaler in use, phase detector in normal operation, all band
// buffers off. The register width, the bit order, the power-on ratio and
// the two latch groups follow the design; edge-triggered registers in
// place of transparent latches are this model's choice.
module shift_latches
  import uaa4802_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dat,
  input  logic             clo,
  input  logic             dtf,
  input  logic             dtb,
  output logic [NBITS-1:0] freq_a,
  output ctrl_t            ctrl,
  output logic             a_toggle
);

  logic [NBITS-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      freq_a   <= N_POWER_ON;
      ctrl     <= CTRL_POWER_ON;
      a_toggle <= 1'b0;
    end else begin
      if (clo) sr <= {sr[NBITS-2:0], dat};
      if (dtf) begin
        freq_a   <= sr;
        a_toggle <= !a_toggle;
      end
      if (dtb) ctrl <= ctrl_t'(sr);
    end
  end

endmodule
