// Shared types and constants of the UAA 4802 synthesizer core.
//
// The M-Bus chip address, the byte layouts of the control/band and
// frequency byte pairs, and the power-on division ratio are those of the
// UAA 4802 register map. The struct packing (which bit of the 15-bit word
// lands in which field) follows the order in which the bits arrive on the
// bus, MSB first, after the function bit of the first byte of a pair.
package uaa4802_pkg;

  // Chip address byte, first bit (MSB) first on the bus.
  localparam logic [7:0] CHIP_ADDR = 8'b1100_0010;

  // Width of the division ratio N and of the data word of a byte pair.
  localparam int unsigned NBITS = 15;

  // Division ratio loaded at power-on: only Q9 set, N = 2^8.
  localparam logic [NBITS-1:0] N_POWER_ON = 15'd256;

  // Control byte CO (after the function bit '1') and band byte BA.
  // Bus order: 1 R6 T P R3 R2 R1 R0 | P7 P6 P5 P4 P3 P2 P1 P0
  typedef struct packed {
    logic       r6;   // phase detector test, with R2 forms TES
    logic       t;    // phase detector tristate request (TRI)
    logic       p;    // 1: bypass Preamp1 and prescaler
    logic       r3;   // test-pin select
    logic       r2;   // test-pin select, phase detector test
    logic       r1;   // reference divider ratio select
    logic       r0;   // reference divider ratio select
    logic [7:0] band; // P7..P0 -> band buffers BB8..BB1
  } ctrl_t;

  localparam ctrl_t CTRL_POWER_ON = '0;

endpackage
