// qca_pkg: types and constants shared by the tile-based BCD code converters.
//
// A BCD digit is four bits A B C D with weights 8 4 2 1 (A is bit 3); only
// 0000..1001 are valid digits. Each converter output is a 4-bit code with its
// most significant bit in bit 3: gray G3..G0, excess-3 E3..E0, aiken W X Y Z.
//
// Timing model. The converters are quantum-dot cellular automata circuits
// whose cells are grouped into clock zones driven by a four-phase clock. A
// value moves one zone forward per clock phase. In this RTL one rising edge of
// clk stands for one clock phase and every zone ends in a register, so a
// converter that uses N clock phases returns its code N edges after its input
// and accepts a new digit on every edge. The phase counts below (3, 7 and 5,
// that is 0.75, 1.75 and 1.25 full clock cycles) are the published figures of
// the three layouts. The *_LOGIC_ZONES constants are the number of zones the
// gate network of each converter needs in this RTL; the remaining zones are
// plain wire zones.
package qca_pkg;

  typedef logic [3:0] bcd_t;    // {A, B, C, D}
  typedef logic [3:0] gray_t;   // {G3, G2, G1, G0}
  typedef logic [3:0] xs3_t;    // {E3, E2, E1, E0}
  typedef logic [3:0] aiken_t;  // {W, X, Y, Z}

  // Clock phases used by each converter (input to output).
  localparam int unsigned GRAY_PHASES  = 3;
  localparam int unsigned XS3_PHASES   = 7;
  localparam int unsigned AIKEN_PHASES = 5;

  // Clock phases used by the tile-based XOR and XNOR gates.
  localparam int unsigned TILE_XOR_PHASES = 3;

  // Zones the gate network of each converter occupies before wire padding.
  localparam int unsigned GRAY_LOGIC_ZONES  = 3;
  localparam int unsigned XS3_LOGIC_ZONES   = 5;
  localparam int unsigned AIKEN_LOGIC_ZONES = 4;

endpackage
