// bcd2gray: BCD digit to 4-bit gray code, tile-based, no NOT gate.
//
// With the digit as A B C D (weights 8 4 2 1):
//   G3 = A            a wire
//   G2 = A + B        one majority tile with its third input fixed at 1
//   G1 = B XOR C      a tile_xor
//   G0 = C XOR D      a tile_xor
// These equations and the use of two XOR tiles, one OR tile and a wire follow
// the published converter. Input C feeds both XOR tiles; in the layout one of
// the two paths crosses the other signals on a separate layer, which is
// logically a plain connection.
//
// Timing: the gate network fills three clock zones (input cells, AND tiles,
// OR tiles); G2 and G3 run through wire zones alongside. PHASES is the number
// of clock phases from input to output (3 for the published layout); values
// above 3 add wire zones at the output. gray is the code of the digit applied
// PHASES clk edges earlier, and a new digit may be applied on every edge.
// Inputs 1010..1111 are not BCD digits; the outputs then follow the same
// equations. rst clears every zone.
module bcd2gray
  import qca_pkg::*;
#(
  parameter int unsigned PHASES = GRAY_PHASES
) (
  input  logic  clk,
  input  logic  rst,
  input  bcd_t  bcd,
  output gray_t gray
);

  if (PHASES < GRAY_LOGIC_ZONES) begin : g_check
    $error("bcd2gray: PHASES must be at least %0d", GRAY_LOGIC_ZONES);
  end

  logic a, b, c, d;
  assign {a, b, c, d} = bcd;

  logic g0, g1;
  tile_xor u_xor_g0 (.clk, .rst, .a(c), .b(d), .y(g0));
  tile_xor u_xor_g1 (.clk, .rst, .a(b), .b(c), .y(g1));

  // G2 and G3: zone 0 holds A and B, zone 1 the OR tile, zone 2 is wire.
  logic [1:0] ab_z0;
  logic       g2_or;
  logic [1:0] g32;   // {G3, G2} after zone 2
  logic [1:0] g32_z1;

  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone0_ab (.clk, .rst, .d({a, b}), .q(ab_z0));
  qca_maj u_or_g2 (.a(ab_z0[1]), .b(ab_z0[0]), .c(1'b1), .y(g2_or));
  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone1_g32 (.clk, .rst, .d({ab_z0[1], g2_or}), .q(g32_z1));
  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone2_g32 (.clk, .rst, .d(g32_z1), .q(g32));

  // Extra wire zones when PHASES exceeds the logic depth.
  if (PHASES > GRAY_LOGIC_ZONES) begin : g_pad
    qca_wire #(.WIDTH(4), .ZONES(PHASES - GRAY_LOGIC_ZONES)) u_pad (
      .clk, .rst, .d({g32, g1, g0}), .q(gray)
    );
  end else begin : g_no_pad
    assign gray = {g32, g1, g0};
  end

endmodule
