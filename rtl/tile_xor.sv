// tile_xor: tile-based two-input XOR gate spread over three clock zones.
//
// y = a XOR b = a·b' + a'·b, built from three majority tiles and no NOT gate:
//   zone 0  input cells hold a and b
//   zone 1  t1 = Maj(a, b', 0) = a·b'   and   t2 = Maj(a', b, 0) = a'·b,
//           each tile reading one input through its inverting corner
//   zone 2  y  = Maj(t1, t2, 1) = t1 + t2
// The gate uses three clock phases, as the published tile does. The split of
// the two AND tiles and the OR tile over zones 1 and 2 follows the gate's
// logic diagram; the cell-level placement is not reproduced.
//
// Timing: y is a XOR b of the values present three clk edges earlier; one new
// pair of inputs is accepted per edge. rst clears the zones.
module tile_xor (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic y
);

  logic [1:0] z0;          // zone 0: {a, b}
  logic       t1, t2;
  logic [1:0] z1;          // zone 1: {t1, t2}
  logic       or_y;

  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone0 (.clk, .rst, .d({a, b}), .q(z0));

  qca_maj #(.INV(3'b010)) u_and_anb (.a(z0[1]), .b(z0[0]), .c(1'b0), .y(t1));
  qca_maj #(.INV(3'b001)) u_and_nab (.a(z0[1]), .b(z0[0]), .c(1'b0), .y(t2));

  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone1 (.clk, .rst, .d({t1, t2}), .q(z1));

  qca_maj #(.INV(3'b000)) u_or (.a(z1[1]), .b(z1[0]), .c(1'b1), .y(or_y));

  qca_wire #(.WIDTH(1), .ZONES(1)) u_zone2 (.clk, .rst, .d(or_y), .q(y));

endmodule
