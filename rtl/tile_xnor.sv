// tile_xnor: tile-based two-input XNOR gate spread over three clock zones.
//
// y = a XNOR b = a·b + a'·b' = a·b + (a + b)':
//   zone 0  input cells hold a and b
//   zone 1  t_and = Maj(a, b, 0) = a·b   and   t_or = Maj(a, b, 1) = a + b
//   zone 2  y = Maj(t_and, NOT t_or, 1)
// The NOR term is taken through one NOT gate, so this XNOR tile holds one
// inverter. The zone split and the use of one NOT gate are this design's
// choice; the published tile gives the function and its logic diagram only.
//
// Timing: y is a XNOR b of the values present three clk edges earlier; one
// new pair of inputs per edge. rst clears the zones.
module tile_xnor (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic y
);

  logic [1:0] z0;          // zone 0: {a, b}
  logic       t_and, t_or;
  logic [1:0] z1;          // zone 1: {t_and, t_or}
  logic       nor_ab;
  logic       or_y;

  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone0 (.clk, .rst, .d({a, b}), .q(z0));

  qca_maj u_and (.a(z0[1]), .b(z0[0]), .c(1'b0), .y(t_and));
  qca_maj u_or1 (.a(z0[1]), .b(z0[0]), .c(1'b1), .y(t_or));

  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone1 (.clk, .rst, .d({t_and, t_or}), .q(z1));

  qca_inv u_not (.a(z1[0]), .y(nor_ab));
  qca_maj u_or2 (.a(z1[1]), .b(nor_ab), .c(1'b1), .y(or_y));

  qca_wire #(.WIDTH(1), .ZONES(1)) u_zone2 (.clk, .rst, .d(or_y), .q(y));

endmodule
