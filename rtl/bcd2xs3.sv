// bcd2xs3: BCD digit to excess-3 code (digit + 3).
//
// With the digit as A B C D (weights 8 4 2 1):
//   E0 = D'                      one NOT gate
//   E1 = C XNOR D                a tile_xnor (which holds one NOT gate)
//   E2 = B XOR (C + D)           an OR tile feeding a tile_xor
//   E3 = A + B·(C + D)           OR tile, AND tile, OR tile
// E0, E1 and E2 are the published equations. E3 is read from the excess-3
// truth table (it is 1 for digits 5 to 9), which A alone does not cover.
// The published layout holds three NOT gates; this gate network needs two
// (E0 and the XNOR tile), their placement in the layout being unknown.
//
// Timing: the deepest path (E2) fills five clock zones: input cells, the OR
// tile C + D, then the three zones of the XOR tile (whose first zone holds
// its inputs). E3 needs four zones and E0 and E1 fewer; all are carried
// through wire zones to line up with E2. PHASES is the number of clock phases
// from input to output (7 for the published layout); zones beyond the five
// logic zones are wire zones at the output. xs3 is the code of the digit applied PHASES
// clk edges earlier; a new digit may be applied on every edge. Inputs
// 1010..1111 are not BCD digits; the outputs then follow the same equations.
// rst clears every zone.
module bcd2xs3
  import qca_pkg::*;
#(
  parameter int unsigned PHASES = XS3_PHASES
) (
  input  logic clk,
  input  logic rst,
  input  bcd_t bcd,
  output xs3_t xs3
);

  if (PHASES < XS3_LOGIC_ZONES) begin : g_check
    $error("bcd2xs3: PHASES must be at least %0d", XS3_LOGIC_ZONES);
  end

  // Zone 0: input cells.
  logic [3:0] z0;
  qca_wire #(.WIDTH(4), .ZONES(1)) u_zone0 (.clk, .rst, .d(bcd), .q(z0));

  // Zone 1: C + D, NOT D, A and B carried on.
  logic c_or_d, d_n;
  qca_maj u_or_cd (.a(z0[1]), .b(z0[0]), .c(1'b1), .y(c_or_d));
  qca_inv u_not_d (.a(z0[0]), .y(d_n));

  logic [3:0] z1;    // {A, B, C+D, D'}
  qca_wire #(.WIDTH(4), .ZONES(1)) u_zone1 (.clk, .rst, .d({z0[3], z0[2], c_or_d, d_n}), .q(z1));

  // E2 = B XOR (C + D): zones 2 to 4 inside the XOR tile.
  logic e2;
  tile_xor u_xor_e2 (.clk, .rst, .a(z1[2]), .b(z1[1]), .y(e2));

  // E3 = A + B(C + D): zone 2 AND tile, zone 3 OR tile, zone 4 wire.
  logic bcd_and;
  qca_maj u_and_b (.a(z1[2]), .b(z1[1]), .c(1'b0), .y(bcd_and));

  logic [1:0] z2;    // {A, B(C+D)}
  qca_wire #(.WIDTH(2), .ZONES(1)) u_zone2 (.clk, .rst, .d({z1[3], bcd_and}), .q(z2));

  logic e3_or, e3;
  qca_maj u_or_e3 (.a(z2[1]), .b(z2[0]), .c(1'b1), .y(e3_or));
  qca_wire #(.WIDTH(1), .ZONES(XS3_LOGIC_ZONES - 3)) u_zone3 (.clk, .rst, .d(e3_or), .q(e3));

  // E1 = C XNOR D: three zones in the XNOR tile, two wire zones to line up.
  logic e1_t, e1;
  tile_xnor u_xnor_e1 (.clk, .rst, .a(bcd[1]), .b(bcd[0]), .y(e1_t));
  qca_wire #(.WIDTH(1), .ZONES(XS3_LOGIC_ZONES - TILE_XOR_PHASES)) u_e1_wire (
    .clk, .rst, .d(e1_t), .q(e1)
  );

  // E0 = D': produced in zone 1, carried through zones 2 to 4.
  logic e0;
  qca_wire #(.WIDTH(1), .ZONES(XS3_LOGIC_ZONES - 2)) u_e0_wire (
    .clk, .rst, .d(z1[0]), .q(e0)
  );

  if (PHASES > XS3_LOGIC_ZONES) begin : g_pad
    qca_wire #(.WIDTH(4), .ZONES(PHASES - XS3_LOGIC_ZONES)) u_pad (
      .clk, .rst, .d({e3, e2, e1, e0}), .q(xs3)
    );
  end else begin : g_no_pad
    assign xs3 = {e3, e2, e1, e0};
  end

endmodule
