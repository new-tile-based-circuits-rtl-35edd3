// bcd2aiken: BCD digit to aiken (2421) code, tile-based, no NOT gate.
//
// The aiken code weights its bits 2 4 2 1 and is self-complementing: the code
// of 9 - n is the bitwise complement of the code of n. Digits 0..4 keep their
// binary form and digits 5..9 map to 1011..1111. With the digit as A B C D:
//   W = A + B·D + B·C      = A + B·(C + D)
//   X = A + B·D' + B·C
//   Y = A + B'·C + B·C'·D
//   Z = D
// These sums of products are the published equations, read against the
// published truth table where a complement mark is ambiguous. Every
// complemented literal is taken through an inverting corner of a majority
// tile, so the converter holds no NOT gate.
//
// Timing: the gate network fills four clock zones:
//   zone 0  input cells
//   zone 1  B'C, BC', BD', BC, C + D
//   zone 2  BC'D, A + B'C, A + BD', B(C + D)
//   zone 3  Y, X and W as the final OR tiles; Z is a wire
// PHASES is the number of clock phases from input to output (5 for the
// published layout); zones beyond the four logic zones are wire zones at the
// output. aiken is the code of the digit applied PHASES clk edges earlier; a
// new digit may be applied on every edge. Inputs 1010..1111 are not BCD
// digits; the outputs then follow the same equations. rst clears every zone.
module bcd2aiken
  import qca_pkg::*;
#(
  parameter int unsigned PHASES = AIKEN_PHASES
) (
  input  logic   clk,
  input  logic   rst,
  input  bcd_t   bcd,
  output aiken_t aiken
);

  if (PHASES < AIKEN_LOGIC_ZONES) begin : g_check
    $error("bcd2aiken: PHASES must be at least %0d", AIKEN_LOGIC_ZONES);
  end

  // Zone 0: input cells.
  logic [3:0] z0;
  logic a, b, c, d;
  qca_wire #(.WIDTH(4), .ZONES(1)) u_zone0 (.clk, .rst, .d(bcd), .q(z0));
  assign {a, b, c, d} = z0;

  // Zone 1.
  logic nb_c, b_nc, b_nd, b_c, c_or_d;
  qca_maj #(.INV(3'b001)) u_nb_c  (.a(b), .b(c), .c(1'b0), .y(nb_c));   // B'C
  qca_maj #(.INV(3'b010)) u_b_nc  (.a(b), .b(c), .c(1'b0), .y(b_nc));   // BC'
  qca_maj #(.INV(3'b010)) u_b_nd  (.a(b), .b(d), .c(1'b0), .y(b_nd));   // BD'
  qca_maj                 u_b_c   (.a(b), .b(c), .c(1'b0), .y(b_c));    // BC
  qca_maj                 u_c_or_d(.a(c), .b(d), .c(1'b1), .y(c_or_d)); // C + D

  typedef struct packed {
    logic a, b, d;
    logic nb_c, b_nc, b_nd, b_c, c_or_d;
  } zone1_t;
  zone1_t z1;
  qca_wire #(.WIDTH($bits(zone1_t)), .ZONES(1)) u_zone1 (
    .clk, .rst, .d({a, b, d, nb_c, b_nc, b_nd, b_c, c_or_d}), .q(z1)
  );

  // Zone 2.
  logic b_nc_d, a_or_nb_c, a_or_b_nd, b_and_cd;
  qca_maj u_b_nc_d  (.a(z1.b_nc), .b(z1.d),    .c(1'b0), .y(b_nc_d));    // BC'D
  qca_maj u_y_or1   (.a(z1.a),    .b(z1.nb_c), .c(1'b1), .y(a_or_nb_c)); // A + B'C
  qca_maj u_x_or1   (.a(z1.a),    .b(z1.b_nd), .c(1'b1), .y(a_or_b_nd)); // A + BD'
  qca_maj u_w_and   (.a(z1.b),    .b(z1.c_or_d), .c(1'b0), .y(b_and_cd)); // B(C + D)

  typedef struct packed {
    logic a, d, b_c;
    logic b_nc_d, a_or_nb_c, a_or_b_nd, b_and_cd;
  } zone2_t;
  zone2_t z2;
  qca_wire #(.WIDTH($bits(zone2_t)), .ZONES(1)) u_zone2 (
    .clk, .rst, .d({z1.a, z1.d, z1.b_c, b_nc_d, a_or_nb_c, a_or_b_nd, b_and_cd}), .q(z2)
  );

  // Zone 3: final OR tiles.
  logic w, x, y;
  qca_maj u_w_or (.a(z2.a),         .b(z2.b_and_cd), .c(1'b1), .y(w));
  qca_maj u_x_or (.a(z2.a_or_b_nd), .b(z2.b_c),      .c(1'b1), .y(x));
  qca_maj u_y_or (.a(z2.a_or_nb_c), .b(z2.b_nc_d),   .c(1'b1), .y(y));

  aiken_t z3;
  qca_wire #(.WIDTH(4), .ZONES(1)) u_zone3 (.clk, .rst, .d({w, x, y, z2.d}), .q(z3));

  if (PHASES > AIKEN_LOGIC_ZONES) begin : g_pad
    qca_wire #(.WIDTH(4), .ZONES(PHASES - AIKEN_LOGIC_ZONES)) u_pad (
      .clk, .rst, .d(z3), .q(aiken)
    );
  end else begin : g_no_pad
    assign aiken = z3;
  end

endmodule
