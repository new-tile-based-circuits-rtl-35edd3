// qca_inv: the QCA NOT gate (inverter).
//
// y = NOT a. In QCA an inverter is a pair of diagonally placed cells that
// copy the opposite polarization. It is combinational; the tile-based
// converters avoid it wherever a majority tile can read an input inverted
// instead (see qca_maj), and use it only where an inverted value is needed on
// its own.
module qca_inv (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
