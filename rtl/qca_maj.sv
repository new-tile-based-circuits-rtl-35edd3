// qca_maj: three-input majority gate, the basic logic gate of QCA.
//
// y = Maj(a, b, c) = ab + ac + bc. Fixing one input gives the two-input gates
// of the converters: Maj(a, b, 0) = a AND b, Maj(a, b, 1) = a OR b (the fixed
// input is a cell of polarization -1 or +1).
//
// In the tile-based layout a majority tile can read any of its inputs through
// an inverting corner of the tile, so a term such as a AND NOT b costs no
// separate NOT gate. INV selects which inputs are read inverted: bit 0 is a,
// bit 1 is b, bit 2 is c. With INV = 3'b010 and c = 0 the gate yields a·b'.
// The gate is purely combinational; the clock zone that holds its result is
// the enclosing circuit's register.
module qca_maj #(
  parameter logic [2:0] INV = 3'b000
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  logic ai, bi, ci;

  always_comb begin
    ai = a ^ INV[0];
    bi = b ^ INV[1];
    ci = c ^ INV[2];
    y  = (ai & bi) | (ai & ci) | (bi & ci);
  end

endmodule
