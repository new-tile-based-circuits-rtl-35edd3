// qca_wire: a clocked QCA wire crossing ZONES clock zones.
//
// A QCA wire is a line of cells; each clock zone it passes holds the value for
// one clock phase before handing it on. Here every zone is a WIDTH-bit
// register advanced by clk (one edge per clock phase), so q equals d delayed
// by ZONES edges. ZONES = 0 is a plain connection. rst (synchronous, active
// high) clears every zone to polarization -1 (logic 0); the physical circuit
// has no reset, it is added so that the outputs are defined from the start.
module qca_wire #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned ZONES = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (ZONES == 0) begin : g_direct
    assign q = d;
  end else begin : g_zones
    logic [ZONES-1:0][WIDTH-1:0] zone;

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int unsigned i = 0; i < ZONES; i++) zone[i] <= '0;
      end else begin
        zone[0] <= d;
        for (int unsigned i = 1; i < ZONES; i++) zone[i] <= zone[i-1];
      end
    end

    assign q = zone[ZONES-1];
  end

endmodule
