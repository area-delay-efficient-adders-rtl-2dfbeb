// qca_zone_delay: a run of QCA clock zones on a bus, i.e. a delay line.
//
// In zone clocking each clock zone holds its value like a D latch, so a wire
// crossing DEPTH zones delays its data by DEPTH clock phases. Here each zone
// is one register rank clocked by clk, which ticks once per clock phase.
// DEPTH = 0 gives a plain wire. With ZONED = 0 the whole adder is modelled
// without zones (purely combinational) and this module is a wire as well;
// that mode is this design's addition for functional checking. In both wire
// cases clk is unused by design, which lint reports as an unused input.
// No reset: like a QCA wire, the content is meaningful only once data has
// travelled through it; valid tags are tracked outside.
module qca_zone_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1,
  parameter bit          ZONED = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (!ZONED || DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_zones
    logic [W-1:0] zone [DEPTH];
    always_ff @(posedge clk) begin
      zone[0] <= d;
      for (int unsigned k = 1; k < DEPTH; k++) zone[k] <= zone[k-1];
    end
    assign q = zone[DEPTH-1];
  end
endmodule
