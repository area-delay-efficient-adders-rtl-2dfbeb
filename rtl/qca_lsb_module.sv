// qca_lsb_module: simplified 2-bit module for bit positions 0 and 1.
//
// The adder's carry-in is fixed at 0, so bit 0 needs no propagate signal and
// its carry-out is its generate: c1 = g0 = M(a0,b0,0). The carry into bit 2
// then takes one more majority gate: c2 = M(a1,b1,g0). These two cascaded
// MGs are the start of the worst-case carry path.
//
// Timing (ZONED = 1): two clock zones, one per MG, each a register rank
// clocked by the phase tick clk. Operands a1/b1 travel with g0 through the
// first zone. c1 and c2 appear two ticks after a0..b1. With ZONED = 0 the
// module is combinational.
module qca_lsb_module #(
  parameter bit ZONED = 1'b1
) (
  input  logic clk,
  input  logic a0,
  input  logic b0,
  input  logic a1,
  input  logic b1,
  output logic c1,
  output logic c2
);
  logic g0, g0_z, a1_z, b1_z, c2_d;

  // Zone 1: g0 as an AND made from an MG with one input fixed at 0.
  qca_maj u_g0 (.a(a0), .b(b0), .c(1'b0), .y(g0));
  qca_zone_delay #(.W(3), .DEPTH(1), .ZONED(ZONED)) u_z1 (
    .clk(clk), .d({g0, a1, b1}), .q({g0_z, a1_z, b1_z})
  );

  // Zone 2: carry into bit 2.
  qca_maj u_c2 (.a(a1_z), .b(b1_z), .c(g0_z), .y(c2_d));
  qca_zone_delay #(.W(2), .DEPTH(1), .ZONED(ZONED)) u_z2 (
    .clk(clk), .d({g0_z, c2_d}), .q({c1, c2})
  );
endmodule
