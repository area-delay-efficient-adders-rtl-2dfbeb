// qca_sum_cell: one sum bit of the adder, one column of the sum block.
//
// With c_i the carry into the position and c_{i+1} its carry out:
//   t   = M(x, y, ~c_{i+1})
//   s_i = M(~c_{i+1}, c_i, t)
// x, y are either the operand bits a_i, b_i or the pair p_i, g_i; both give
// the same t because M(a|b, a&b, z) = M(a, b, z). One inverter and two MGs,
// as in the sum path of the design.
//
// Timing (ZONED = 1): two clock zones, one per MG, registered on clk; s
// appears two ticks after the inputs. With ZONED = 0 it is combinational.
module qca_sum_cell #(
  parameter bit ZONED = 1'b1
) (
  input  logic clk,
  input  logic x,
  input  logic y,
  input  logic c_lo,  // c_i
  input  logic c_hi,  // c_{i+1}
  output logic s
);
  logic nc, t, t_z, nc_z, c_lo_z, s_d;

  // Zone 1: inverter and first MG.
  qca_inv u_inv (.a(c_hi), .y(nc));
  qca_maj u_t   (.a(x), .b(y), .c(nc), .y(t));
  qca_zone_delay #(.W(3), .DEPTH(1), .ZONED(ZONED)) u_z1 (
    .clk(clk), .d({t, nc, c_lo}), .q({t_z, nc_z, c_lo_z})
  );

  // Zone 2: second MG.
  qca_maj u_s (.a(nc_z), .b(c_lo_z), .c(t_z), .y(s_d));
  qca_zone_delay #(.W(1), .DEPTH(1), .ZONED(ZONED)) u_z2 (
    .clk(clk), .d(s_d), .q(s)
  );
endmodule
