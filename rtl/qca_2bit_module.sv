// qca_2bit_module: the 2-bit addition slice, bit positions i and i+1.
//
// From bit i it forms p_i = M(a_i,b_i,1) (OR) and g_i = M(a_i,b_i,0) (AND).
// Bit i+1's operands are combined with each of them:
//   u = M(a_{i+1}, b_{i+1}, p_i) = g_{i+1} | p_{i+1} p_i
//   v = M(a_{i+1}, b_{i+1}, g_i) = g_{i+1} | p_{i+1} g_i
// and because v implies u, a single MG gives the two-position carry
//   c_{i+2} = M(u, v, c_i) = v | c_i u
//          = g_{i+1} | p_{i+1} g_i | p_{i+1} p_i c_i,
// so the incoming carry crosses two bit positions through one MG. The
// intermediate carry is c_{i+1} = M(p_i, g_i, c_i). p_i and g_i are also
// passed on, since the sum block uses them for bit i.
//
// Timing (ZONED = 1): one clock zone. The carry path c_i -> c_{i+2} is one
// MG; p, g, u and v depend only on the operands, which a layout computes in
// earlier zones while the carry is still on its way. Here they are formed in
// the same zone from operands that the caller delays to arrive with c_i;
// that zone assignment is this design's simplification. All four outputs
// are registered once (one tick of clk). With ZONED = 0 it is combinational.
module qca_2bit_module #(
  parameter bit ZONED = 1'b1
) (
  input  logic clk,
  input  logic a_lo,   // a_i
  input  logic b_lo,   // b_i
  input  logic a_hi,   // a_{i+1}
  input  logic b_hi,   // b_{i+1}
  input  logic c_in,   // c_i
  output logic c_mid,  // c_{i+1}
  output logic c_out,  // c_{i+2}
  output logic p,      // p_i
  output logic g       // g_i
);
  logic p_d, g_d, u, v, c_mid_d, c_out_d;

  qca_maj u_p   (.a(a_lo), .b(b_lo), .c(1'b1), .y(p_d));
  qca_maj u_g   (.a(a_lo), .b(b_lo), .c(1'b0), .y(g_d));
  qca_maj u_u   (.a(a_hi), .b(b_hi), .c(p_d),  .y(u));
  qca_maj u_v   (.a(a_hi), .b(b_hi), .c(g_d),  .y(v));
  qca_maj u_c2  (.a(u),    .b(v),    .c(c_in), .y(c_out_d));
  qca_maj u_c1  (.a(p_d),  .b(g_d),  .c(c_in), .y(c_mid_d));

  qca_zone_delay #(.W(4), .DEPTH(1), .ZONED(ZONED)) u_zone (
    .clk(clk), .d({c_mid_d, c_out_d, p_d, g_d}), .q({c_mid, c_out, p, g})
  );
endmodule
