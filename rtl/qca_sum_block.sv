// qca_sum_block: all sum bits of the n-bit adder, one sum cell per column.
//
// Column i receives its operand pair (x_i, y_i), the carry into it c_i
// (c_0 = 0, the adder's carry-in) and its carry out c_{i+1}, and computes
// s_i = M(~c_{i+1}, c_i, M(x_i, y_i, ~c_{i+1})). The carry out of the top
// column, c_n, is returned as sum bit n, so s is n+1 bits wide.
//
// Timing (ZONED = 1, clk = one tick per clock phase): two zones; c_n is
// delayed by the same two zones to stay aligned with the other bits. A new
// set of inputs may enter on every tick. With ZONED = 0 it is combinational.
module qca_sum_block
  import qca_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter bit          ZONED = 1'b1
) (
  input  logic         clk,
  input  logic [N:1]   c,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   s
);
  logic [N:0] cc;
  assign cc = {c, 1'b0};  // cc[i] = c_i, with carry-in c_0 = 0

  for (genvar i = 0; i < N; i++) begin : g_col
    qca_sum_cell #(.ZONED(ZONED)) u_cell (
      .clk(clk), .x(x[i]), .y(y[i]), .c_lo(cc[i]), .c_hi(cc[i+1]), .s(s[i])
    );
  end

  qca_zone_delay #(.W(1), .DEPTH(SUM_ZONES), .ZONED(ZONED)) u_cout (
    .clk(clk), .d(c[N]), .q(s[N])
  );
endmodule
