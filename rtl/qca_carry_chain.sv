// qca_carry_chain: n-bit carry chain of the adder, n/2 cascaded 2-bit slices.
//
// Bits 0 and 1 use the simplified slice (carry-in fixed at 0), which makes
// c1 and c2. Slice k = 1 .. n/2-1 covers bits 2k and 2k+1 and turns c_{2k}
// into c_{2k+1} and c_{2k+2}; only c_{2k+2} ripples on, through one MG per
// slice. Besides the carries c[1..n] the chain hands the sum block one
// operand pair per bit: (p_i, g_i) for even i >= 2, where the slice already
// has them, and (a_i, b_i) for odd i and for bit 0.
//
// Timing (ZONED = 1, clk = one tick per clock phase): the least significant
// slice takes two zones and each further slice one, so the carry wave leaves
// slice k at zone k+2. Each slice's operands are delayed to meet the carry
// (k+1 zones), and each slice's results are delayed to the chain's end, so
// that every output belongs to the same operand pair and appears
// chain_zones(N) = N/2+1 ticks after a and b. A new operand pair may enter on
// every tick. The alignment delays stand for the wire zones of a layout;
// their placement is this design's choice. With ZONED = 0 it is
// combinational. N must be even and at least 2.
module qca_carry_chain
  import qca_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter bit          ZONED = 1'b1
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:1]   c,   // c[i]: carry into bit i (c[N] is the carry out)
  output logic [N-1:0] x,   // first operand of each sum column
  output logic [N-1:0] y    // second operand of each sum column
);
  localparam int unsigned HALF = N / 2;
  localparam int unsigned LAT  = chain_zones(N);

  if (N < 2 || N % 2 != 0) begin : g_bad_n
    $error("qca_carry_chain: N must be even and at least 2");
  end

  // Carry out of each slice, straight from its zone (not aligned).
  logic [HALF-1:0] c_even;  // c_even[k] = c_{2k+2}

  // Least significant slice, bits 0 and 1.
  logic c1_raw;
  qca_lsb_module #(.ZONED(ZONED)) u_lsb (
    .clk(clk), .a0(a[0]), .b0(b[0]), .a1(a[1]), .b1(b[1]),
    .c1(c1_raw), .c2(c_even[0])
  );
  qca_zone_delay #(.W(2), .DEPTH(LAT - LSB_ZONES), .ZONED(ZONED)) u_lsb_align (
    .clk(clk), .d({c1_raw, c_even[0]}), .q({c[1], c[2]})
  );

  // Operand pairs of bit 0 and of every odd bit go straight to the end.
  for (genvar i = 0; i < N; i++) begin : g_ab
    if (i == 0 || i % 2 == 1) begin : g_pass
      qca_zone_delay #(.W(2), .DEPTH(LAT), .ZONED(ZONED)) u_d (
        .clk(clk), .d({a[i], b[i]}), .q({x[i], y[i]})
      );
    end
  end

  // Generic slices.
  for (genvar k = 1; k < HALF; k++) begin : g_slice
    localparam int unsigned ARRIVE = LSB_ZONES + MODULE_ZONES * (k - 1);
    localparam int unsigned LEAVE  = ARRIVE + MODULE_ZONES;
    logic [3:0] ab_z;
    logic       c_mid, p, g;

    qca_zone_delay #(.W(4), .DEPTH(ARRIVE), .ZONED(ZONED)) u_opnd (
      .clk(clk), .d({a[2*k], b[2*k], a[2*k+1], b[2*k+1]}), .q(ab_z)
    );
    qca_2bit_module #(.ZONED(ZONED)) u_mod (
      .clk(clk), .a_lo(ab_z[3]), .b_lo(ab_z[2]), .a_hi(ab_z[1]), .b_hi(ab_z[0]),
      .c_in(c_even[k-1]), .c_mid(c_mid), .c_out(c_even[k]), .p(p), .g(g)
    );
    qca_zone_delay #(.W(4), .DEPTH(LAT - LEAVE), .ZONED(ZONED)) u_align (
      .clk(clk), .d({c_mid, c_even[k], p, g}),
      .q({c[2*k+1], c[2*k+2], x[2*k], y[2*k]})
    );
  end
endmodule
