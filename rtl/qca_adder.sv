// qca_adder: n-bit QCA ripple adder whose carry crosses two bit positions
// per majority gate.
//
// Structure: an input acquisition zone, the carry chain (a simplified slice
// for bits 0-1 and n/2-1 two-bit slices) and the sum block. With carry-in 0
// the worst-case path is n/2+3 majority gates and one inverter, against n+2
// MGs for a conventional ripple-carry adder. sum[N] is the carry out.
//
// Timing (ZONED = 1): each QCA clock zone is one register rank and clk ticks
// once per clock phase (four ticks per QCA clock cycle). A result leaves
// adder_phases(N) = N/2+4 ticks after its operands were presented:
// 36 phases (9 cycles) for N = 64, 20 phases (5 cycles) for N = 32. The
// design is fully pipelined; operands may be presented on any tick, a QCA
// layout accepting one pair per clock cycle is a special case.
// in_valid travels alongside the data as out_valid; it and rst_n (async,
// active low, clears the valid tag only) are this design's additions, the
// datapath itself has no reset. With ZONED = 0 the adder is combinational
// and out_valid = in_valid.
module qca_adder
  import qca_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter bit          ZONED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N:0]   sum
);
  localparam int unsigned LAT = adder_phases(N);

  logic [N-1:0] a_z, b_z, x, y;
  logic [N:1]   c;

  // Input acquisition zone.
  qca_zone_delay #(.W(2*N), .DEPTH(INPUT_ZONES), .ZONED(ZONED)) u_in (
    .clk(clk), .d({a, b}), .q({a_z, b_z})
  );

  qca_carry_chain #(.N(N), .ZONED(ZONED)) u_chain (
    .clk(clk), .a(a_z), .b(b_z), .c(c), .x(x), .y(y)
  );

  qca_sum_block #(.N(N), .ZONED(ZONED)) u_sum (
    .clk(clk), .c(c), .x(x), .y(y), .s(sum)
  );

  // Valid tag, one stage per zone of the datapath.
  if (ZONED) begin : g_valid
    logic [LAT-1:0] vld;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld <= '0;
      else        vld <= {vld[LAT-2:0], in_valid};
    end
    assign out_valid = vld[LAT-1];
  end else begin : g_novalid
    assign out_valid = in_valid;
  end
endmodule
