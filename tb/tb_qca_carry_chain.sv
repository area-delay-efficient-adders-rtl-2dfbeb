// tb_qca_carry_chain: streams operand pairs into 16-bit and 8-bit zoned
// chains (a new pair every tick) and into a combinational 16-bit chain.
// Expected carries are computed with integer addition: c[i] is bit i of
// (a mod 2^i) + (b mod 2^i). Expected operand pairs are (a_i|b_i, a_i&b_i)
// for even i >= 2 and (a_i, b_i) otherwise. A zoned result must appear
// exactly N/2+1 ticks after its operands. Directed patterns include a carry
// generated at bit 0 and propagated to the top.
module tb_qca_carry_chain;
  import qca_pkg::*;
  localparam int N  = 16;
  localparam int N8 = 8;
  localparam int LAT  = int'(chain_zones(N));
  localparam int LAT8 = int'(chain_zones(N8));
  localparam int T = 300;

  logic clk = 0;
  logic [N-1:0] a, b, xz, yz, xc, yc;
  logic [N:1]   cz, cc;
  logic [N8-1:0] x8, y8;
  logic [N8:1]   c8;
  logic [N-1:0] ha [T], hb [T];
  int checks = 0, failures = 0, full_ripples = 0;

  qca_carry_chain #(.N(N), .ZONED(1'b1)) dut_z (.clk(clk), .a(a), .b(b), .c(cz), .x(xz), .y(yz));
  qca_carry_chain #(.N(N), .ZONED(1'b0)) dut_c (.clk(clk), .a(a), .b(b), .c(cc), .x(xc), .y(yc));
  qca_carry_chain #(.N(N8), .ZONED(1'b1)) dut_8 (.clk(clk), .a(a[N8-1:0]), .b(b[N8-1:0]), .c(c8), .x(x8), .y(y8));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N:1] ref_c(logic [N-1:0] x, logic [N-1:0] y, int n);
    logic [N:1] r = '0;
    for (int i = 1; i <= n; i++) begin
      logic [N:0] m, s;
      m = (i >= N) ? {1'b0, {N{1'b1}}} : ((N+1)'(1) << i) - 1;
      s = ({1'b0, x} & m) + ({1'b0, y} & m);
      r[i] = s[i];
    end
    return r;
  endfunction

  function automatic logic [2*N-1:0] ref_xy(logic [N-1:0] x, logic [N-1:0] y, int n);
    logic [N-1:0] rx = '0, ry = '0;
    for (int i = 0; i < n; i++) begin
      if (i >= 2 && i % 2 == 0) begin rx[i] = x[i] | y[i]; ry[i] = x[i] & y[i]; end
      else begin rx[i] = x[i]; ry[i] = y[i]; end
    end
    return {rx, ry};
  endfunction

  initial begin
    for (int t = 0; t < T; t++) begin
      case (t % 7)
        0: begin ha[t] = '1; hb[t] = N'(1); end                    // g0, full propagate
        1: begin ha[t] = N'(16'h5555); hb[t] = N'(16'hAAAB); end   // g0 then alternating propagate
        default: begin ha[t] = N'($urandom); hb[t] = N'($urandom); end
      endcase
    end
    for (int t = 0; t < T; t++) begin
      logic [N:1] ec;
      a = ha[t]; b = hb[t];
      #1;
      ec = ref_c(a, b, N);
      checks++;
      if (cc !== ec || {xc, yc} !== ref_xy(a, b, N)) begin
        failures++; $display("FAIL comb t=%0d a=%h b=%h c=%h exp %h", t, a, b, cc, ec);
      end
      if (a[0] & b[0] & (&(a[N-1:1] | b[N-1:1]))) full_ripples++;
      @(posedge clk); #1;
      // After edge t the outputs belong to the pair presented LAT-1 edges
      // earlier.
      if (t >= LAT - 1) begin
        int s;
        s = t - (LAT - 1);
        checks++;
        if (cz !== ref_c(ha[s], hb[s], N) || {xz, yz} !== ref_xy(ha[s], hb[s], N)) begin
          failures++; $display("FAIL zoned16 t=%0d pair=%0d c=%h exp %h", t, s, cz, ref_c(ha[s], hb[s], N));
        end
      end
      if (t >= LAT8 - 1) begin
        int s;
        logic [N:1] e8;
        logic [2*N-1:0] exy;
        s = t - (LAT8 - 1);
        e8 = ref_c(N'(ha[s][N8-1:0]), N'(hb[s][N8-1:0]), N8);
        exy = ref_xy(N'(ha[s][N8-1:0]), N'(hb[s][N8-1:0]), N8);
        checks++;
        if (c8 !== e8[N8:1] || x8 !== exy[N+N8-1:N] || y8 !== exy[N8-1:0]) begin
          failures++; $display("FAIL zoned8 t=%0d", t);
        end
      end
    end
    checks++;
    if (full_ripples == 0) begin failures++; $display("FAIL no full-length carry ripple applied"); end
    $display("full-length ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
