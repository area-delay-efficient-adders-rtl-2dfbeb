// qca_adder_exerciser: drives one qca_adder of width N and checks it.
//
// Phases of the run:
//  1. latency: after an idle spell a single pair (carry generated at bit 0
//     and propagated to the top) is presented; the ticks until out_valid
//     must equal N/2+4 clock phases, i.e. (N/2+4)/4 QCA clock cycles;
//  2. QCA cadence: pairs presented once per QCA clock cycle (every fourth
//     tick), as a QCA layout accepts them;
//  3. back-to-back: a new pair on every tick.
// Every result is compared with {1'b0,a}+{1'b0,b}. Counted mechanisms: full
// carry ripples from bit 0 to the carry out, results with a carry out, and
// ticks with more than one operation in flight. Any mechanism never seen
// counts a failure. With ZONED = 0 the adder is combinational and results
// are checked in the same tick. done rises when the run is over.
module qca_adder_exerciser #(
  parameter int unsigned N     = 16,
  parameter bit          ZONED = 1'b1,
  parameter int          T     = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import qca_pkg::*;
  localparam int LAT = ZONED ? int'(adder_phases(N)) : 0;
  localparam int CH  = N < 32 ? int'(N) : 32;   // random chunk width

  logic         rst_n, in_valid, out_valid;
  logic [N-1:0] a, b;
  logic [N:0]   sum;
  logic [N:0]   expq [$];
  int ripples = 0, couts = 0, overlap = 0, in_flight = 0;

  qca_adder #(.N(N), .ZONED(ZONED)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .sum(sum)
  );

  task automatic pick(input int t);
    case (t % 6)
      0: begin a = '1; b = N'(1); end
      1: begin a = {(N/2){2'b01}}; b = {(N/2){2'b10}} | N'(1); end
      2: begin a = '1; b = '1; end
      default: begin
        for (int w = 0; w < N; w += 32) begin
          a[w +: CH] = CH'($urandom);
          b[w +: CH] = CH'($urandom);
        end
      end
    endcase
  endtask

  function automatic logic full_ripple(logic [N-1:0] x, logic [N-1:0] y);
    return x[0] & y[0] & (&(x | y));
  endfunction

  // Scoreboard for the zoned adder: compare on every out_valid.
  always @(posedge clk) begin
    #1;
    if (ZONED && rst_n && out_valid) begin
      logic [N:0] e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL N=%0d: result without a pending pair", N);
      end else begin
        e = expq.pop_front();
        if (sum !== e) begin
          failures++; $display("FAIL N=%0d: sum=%h expected %h", N, sum, e);
        end
        if (e[N]) couts++;
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    rst_n = 0; in_valid = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    if (ZONED) begin
      // 1. Latency.
      int ticks;
      repeat (LAT + 2) @(posedge clk);
      #2;
      pick(0);
      in_valid = 1;
      expq.push_back({1'b0, a} + {1'b0, b});
      ripples += int'(full_ripple(a, b));
      @(posedge clk); #2;
      in_valid = 0;
      ticks = 1;
      while (!out_valid && ticks < 4 * LAT) begin
        @(posedge clk); #2;
        ticks++;
      end
      checks++;
      if (ticks != int'(adder_phases(N))) begin
        failures++; $display("FAIL N=%0d: latency %0d phases, expected %0d", N, ticks, adder_phases(N));
      end else
        $display("N=%0d: latency %0d clock phases = %0d QCA clock cycles", N, ticks,
                 ticks / int'(PHASES_PER_CYCLE));
      checks++;
      if (ticks % int'(PHASES_PER_CYCLE) != 0 && N >= 32) begin
        failures++; $display("FAIL N=%0d: latency not a whole number of cycles", N);
      end
      // 2. and 3. Streams.
      for (int t = 0; t < T; t++) begin
        int gap;
        gap = (t < T / 2) ? int'(PHASES_PER_CYCLE) : 1;
        pick(t);
        in_valid = 1;
        expq.push_back({1'b0, a} + {1'b0, b});
        ripples += int'(full_ripple(a, b));
        for (int g = 0; g < gap; g++) begin
          @(posedge clk); #2;
          in_valid = 0;
          if (expq.size() > 1) overlap++;
        end
      end
      in_valid = 0;
      repeat (LAT + 2) @(posedge clk);
      #2;
      checks++;
      if (expq.size() != 0) begin
        failures++; $display("FAIL N=%0d: %0d results missing", N, expq.size());
      end
    end else begin
      in_valid = 1;
      for (int t = 0; t < T; t++) begin
        logic [N:0] e;
        pick(t);
        #1;
        e = {1'b0, a} + {1'b0, b};
        ripples += int'(full_ripple(a, b));
        if (e[N]) couts++;
        checks++;
        if (sum !== e || out_valid !== 1'b1) begin
          failures++; $display("FAIL N=%0d comb: sum=%h expected %h", N, sum, e);
        end
        overlap++;  // no pipeline to overlap in; counted so the check below holds
      end
    end
    checks++;
    if (ripples == 0 || couts == 0 || overlap == 0) begin
      failures++;
      $display("FAIL N=%0d: mechanism not exercised (ripples=%0d couts=%0d overlap=%0d)",
               N, ripples, couts, overlap);
    end
    $display("N=%0d ZONED=%0d: full ripples=%0d carry-outs=%0d overlapped ticks=%0d",
             N, ZONED, ripples, couts, overlap);
    done = 1;
  end
endmodule
