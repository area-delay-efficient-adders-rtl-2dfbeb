// qca_pkg: constants and timing helpers shared by the QCA adder modules.
//
// The adder is modelled at clock-zone granularity: every QCA clock zone
// becomes one register rank, clocked once per clock phase. The helpers below
// give the number of zones (equal to clock phases) each part of the adder
// occupies, following the phase budget stated for the layouts: one phase to
// acquire the inputs, two phases for the simplified least-significant 2-bit
// module, one phase per further 2-bit module and two phases for the sums.
package qca_pkg;

  // Clock phases in one QCA clock cycle (four clocks, each shifted by 90 deg).
  localparam int unsigned PHASES_PER_CYCLE = 4;

  // Zones spent acquiring the inputs.
  localparam int unsigned INPUT_ZONES = 1;
  // Zones of the simplified least-significant 2-bit module (g0, then c2).
  localparam int unsigned LSB_ZONES = 2;
  // Zones of one generic 2-bit module on the carry path (one MG).
  localparam int unsigned MODULE_ZONES = 1;
  // Zones of the sum computation (inverter + MG, then MG).
  localparam int unsigned SUM_ZONES = 2;

  // Zones from the carry-chain inputs to its aligned outputs, n-bit chain.
  function automatic int unsigned chain_zones(int unsigned n);
    return LSB_ZONES + MODULE_ZONES * (n / 2 - 1);
  endfunction

  // Clock phases from presenting the operands to a valid sum, n-bit adder.
  function automatic int unsigned adder_phases(int unsigned n);
    return INPUT_ZONES + chain_zones(n) + SUM_ZONES;
  endfunction

endpackage
