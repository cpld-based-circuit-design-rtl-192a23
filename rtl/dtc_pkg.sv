// dtc_pkg: constants and types shared by the IGBT dead-time compensation CPLD.
//
// The clock frequency (40 MHz) and the compensation counter magnitude width
// (10 bits, 25 ns resolution, about 25 us range) are the figures the design is
// specified with. The layout of the configuration register REGCONF and the
// encoding of the circuit state are choices of this implementation:
//   REGCONF[REGCONF_W-1]   comp_en : 1 = dead-time compensation enabled
//   REGCONF[REGCONF_W-2:0] inse    : inserted dead time INSE, in clock cycles
package dtc_pkg;

  // System clock frequency in Hz (40 MHz).
  localparam int unsigned F_CLK_HZ = 40_000_000;
  // Magnitude bits of the compensation counter (n = 10).
  localparam int unsigned CNT_BITS = 10;
  // Width of the serial configuration register REGCONF.
  localparam int unsigned REGCONF_W = 8;
  // Width of the dead-time field of REGCONF.
  localparam int unsigned INSE_W = REGCONF_W - 1;
  // REGCONF content after reset: compensation off, INSE = 40 cycles (1 us).
  localparam logic [REGCONF_W-1:0] REGCONF_RST = {1'b0, 7'd40};

  // Circuit state as applied by the output control (see output_control).
  typedef enum logic [2:0] {
    ST_RESET  = 3'd0,  // BRST = 0
    ST_CONFIG = 3'd1,  // after reset, until the falling edge of BCV
    ST_SAFE   = 3'd2,  // BSAFE = 0 or a latched protection fault
    ST_PASS   = 3'd3,  // PASS = 1: inputs T1..T6 repeated on CT1..CT6
    ST_NORMAL = 3'd4   // compensated, dead-time inserted commands iCT1..iCT6
  } circuit_state_e;

endpackage
