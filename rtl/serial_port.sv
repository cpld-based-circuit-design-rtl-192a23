// serial_port: configuration register REGCONF and configuration/normal mode.
//
// After reset the circuit is in configuration mode. The controller shifts
// configuration bits in serially: each rising edge of SHCONF shifts REGCONF
// one place towards the LSB and loads CONF into its MSB, so the bit sent first
// ends up in REGCONF[0] after REGCONF_W shifts. A falling edge of BCV ends
// configuration mode: REGCONF is locked and the circuit is in normal mode until
// the next reset. These rules follow the source specification, as do the
// minimum SHCONF high and low times of 100 ns (4 cycles at 40 MHz), which are
// what lets a clocked edge detector see every SHCONF pulse.
//
// Own choices: the inputs are expected already synchronized to clk (the top
// passes them through sync2), CONF is sampled on the clock edge where the
// rising edge of SHCONF is detected (CONF is stable from the rising to the
// falling edge of SHCONF), and REGCONF resets to dtc_pkg::REGCONF_RST.
//
// Timing: REGCONF changes one cycle after the cycle in which the synchronized
// SHCONF is first seen high; cfg_mode drops one cycle after the synchronized
// BCV is first seen low after having been high.
module serial_port
  import dtc_pkg::*;
#(
  parameter int unsigned            W       = REGCONF_W,
  parameter logic [REGCONF_W-1:0]   RST_VAL = REGCONF_RST
) (
  input  logic         clk,
  input  logic         rst_n,     // BRST, asynchronous, active low
  input  logic         conf,      // CONF serial data (synchronized)
  input  logic         shconf,    // SHCONF shift clock (synchronized)
  input  logic         bcv,       // BCV (synchronized)
  output logic [W-1:0] regconf,   // REGCONF contents
  output logic         cfg_mode   // 1 = configuration mode, 0 = normal mode
);

  logic shconf_q, bcv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shconf_q <= 1'b0;
      bcv_q    <= 1'b0;
      regconf  <= W'(RST_VAL);
      cfg_mode <= 1'b1;
    end else begin
      shconf_q <= shconf;
      bcv_q    <= bcv;
      if (cfg_mode) begin
        if (shconf && !shconf_q)
          regconf <= {conf, regconf[W-1:1]};
        if (bcv_q && !bcv)
          cfg_mode <= 1'b0;
      end
    end
  end

endmodule
