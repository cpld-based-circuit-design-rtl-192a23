// dtc_cpld: IGBT dead-time compensation CPLD for a three-phase inverter.
//
// The controller sends the theoretical switching commands T1..T6 of the six
// IGBTs. For each phase (T1/TFB1 -> CT1/CT4, T3/TFB3 -> CT3/CT6,
// T5/TFB5 -> CT5/CT2) the CPLD first compensates the command for the measured
// lag of the phase voltage feedback TFBx (dt_comp), then inserts the dead time
// INSE between the two switches of the arm (dt_insert). A serial port loads the
// configuration register REGCONF (compensation on/off and INSE) in
// configuration mode and locks it at the falling edge of BCV; the protection
// block (prot) and the output control decide what reaches CT1..CT6:
//   reset / configuration / BSAFE low / protection fault : all outputs 0
//   PASS = 1 : CTi repeats Ti, compensation inhibited
//   normal   : CTi = compensated, dead-time inserted commands
// The block structure and the pin names follow the source specification.
// Own choices: every asynchronous input is synchronized by two flip-flops
// (sync2), BRST is used as an asynchronous active-low reset, and the REGCONF
// layout is given in dtc_pkg.
//
// Timing (40 MHz clock): with compensation off and no dead time, an edge on Tx
// reaches CTx after 2 (sync) + 1 (dt_comp) + 1 (dt_insert) + 1 (output) = 5
// cycles; in PASS, after 2 + 1 = 3 cycles.
module dtc_cpld
  import dtc_pkg::*;
(
  input  logic       clk,     // 40 MHz
  input  logic       BRST,    // reset, active low
  input  logic       CONF,    // serial configuration data
  input  logic       SHCONF,  // serial configuration shift clock
  input  logic       BCV,     // falling edge leaves configuration mode
  input  logic       PASS,    // 1 = repeat T1..T6 on CT1..CT6
  input  logic       BSAFE,   // 0 = unsafe, outputs forced off
  input  logic       T1, T2, T3, T4, T5, T6,
  input  logic       TFB1, TFB3, TFB5,
  output logic       CT1, CT2, CT3, CT4, CT5, CT6,
  output logic [2:0] STATE    // circuit_state_e of the output control
);

  // ---- input synchronization ----
  logic [6:1] t_s;
  logic [2:0] tfb_s;
  logic       conf_s, shconf_s, bcv_s, pass_s, bsafe_s;

  sync2 #(.W(6)) u_sync_t (
    .clk, .rst_n(BRST), .d({T6, T5, T4, T3, T2, T1}), .q(t_s)
  );
  sync2 #(.W(3)) u_sync_tfb (
    .clk, .rst_n(BRST), .d({TFB5, TFB3, TFB1}), .q(tfb_s)
  );
  sync2 #(.W(5)) u_sync_ctl (
    .clk, .rst_n(BRST), .d({CONF, SHCONF, BCV, PASS, BSAFE}),
    .q({conf_s, shconf_s, bcv_s, pass_s, bsafe_s})
  );

  // ---- serial port ----
  logic [REGCONF_W-1:0] regconf;
  logic                 cfg_mode;

  serial_port u_serial (
    .clk, .rst_n(BRST), .conf(conf_s), .shconf(shconf_s), .bcv(bcv_s),
    .regconf, .cfg_mode
  );

  wire              comp_en = regconf[REGCONF_W-1];
  wire [INSE_W-1:0] inse    = regconf[INSE_W-1:0];

  // ---- protection ----
  logic [2:0] open_fault;
  logic       fault;
  logic [2:0] c_p;
  circuit_state_e state;

  prot u_prot (
    .clk, .rst_n(BRST),
    .drive(state == ST_NORMAL || state == ST_PASS),
    .cmd(c_p), .tfb(tfb_s), .open_fault, .fault
  );

  // ---- per phase: compensation and dead-time insertion ----
  // Phase p uses command T(2p+1), feedback TFB(2p+1); upper switch CT(2p+1),
  // lower switch CT(2p+4) modulo 6: CT4, CT6, CT2.
  wire comp_run = comp_en && !cfg_mode && !pass_s && bsafe_s && !fault;
  logic [2:0] ict_h, ict_l;
  logic signed [CNT_BITS:0] comp_count [3];

  for (genvar p = 0; p < 3; p++) begin : g_phase
    dt_comp u_comp (
      .clk, .rst_n(BRST), .enable(comp_run), .t(t_s[2*p+1]), .tfb(tfb_s[p]),
      .c_p(c_p[p]), .count(comp_count[p])
    );
    dt_insert u_riv (
      .clk, .rst_n(BRST), .inse, .c_p(c_p[p]), .ict_h(ict_h[p]), .ict_l(ict_l[p])
    );
  end

  // ---- output control ----
  logic [6:1] ict, ct;
  assign ict = {ict_l[1], ict_h[2], ict_l[0], ict_h[1], ict_l[2], ict_h[0]};

  output_control u_out (
    .clk, .rst_n(BRST), .cfg_mode, .pass(pass_s), .bsafe(bsafe_s), .fault,
    .t(t_s), .ict, .ct, .state
  );

  assign {CT6, CT5, CT4, CT3, CT2, CT1} = ct;
  assign STATE = state;

endmodule
