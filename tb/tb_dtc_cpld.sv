// tb_dtc_cpld: end-to-end testbench of the dead-time compensation CPLD.
//
// A plant model stands for the three inverter legs: each phase voltage
// feedback TFBx follows the upper switch when the phase current is positive
// and the inverse of the lower switch when it is negative (the diodes conduct
// during the dead time), delayed by a per-phase driver delay. The controller
// side loads REGCONF serially, leaves configuration mode with a falling edge
// of BCV and sends three independent pulse trains on T1, T3, T5 (T4, T6, T2
// are their complements).
//
// Sequence, all with the top at its default sizes:
//   1. configuration with compensation off, INSE = 20: outputs stay 0 while
//      configuring; in normal mode every TFB pulse is shorter (positive
//      current) or longer (negative current) than its T pulse by INSE + 1.
//   2. reset, configuration with compensation on: every TFB pulse is as wide
//      as its T pulse to within 2 cycles.
//   3. PASS = 1: CT1..CT6 repeat T1..T6 three cycles later; PASS = 0 again.
//   4. BSAFE = 0: all outputs off three cycles later; BSAFE = 1 releases.
//   5. phase 5 feedback stuck: the open-circuit fault turns all outputs off
//      and holds them off.
// Checked throughout (except in PASS, where the controller's T1..T6 are
// repeated as they are): upper and lower switch of an arm never on together,
// and in normal mode each switch turns on INSE cycles after the other
// turns off. Each mechanism (configuration shift, BCV mode switch, reset,
// compensation, dead-time insertion, PASS, BSAFE, open-circuit fault) is
// counted and must occur.
`timescale 1ns/1ps
module tb_dtc_cpld;
  import dtc_pkg::*;

  localparam int INSE = 20;
  localparam int DRV[3] = '{8, 15, 3};     // driver + measurement delay, cycles
  localparam bit POS[3] = '{1'b1, 1'b0, 1'b1};  // sign of the phase current

  logic clk = 0;
  logic BRST = 0, CONF = 0, SHCONF = 0, BCV = 1, PASS = 0, BSAFE = 1;
  logic T1, T3, T5;
  logic T2 = 1, T4 = 1, T6 = 1;
  logic TFB1, TFB3, TFB5;
  logic CT1, CT2, CT3, CT4, CT5, CT6;
  logic [2:0] STATE;

  dtc_cpld dut (.*);

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // mechanism counters
  int n_shift = 0, n_bcv = 0, n_reset = 0, n_comp = 0, n_nocomp = 0,
      n_dead = 0, n_pass = 0, n_bsafe = 0, n_open = 0;

  // ---------------- plant ----------------
  logic [2:0] ct_h, ct_l, tfb, stuck = '0;
  assign ct_h = {CT5, CT3, CT1};
  assign ct_l = {CT2, CT6, CT4};
  assign {TFB5, TFB3, TFB1} = tfb;
  logic [2:0] volt;
  always_comb
    for (int p = 0; p < 3; p++)
      volt[p] = POS[p] ? ct_h[p] : !ct_l[p];
  logic [63:0] vhist [3];
  always @(posedge clk)
    for (int p = 0; p < 3; p++) begin
      vhist[p] <= {vhist[p][62:0], volt[p]};
      if (!stuck[p]) tfb[p] <= vhist[p][DRV[p]-1];
    end
  initial begin
    tfb = '0;
    for (int p = 0; p < 3; p++) vhist[p] = '0;
  end

  // ---------------- controller commands ----------------
  logic [2:0] t_hi = '0;
  bit run_t = 0, pass_random = 0;
  assign {T5, T3, T1} = t_hi;
  for (genvar p = 0; p < 3; p++) begin : g_cmd
    initial begin
      forever begin
        @(posedge clk);
        if (run_t) begin
          #1 t_hi[p] = 1'b1;
          repeat ($urandom_range(100, 400)) @(posedge clk);
          #1 t_hi[p] = 1'b0;
          repeat ($urandom_range(100, 400)) @(posedge clk);
        end
      end
    end
  end
  always @(posedge clk) begin
    #2;
    if (pass_random) {T6, T4, T2} = 3'($urandom);
    else {T6, T4, T2} = {!T3, !T1, !T5};
  end

  // ---------------- pulse width measurement ----------------
  bit measure = 0, comp_expected = 0;
  longint tr[3], tf[3], fr[3];
  logic [2:0] t_q = '0, f_q = '0;
  always @(posedge clk)
    for (int p = 0; p < 3; p++) begin
      t_q[p] <= t_hi[p];
      f_q[p] <= tfb[p];
      if (t_hi[p] && !t_q[p]) tr[p] = cyc;
      if (!t_hi[p] && t_q[p]) tf[p] = cyc;
      if (tfb[p] && !f_q[p]) fr[p] = cyc;
      if (!tfb[p] && f_q[p] && measure) begin
        automatic longint err = (cyc - fr[p]) - (tf[p] - tr[p]);
        if (comp_expected) begin
          check(err >= -2 && err <= 2,
                $sformatf("phase %0d compensated width error %0d", p, err));
          n_comp++;
        end else begin
          automatic int e = POS[p] ? -(INSE + 1) : (INSE + 1);
          check(err >= e - 1 && err <= e + 1,
                $sformatf("phase %0d uncompensated width error %0d, expected %0d", p, err, e));
          n_nocomp++;
        end
      end
    end

  // ---------------- dead time and exclusivity ----------------
  longint off_h[3], off_l[3];
  logic [2:0] h_q = '0, l_q = '0;
  bit dead_check = 0;
  bit excl_check = 1;   // off in PASS: T1..T6 are repeated as they come
  always @(negedge clk)
    for (int p = 0; p < 3; p++) begin
      if (excl_check)
        check(!(ct_h[p] && ct_l[p]), $sformatf("arm %0d: both switches on", p));
      h_q[p] <= ct_h[p];
      l_q[p] <= ct_l[p];
      if (!ct_h[p] && h_q[p]) off_h[p] = cyc;
      if (!ct_l[p] && l_q[p]) off_l[p] = cyc;
      if (dead_check && ct_h[p] && !h_q[p]) begin
        check(cyc - off_l[p] == INSE,
              $sformatf("arm %0d: upper on %0d cycles after lower off", p, cyc - off_l[p]));
        n_dead++;
      end
      if (dead_check && ct_l[p] && !l_q[p]) begin
        check(cyc - off_h[p] == INSE,
              $sformatf("arm %0d: lower on %0d cycles after upper off", p, cyc - off_h[p]));
        n_dead++;
      end
    end

  // ---------------- PASS: outputs repeat inputs ----------------
  logic [6:1] thist [4];
  bit pass_check = 0;
  always @(negedge clk) begin
    thist[3] <= thist[2]; thist[2] <= thist[1]; thist[1] <= thist[0];
    thist[0] <= {T6, T5, T4, T3, T2, T1};
    if (pass_check) begin
      check({CT6, CT5, CT4, CT3, CT2, CT1} == thist[2],
            $sformatf("PASS: CT %b, T three cycles earlier %b",
                      {CT6, CT5, CT4, CT3, CT2, CT1}, thist[2]));
      n_pass++;
    end
  end

  // ---------------- outputs off ----------------
  bit off_check = 0;
  always @(negedge clk)
    if (off_check)
      check({CT6, CT5, CT4, CT3, CT2, CT1} == '0, "outputs driven in an off state");

  // ---------------- stimulus ----------------
  task automatic configure(input logic comp, input int inse);
    logic [REGCONF_W-1:0] word = {comp, INSE_W'(inse)};
    BCV = 1;
    for (int i = 0; i < REGCONF_W; i++) begin
      #1 CONF = word[i];                       // first bit ends in REGCONF[0]
      repeat (2) @(posedge clk); #1 SHCONF = 1;
      repeat (5) @(posedge clk); #1 SHCONF = 0;
      repeat (5) @(posedge clk);
      n_shift++;
    end
    check(STATE == 3'(ST_CONFIG), "not in configuration state");
    #1 BCV = 0;
    repeat (4) @(posedge clk); #1;
    check(STATE == 3'(ST_NORMAL), "not in normal state after BCV fell");
    n_bcv++;
  endtask

  task automatic do_reset();
    #1 BRST = 0;
    repeat (3) @(posedge clk);
    check({CT6, CT5, CT4, CT3, CT2, CT1} == '0 && STATE == 3'(ST_RESET), "reset");
    #1 BRST = 1;
    n_reset++;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    do_reset();
    // 1. compensation off; commands run during configuration: outputs stay 0
    off_check = 1;
    run_t = 1;
    configure(1'b0, INSE);
    off_check = 0;
    repeat (2000) @(posedge clk);     // let the plant settle
    measure = 1; dead_check = 1; comp_expected = 0;
    repeat (20000) @(posedge clk);
    measure = 0; dead_check = 0;
    // 2. compensation on
    run_t = 0;
    repeat (500) @(posedge clk);
    do_reset();
    configure(1'b1, INSE);
    run_t = 1;
    repeat (3000) @(posedge clk);     // compensation learns the lags
    measure = 1; dead_check = 1; comp_expected = 1;
    repeat (30000) @(posedge clk);
    measure = 0; dead_check = 0;
    // 3. PASS
    #1 excl_check = 0; pass_random = 1; PASS = 1;
    repeat (6) @(posedge clk);
    check(STATE == 3'(ST_PASS), "not in PASS state");
    pass_check = 1;
    repeat (3000) @(posedge clk);
    pass_check = 0;
    #1 PASS = 0; pass_random = 0;
    repeat (6) @(posedge clk);
    check(STATE == 3'(ST_NORMAL), "not back in normal state");
    excl_check = 1;
    repeat (3000) @(posedge clk);
    // 4. BSAFE
    #1 BSAFE = 0;
    repeat (4) @(posedge clk);
    check(STATE == 3'(ST_SAFE), "not in safe state on BSAFE");
    off_check = 1;
    repeat (2000) @(posedge clk);
    off_check = 0;
    n_bsafe++;
    #1 BSAFE = 1;
    repeat (4) @(posedge clk);
    check(STATE == 3'(ST_NORMAL), "not released after BSAFE");
    repeat (3000) @(posedge clk);
    // 5. open circuit on phase 5
    #1 stuck[2] = 1;
    repeat ((1 << CNT_BITS) + 450) @(posedge clk);
    check(STATE == 3'(ST_SAFE), "open circuit not detected");
    if (STATE == 3'(ST_SAFE)) n_open++;
    repeat (2) @(posedge clk);
    stuck[2] = 0;
    off_check = 1;
    repeat (3000) @(posedge clk);
    off_check = 0;
    run_t = 0;
    do_reset();
    // mechanism coverage
    $display("mechanisms: shift=%0d bcv=%0d reset=%0d comp=%0d nocomp=%0d dead=%0d pass=%0d bsafe=%0d open=%0d",
             n_shift, n_bcv, n_reset, n_comp, n_nocomp, n_dead, n_pass, n_bsafe, n_open);
    check(n_shift > 0, "no configuration shift");
    check(n_bcv > 0, "no BCV mode switch");
    check(n_reset > 0, "no reset");
    check(n_comp > 0, "no compensated pulse");
    check(n_nocomp > 0, "no uncompensated pulse");
    check(n_dead > 0, "no dead time measured");
    check(n_pass > 0, "no PASS");
    check(n_bsafe > 0, "no BSAFE");
    check(n_open > 0, "no open-circuit fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
