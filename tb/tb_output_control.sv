// tb_output_control: self-checking testbench for output_control.
//
// Drives random combinations of configuration mode, PASS, BSAFE, the
// protection fault and the T / iCT vectors, and checks on every cycle that CT1..CT6 and the
// reported state are those of the state table one cycle after the inputs:
// all zero in reset, configuration and safe states, T in PASS, iCT in normal
// mode, with configuration > safe > PASS > normal.
`timescale 1ns/1ps
module tb_output_control;
  import dtc_pkg::*;

  logic clk = 0, rst_n = 0, cfg_mode = 1, pass = 0, bsafe = 1, fault = 0;
  logic [6:1] t = '0, ict = '0, ct;
  circuit_state_e state;

  int checks = 0, failures = 0;
  int seen[5] = '{default: 0};

  output_control dut (.*);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:1] exp_ct;
    int exp_st;
    @(posedge clk); #1;
    check(ct == '0 && state == ST_RESET, "reset state");
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      cfg_mode = ($urandom_range(0, 7) == 0);
      bsafe    = ($urandom_range(0, 9) != 0);
      fault    = ($urandom_range(0, 9) == 0);
      pass     = ($urandom_range(0, 3) == 0);
      t        = 6'($urandom);
      ict      = 6'($urandom);
      if (cfg_mode)      begin exp_ct = '0;  exp_st = 1; end
      else if (!bsafe || fault) begin exp_ct = '0;  exp_st = 2; end
      else if (pass)     begin exp_ct = t;   exp_st = 3; end
      else               begin exp_ct = ict; exp_st = 4; end
      @(posedge clk); #1;
      check(ct == exp_ct, $sformatf("CT %b, expected %b", ct, exp_ct));
      check(int'(state) == exp_st, $sformatf("state %0d, expected %0d", state, exp_st));
      seen[exp_st]++;
    end
    rst_n = 0; #1;
    check(ct == '0 && state == ST_RESET, "reset clears outputs");
    for (int s = 1; s < 5; s++) check(seen[s] > 0, "state never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
