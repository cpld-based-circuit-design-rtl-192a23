// tb_serial_port: self-checking testbench for serial_port.
//
// Checks the reset value of REGCONF, serial loading with SHCONF high and low
// times of 4 to 9 cycles (the 100 ns minimum at 40 MHz and more), including
// more bits than the register holds, the exit from configuration mode exactly
// one cycle after BCV is seen low, that a BCV held low from reset does not
// leave configuration mode, and that REGCONF is locked in normal mode.
`timescale 1ns/1ps
module tb_serial_port;
  import dtc_pkg::*;

  localparam int W = REGCONF_W;

  logic clk = 0, rst_n = 0, conf = 0, shconf = 0, bcv = 0;
  logic [W-1:0] regconf;
  logic cfg_mode;
  logic [W-1:0] model;

  int checks = 0, failures = 0;

  serial_port dut (.*);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // send one bit: CONF set up before SHCONF rises, held until after it falls
  task automatic send_bit(input logic b);
    conf = b;
    @(posedge clk); #1;
    shconf = 1;
    repeat ($urandom_range(4, 9)) @(posedge clk);
    #1 shconf = 0;
    repeat ($urandom_range(4, 9)) @(posedge clk);
    #1 conf = 1'($urandom_range(0, 1));   // CONF may change while SHCONF is low
    model = {b, model[W-1:1]};
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(regconf == REGCONF_RST, "reset value");
    check(cfg_mode, "not in configuration mode after reset");
    model = REGCONF_RST;
    // BCV held low from reset: no falling edge, stays in configuration mode
    repeat (20) @(posedge clk); #1;
    check(cfg_mode, "left configuration mode without a BCV falling edge");
    bcv = 1;
    for (int round = 0; round < 6; round++) begin
      int nbits = $urandom_range(1, 2 * W);
      for (int i = 0; i < nbits; i++) begin
        send_bit(1'($urandom_range(0, 1)));
        check(regconf == model, $sformatf("REGCONF %h, expected %h", regconf, model));
      end
    end
    // falling edge of BCV: normal mode exactly one cycle after it is seen
    @(posedge clk); #1 bcv = 0;
    @(posedge clk); #1;
    check(!cfg_mode, "configuration mode not left one cycle after BCV fell");
    // locked: shifting does nothing, BCV toggling does nothing
    for (int i = 0; i < 2 * W; i++) begin
      send_bit(1'($urandom_range(0, 1)));
    end
    model = regconf;
    for (int i = 0; i < 2 * W; i++) begin
      conf = ~regconf[W-1];
      @(posedge clk); #1 shconf = 1;
      repeat (5) @(posedge clk); #1 shconf = 0;
      bcv = ~bcv;
      repeat (5) @(posedge clk); #1;
      check(regconf == model, "REGCONF changed in normal mode");
      check(!cfg_mode, "returned to configuration mode");
    end
    // a new reset returns to configuration mode
    rst_n = 0;
    #1;
    check(cfg_mode && regconf == REGCONF_RST, "reset does not restart configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
