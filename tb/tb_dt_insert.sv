// tb_dt_insert: self-checking testbench for dt_insert.
//
// For several dead times INSE (including 0 and the largest value) the command
// C_P toggles with half periods drawn at random, long ones (at least INSE + 2
// cycles) and short ones (below INSE). Checked every cycle: the two switch
// commands are never high together; a switch turns off one cycle after C_P
// leaves its level; after a long half period the other switch turns on exactly
// INSE + 1 cycles after the C_P edge; a C_P high pulse shorter than INSE that
// follows a long low period never turns the upper switch on.
`timescale 1ns/1ps
module tb_dt_insert;
  import dtc_pkg::*;

  localparam int W = INSE_W;

  logic clk = 0, rst_n = 0, c_p = 0;
  logic [W-1:0] inse = '0;
  logic ict_h, ict_l;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dt_insert dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d inse=%0d: %s", cyc, inse, what);
    end
  endtask

  // Hold C_P at `level` for `n` cycles and check the outputs on every cycle.
  // prev_long: the previous half period was at least INSE + 2 cycles long.
  task automatic hold(input logic level, input int n, input bit prev_long);
    c_p = level;
    for (int k = 1; k <= n; k++) begin
      @(posedge clk); #1;
      check(!(ict_h && ict_l), "both switches on");
      if (level) begin
        check(!ict_l, "lower switch on while C_P high");
        if (prev_long)
          check(ict_h == (k >= int'(inse) + 1),
                $sformatf("upper switch at cycle %0d after rise: %0b", k, ict_h));
      end else begin
        check(!ict_h, "upper switch on while C_P low");
        if (prev_long)
          check(ict_l == (k >= int'(inse) + 1),
                $sformatf("lower switch at cycle %0d after fall: %0b", k, ict_l));
      end
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dts[5] = '{0, 1, 5, 40, (1 << W) - 1};
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    foreach (dts[i]) begin
      inse = W'(dts[i]);
      // settle: long low period
      hold(0, dts[i] + 5, 0);
      for (int j = 0; j < 20; j++) begin
        hold(1, dts[i] + 2 + $urandom_range(0, 60), 1);
        hold(0, dts[i] + 2 + $urandom_range(0, 60), 1);
      end
      // short high pulse after a long low period: upper switch stays off
      if (dts[i] > 1) begin
        for (int k = 0; k < 5; k++) begin
          c_p = 1;
          repeat ($urandom_range(1, dts[i] - 1)) begin
            @(posedge clk); #1;
            check(!ict_h && !ict_l, "short pulse turned a switch on");
          end
          hold(0, dts[i] + 2 + $urandom_range(0, 10), 0);
          check(ict_l, "lower switch not back on after short pulse");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
