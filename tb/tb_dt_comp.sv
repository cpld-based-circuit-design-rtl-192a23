// tb_dt_comp: self-checking testbench for dt_comp.
//
// A plant model turns the compensated command C_P into a phase feedback TFB
// that rises DR cycles after C_P rises and falls DF cycles after C_P falls
// (dead time plus driver delays, different for the two edges). The command T
// is a stream of pulses of pseudo-random widths. Once the counter has learnt
// the lags, every TFB pulse must be as wide as its T pulse (to within one
// cycle), C_P must rise about DF cycles and fall about DR cycles after T, and
// the counter must hold -DR / +DF between edges. With enable low, C_P must
// follow T one cycle later. The same is checked again with lags near the top
// of the counter range (2^N - 10 and 2^(N-1) cycles). With the feedback stuck,
// the counter must saturate at -(2^N - 1).
`timescale 1ns/1ps
module tb_dt_comp;
  import dtc_pkg::*;

  localparam int N  = CNT_BITS;
  // feedback lags after a rising / falling C_P, in cycles; first a short pair,
  // then a pair near the top of the counter range (25 us at 40 MHz)
  int DR = 37;
  int DF = 13;

  logic clk = 0, rst_n = 0, enable = 0, t = 0, tfb = 0;
  logic c_p;
  logic signed [N:0] count;
  logic stuck = 0;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dt_comp dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // plant model: delayed feedback
  int wait_c = 0;
  always @(posedge clk) begin
    if (!rst_n || stuck) begin
      wait_c <= 0;
      if (!rst_n) tfb <= 0;
    end else if (c_p == tfb) begin
      wait_c <= 0;
    end else if (wait_c + 1 >= (c_p ? DR : DF)) begin
      tfb    <= c_p;
      wait_c <= 0;
    end else begin
      wait_c <= wait_c + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // edge time stamps
  longint t_rise, t_fall, f_rise, f_fall, p_rise, p_fall;
  logic t_q = 0, tfb_q = 0, cp_q = 0;
  int  pulses_checked = 0;
  bit  measure = 0;
  always @(posedge clk) begin
    t_q <= t; tfb_q <= tfb; cp_q <= c_p;
    if (t && !t_q) t_rise = cyc;
    if (!t && t_q) t_fall = cyc;
    if (c_p && !cp_q) p_rise = cyc;
    if (!c_p && cp_q) p_fall = cyc;
    if (tfb && !tfb_q) f_rise = cyc;
    if (!tfb && tfb_q) begin
      f_fall = cyc;
      if (measure) begin
        automatic longint wt = t_fall - t_rise;
        automatic longint wf = f_fall - f_rise;
        check(wf >= wt - 1 && wf <= wt + 1,
              $sformatf("TFB width %0d vs T width %0d", wf, wt));
        check((p_rise - t_rise) >= DF - 1 && (p_rise - t_rise) <= DF + 1,
              $sformatf("C_P rise delay %0d, expected ~%0d", p_rise - t_rise, DF));
        check((p_fall - t_fall) >= DR - 1 && (p_fall - t_fall) <= DR + 1,
              $sformatf("C_P fall delay %0d, expected ~%0d", p_fall - t_fall, DR));
        pulses_checked++;
      end
    end
  end

  task automatic pulse(input int high, input int low);
    if (high <= DF + DR + 4) high = DF + DR + 4;
    if (low  <= DF + DR + 4) low  = DF + DR + 4;
    t = 1;
    repeat (high) @(posedge clk);
    // counter holds the rising-edge lag here
    if (measure)
      check(count >= -DR - 1 && count <= -DR + 1,
            $sformatf("N2 = %0d, expected ~%0d", count, -DR));
    #1 t = 0;
    repeat (low) @(posedge clk);
    if (measure)
      check(count >= DF - 1 && count <= DF + 1,
            $sformatf("N3 = %0d, expected ~%0d", count, DF));
    #1;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // ---- enable low: C_P follows T one cycle later ----
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      t = $urandom_range(0, 1);
      @(posedge clk); #1;
      check(c_p == t, "bypass: C_P != T");
      check(count == 0, "bypass: counter not cleared");
    end
    t = 0;
    repeat (60) @(posedge clk); #1;
    // ---- compensation ----
    enable = 1;
    pulse(200, 200);   // learning periods
    pulse(150, 180);
    measure = 1;
    for (int i = 0; i < 40; i++)
      pulse($urandom_range(60, 400), $urandom_range(60, 400));
    repeat (100) @(posedge clk);
    check(pulses_checked >= 39, $sformatf("only %0d pulses measured", pulses_checked));
    // ---- lags near the end of the range ----
    measure = 0;
    DR = (1 << N) - 10;
    DF = (1 << N) / 2;
    pulse(3000, 3000);
    pulse(3000, 3000);
    measure = 1;
    pulses_checked = 0;
    for (int i = 0; i < 6; i++)
      pulse($urandom_range(1600, 3000), $urandom_range(1600, 3000));
    repeat (100) @(posedge clk);
    check(pulses_checked >= 5, $sformatf("only %0d long-lag pulses measured", pulses_checked));
    // ---- stuck feedback: counter saturates ----
    measure = 0;
    stuck = 1;
    #1 t = 1;
    repeat ((2 << N) + 200) @(posedge clk);
    #1;
    check(count == -((1 << N) - 1), $sformatf("saturation: count=%0d", count));
    check(c_p == 1, "C_P should be high while T high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
