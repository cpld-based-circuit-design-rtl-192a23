// dt_comp: dead-time compensation for one inverter phase.
//
// A signed up/down counter measures, on every edge of the command T, how long
// the phase feedback TFB lags the compensated command C_P, and delays the next
// opposite edge of C_P by that amount:
//   * T high, TFB low : count down. When the count reaches zero (or is already
//                       at or below zero) C_P rises. Counting goes on until TFB
//                       rises, leaving a negative value N2 (the rising-edge lag).
//   * T low,  TFB high: count up. When the count reaches zero C_P falls.
//                       Counting goes on until TFB falls, leaving a positive
//                       value N3 (the falling-edge lag).
//   * otherwise       : the counter holds.
// A rising edge of C_P is thus delayed by the previous falling-edge lag and a
// falling edge by the previous rising-edge lag, so TFB's pulse width equals
// T's. This counting rule is the one the source specifies; so are the 40 MHz
// clock (25 ns resolution) and the n = 10 bit counter (range 2^n cycles).
//
// Own choices: the counter is CNT_BITS magnitude bits plus a sign bit and
// saturates at +/-(2^CNT_BITS - 1); C_P is set to T's level when the count
// crosses zero rather than toggled, which is the same in normal operation and
// cannot lose step; the counter starts at zero. When `enable` is low
// (compensation not requested, PASS, or not in normal mode) the counter is
// cleared and C_P follows T directly.
//
// Timing: C_P is registered. With a zero count C_P follows T after one clock.
// Inputs must already be synchronized to clk.
module dt_comp
  import dtc_pkg::*;
#(
  parameter int unsigned N = CNT_BITS
) (
  input  logic clk,
  input  logic rst_n,    // asynchronous, active low
  input  logic enable,   // 1 = compensate, 0 = C_P follows T, counter cleared
  input  logic t,        // theoretical command Tx from the controller
  input  logic tfb,      // phase voltage feedback TFBx
  output logic c_p,      // compensated command C_Px
  output logic signed [N:0] count  // counter value (for observation)
);

  localparam logic signed [N:0] CMAX = (N+1)'((1 << N) - 1);
  localparam logic signed [N:0] CMIN = -CMAX;

  logic signed [N:0] count_nx;

  always_comb begin
    count_nx = count;
    if (t && !tfb) begin
      if (count > CMIN) count_nx = count - 1'b1;
    end else if (!t && tfb) begin
      if (count < CMAX) count_nx = count + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      c_p   <= 1'b0;
    end else if (!enable) begin
      count <= '0;
      c_p   <= t;
    end else begin
      count <= count_nx;
      if (t && count_nx <= 0)
        c_p <= 1'b1;
      else if (!t && count_nx >= 0)
        c_p <= 1'b0;
    end
  end

endmodule
