// dt_insert: dead-time insertion for one inverter bridge arm.
//
// From one compensated command C_P it makes the two gate commands of the arm:
// ict_h for the upper IGBT (iCT1, iCT3, iCT5) and ict_l for the lower one
// (iCT4, iCT6, iCT2). A counter runs up to the dead time INSE while C_P is high
// and back down to zero while C_P is low:
//   * C_P high: ict_l is cleared at once; while the counter is below INSE it
//               counts up and ict_h stays low; once it reaches INSE, ict_h is set.
//   * C_P low : ict_h is cleared at once; while the counter is above zero it
//               counts down and ict_l stays low; at zero, ict_l is set.
// So each turn-on is delayed by INSE cycles after the other switch's
// turn-off, and a C_P pulse shorter than INSE never turns a switch on. This is
// the algorithm of the source specification.
//
// Own choices: INSE comes from REGCONF in clock cycles (width W); reset clears
// both outputs and the counter.
//
// Timing: outputs are registered. ict_l/ict_h go low one cycle after C_P
// changes; the opposite switch turns on INSE + 1 cycles after C_P changes (when
// the previous half period was at least INSE cycles long).
module dt_insert
  import dtc_pkg::*;
#(
  parameter int unsigned W = INSE_W
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic [W-1:0] inse,   // dead time in clock cycles
  input  logic         c_p,    // compensated command
  output logic         ict_h,  // upper switch command
  output logic         ict_l   // lower switch command
);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      ict_h <= 1'b0;
      ict_l <= 1'b0;
    end else if (c_p) begin
      ict_l <= 1'b0;
      if (cnt >= inse) begin
        ict_h <= 1'b1;
      end else begin
        ict_h <= 1'b0;
        cnt   <= cnt + 1'b1;
      end
    end else begin
      ict_h <= 1'b0;
      if (cnt == '0) begin
        ict_l <= 1'b1;
      end else begin
        ict_l <= 1'b0;
        cnt   <= cnt - 1'b1;
      end
    end
  end

  // The two switches of an arm are never commanded on together.
  assert property (@(posedge clk) disable iff (!rst_n) !(ict_h && ict_l));

endmodule
