// sync2: two-flip-flop synchronizer for an asynchronous input pin.
//
// Every input of the CPLD (commands T1..T6, feedbacks TFB1/3/5, the serial
// port pins and the mode pins) is asynchronous to the 40 MHz clock and passes
// through one of these before any logic uses it. Latency: two clock cycles.
// RST_VAL is the value held during reset. Not described in the source
// material; it is a standard choice of this implementation.
module sync2 #(
  parameter int unsigned W       = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low
  input  logic [W-1:0] d,       // asynchronous input
  output logic [W-1:0] q        // synchronized to clk
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
