// prot: protection block.
//
// The protection must stay active in every driven state (normal and PASS) and
// force all gate commands off when a default is detected. The source names
// over-current, over-voltage and open circuit. Over-current and over-voltage
// are sensed outside the CPLD and arrive on the BSAFE pin, which goes straight
// to output_control. This block detects the open circuit from the phase
// feedbacks: for each phase, if TFB disagrees with the command C_P for TIMEOUT
// consecutive cycles while the outputs are driven, the phase is taken as open
// and a fault is latched until reset. TIMEOUT defaults to 2^10 - 1 cycles, the
// largest lag the compensation counter can measure (25.6 us at 40 MHz). The
// detection method and the timeout are this implementation's own choice.
//
// Timing: open_fault is registered and rises on the cycle the mismatch counter
// reaches TIMEOUT; fault is its OR.
module prot
  import dtc_pkg::*;
#(
  parameter int unsigned NPH     = 3,
  parameter int unsigned TIMEOUT = (1 << CNT_BITS) - 1
) (
  input  logic           clk,
  input  logic           rst_n,       // asynchronous, active low
  input  logic           drive,       // 1 = outputs are being driven
  input  logic [NPH-1:0] cmd,         // C_P per phase
  input  logic [NPH-1:0] tfb,         // TFB per phase (synchronized)
  output logic [NPH-1:0] open_fault,  // latched open-circuit fault per phase
  output logic           fault        // 1 = force all outputs off
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [TW-1:0] mis_cnt [NPH];

  for (genvar p = 0; p < NPH; p++) begin : g_ph
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mis_cnt[p]    <= '0;
        open_fault[p] <= 1'b0;
      end else if (!drive || cmd[p] == tfb[p]) begin
        mis_cnt[p] <= '0;
      end else if (mis_cnt[p] == TW'(TIMEOUT - 1)) begin
        mis_cnt[p]    <= TW'(TIMEOUT);
        open_fault[p] <= 1'b1;
      end else if (mis_cnt[p] != TW'(TIMEOUT)) begin
        mis_cnt[p] <= mis_cnt[p] + 1'b1;
      end
    end
  end

  assign fault = |open_fault;

endmodule
