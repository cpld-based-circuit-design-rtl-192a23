// output_control: applies the circuit state to the six gate outputs CT1..CT6.
//
// States and outputs, as specified:
//   RESET   (BRST = 0)                       : CT1..CT6 = 0
//   CONFIG  (after reset, until BCV falls)   : CT1..CT6 = 0
//   SAFE    (BSAFE = 0 or protection fault)  : CT1..CT6 = 0
//   PASS    (PASS = 1)                       : CTi = Ti (inputs repeated)
//   NORMAL  (BCV has fallen)                 : CTi = iCTi (compensated,
//                                              dead-time inserted commands)
// Priority is RESET > CONFIG > SAFE > PASS > NORMAL, so the protection stays
// active in PASS. BSAFE is not latched; the protection fault is latched in prot. The source's state table lists 0 outputs for PASS, while its
// simulation description says that in PASS the outputs repeat the inputs and
// only the compensation is inhibited; this implementation follows the latter.
//
// Interface: vectors are indexed by switch number, bit i is Ti / iCTi / CTi.
// Timing: CT1..CT6 and `state` are registered, one clock after the inputs.
module output_control
  import dtc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,     // BRST, asynchronous, active low
  input  logic           cfg_mode,  // from serial_port
  input  logic           pass,      // PASS (synchronized)
  input  logic           bsafe,     // BSAFE (synchronized), 0 = unsafe
  input  logic           fault,     // latched fault from prot
  input  logic [6:1]     t,         // T1..T6 (synchronized)
  input  logic [6:1]     ict,       // iCT1..iCT6 from dead-time insertion
  output logic [6:1]     ct,        // CT1..CT6
  output circuit_state_e state
);

  circuit_state_e state_nx;
  logic [6:1]     ct_nx;

  always_comb begin
    if (cfg_mode)      state_nx = ST_CONFIG;
    else if (!bsafe || fault) state_nx = ST_SAFE;
    else if (pass)     state_nx = ST_PASS;
    else               state_nx = ST_NORMAL;

    unique case (state_nx)
      ST_PASS:   ct_nx = t;
      ST_NORMAL: ct_nx = ict;
      default:   ct_nx = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_RESET;
      ct    <= '0;
    end else begin
      state <= state_nx;
      ct    <= ct_nx;
    end
  end

endmodule
