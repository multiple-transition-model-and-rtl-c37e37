// tap_ctrl: IEEE 1149.1 test access port controller.
//
// The sixteen-state machine of the standard, advanced by TMS on each rising edge
// of TCK and forced to Test-Logic-Reset by trst_n (asynchronous, active low) or
// by five TCK cycles with TMS=1. The signal-integrity extension uses the TAP
// without change; this is a plain implementation of the standard controller.
//
// Outputs are decodes of the current state, valid for the whole TCK cycle spent
// in that state; a register that acts "in" a state (capture, shift, update)
// loads on the rising TCK edge that ends the state. Updating on the rising edge
// rather than the standard's falling edge is this design's simplification.
module tap_ctrl
  import si_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output logic       tlr,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir
);
  timeunit 1ns; timeprecision 1ps;

  tap_state_e nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR       : RTI;
      RTI:        nxt = tms ? SEL_DR    : RTI;
      SEL_DR:     nxt = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SEL_DR    : RTI;
      SEL_IR:     nxt = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: nxt = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   nxt = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   nxt = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   nxt = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   nxt = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  nxt = tms ? SEL_DR    : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TLR;
    else         state <= nxt;

  assign tlr        = (state == TLR);
  assign capture_dr = (state == CAPTURE_DR);
  assign shift_dr   = (state == SHIFT_DR);
  assign update_dr  = (state == UPDATE_DR);
  assign capture_ir = (state == CAPTURE_IR);
  assign shift_ir   = (state == SHIFT_IR);
  assign update_ir  = (state == UPDATE_IR);
endmodule
