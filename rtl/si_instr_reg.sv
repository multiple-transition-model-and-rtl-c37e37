// si_instr_reg: instruction register, bypass register and instruction decoder of
// the signal-integrity boundary-scan architecture.
//
// The instruction register shifts between TDI and TDO in Shift-IR, captures the
// fixed pattern 0001 in Capture-IR (the standard requires the two low bits 01) and
// moves to the active instruction in Update-IR; Test-Logic-Reset selects BYPASS.
// The decoder turns the TAP state and the active instruction into the control
// bundle of the boundary cells:
//   EXTEST    Mode=1, SI=0: capture, shift and update as in the standard.
//   SAMPLE    Mode=0, SI=0: capture, shift and update (preload) only.
//   G_SITEST  Mode=1, SI=1: pattern generation. UpdateDR makes the PGBSCs
//             toggle. FF1 loads only in Shift-DR, never in Capture-DR, so the
//             victim-select data and the integrity flags are kept while the ATE
//             walks through Capture-DR to reach the next Update-DR.
//   O_SITEST  Mode=1, SI=1: integrity read-out, EXTEST with SI active. Capture-DR
//             loads the OBSC flags into FF1; the flags are cleared during the
//             Shift-DR that follows; UpdateDR is withheld so the read-out does
//             not disturb the interconnects.
//   BYPASS    the one-bit bypass register sits between TDI and TDO.
// Instruction names and the role of SI follow the method; the opcodes, the
// Capture-DR gating in G_SITEST, the UpdateDR gating in O_SITEST and the flag
// clearing are this design's own choices. Unknown opcodes behave as BYPASS.
//
// Timing: registers load on the rising TCK edge that ends the TAP state; the
// decoded controls are combinational from the TAP state and the instruction.
module si_instr_reg
  import si_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tdi,
  input  logic       tlr,
  input  logic       capture_dr,
  input  logic       shift_dr,
  input  logic       update_dr,
  input  logic       capture_ir,
  input  logic       shift_ir,
  input  logic       update_ir,
  output instr_e     instr,      // active instruction
  output logic       ir_so,      // instruction register scan output
  output logic       byp_so,     // bypass register scan output
  output logic       sel_bsr,    // boundary register is the selected data register
  output bs_ctrl_t   ctrl        // control bundle of the boundary cells
);
  timeunit 1ns; timeprecision 1ps;

  logic [IR_W-1:0] ir_sh;
  logic            byp;

  always_ff @(posedge tck) begin
    if (capture_ir)    ir_sh <= 4'b0001;
    else if (shift_ir) ir_sh <= {tdi, ir_sh[IR_W-1:1]};
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)        instr <= I_BYPASS;
    else if (tlr)       instr <= I_BYPASS;
    else if (update_ir) begin
      unique case (ir_sh)
        I_EXTEST, I_SAMPLE, I_G_SITEST, I_O_SITEST: instr <= instr_e'(ir_sh);
        default:                                    instr <= I_BYPASS;
      endcase
    end

  always_ff @(posedge tck)
    if (capture_dr)    byp <= 1'b0;
    else if (shift_dr) byp <= tdi;

  assign ir_so  = ir_sh[0];
  assign byp_so = byp;

  logic is_g, is_o;
  assign is_g    = (instr == I_G_SITEST);
  assign is_o    = (instr == I_O_SITEST);
  assign sel_bsr = (instr == I_EXTEST) || (instr == I_SAMPLE) || is_g || is_o;

  always_comb begin
    ctrl           = '0;
    ctrl.shift_dr  = shift_dr;
    ctrl.clock_dr  = sel_bsr && (shift_dr || (capture_dr && !is_g));
    ctrl.update_dr = sel_bsr && update_dr && !is_o;
    ctrl.mode      = (instr == I_EXTEST) || is_g || is_o;
    ctrl.si        = is_g || is_o;
    ctrl.flag_clr  = tlr || (is_o && shift_dr);
    ctrl.tlr       = tlr;
  end
endmodule
