// si_pkg: types and constants shared by the signal-integrity boundary-scan design.
//
// The design extends an IEEE 1149.1 boundary-scan chain so that it can generate
// multiple-transition (MT) vector pairs on the interconnects leaving a core and
// record integrity losses seen at the far ends. This package holds the TAP state
// encoding, the instruction opcodes (two of which, G_SITEST and O_SITEST, are the
// signal-integrity instructions) and the control bundle that every boundary cell
// receives.
//
// Opcode values, the 4-bit instruction width and the default sizes are this
// design's own choices; only the instruction names and the line count n come from
// the method being implemented.
package si_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Default number of interconnects under test (n); the largest size evaluated.
  localparam int unsigned N_IUT_DEFAULT = 32;
  // Default number of standard cells on core i's inputs and on core j's outputs.
  localparam int unsigned M_IN_DEFAULT  = 4;
  localparam int unsigned K_OUT_DEFAULT = 4;

  localparam int unsigned IR_W = 4;

  typedef enum logic [IR_W-1:0] {
    I_EXTEST   = 4'b0000,
    I_SAMPLE   = 4'b0001,  // SAMPLE/PRELOAD
    I_G_SITEST = 4'b1000,  // generate MT patterns (PGBSCs toggle on UpdateDR)
    I_O_SITEST = 4'b1001,  // read integrity flags (EXTEST with SI active)
    I_BYPASS   = 4'b1111
  } instr_e;

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    TLR        = 4'd0,
    RTI        = 4'd1,
    SEL_DR     = 4'd2,
    CAPTURE_DR = 4'd3,
    SHIFT_DR   = 4'd4,
    EXIT1_DR   = 4'd5,
    PAUSE_DR   = 4'd6,
    EXIT2_DR   = 4'd7,
    UPDATE_DR  = 4'd8,
    SEL_IR     = 4'd9,
    CAPTURE_IR = 4'd10,
    SHIFT_IR   = 4'd11,
    EXIT1_IR   = 4'd12,
    PAUSE_IR   = 4'd13,
    EXIT2_IR   = 4'd14,
    UPDATE_IR  = 4'd15
  } tap_state_e;

  // Control bundle broadcast to all boundary cells. All cells are clocked by TCK;
  // clock_dr and update_dr are clock enables standing for the ClockDR and UpdateDR
  // clocks of the classic cell.
  typedef struct packed {
    logic shift_dr;   // ShiftDR: FF1 takes the scan input instead of the parallel input
    logic clock_dr;   // FF1 loads on this TCK edge (capture or shift)
    logic update_dr;  // FF2 loads on this TCK edge
    logic mode;       // output mux selects FF2 (test mode)
    logic si;         // signal-integrity test mode
    logic flag_clr;   // clears the OBSC integrity flags (asynchronous, level)
    logic tlr;        // TAP is in Test-Logic-Reset
  } bs_ctrl_t;

endpackage
