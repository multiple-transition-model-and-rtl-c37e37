// si_soc_top: boundary-scan test architecture of a small SoC extended for
// signal-integrity testing of the interconnects between two cores.
//
// Core i drives N_IUT interconnects under test (IUT) into core j. Each driving end
// has a pattern generation cell (PGBSC, grouped in mt_pattern_gen), each receiving
// end an observation cell (OBSC) with an integrity loss sensor. N_BIDIR
// bidirectional lines between the two cores carry the enhanced bidirectional cell
// group at both ends. Core i's primary inputs and core j's primary outputs keep
// standard cells. One TAP controller and one instruction register serve the whole
// chain, so the JTAG pins are those of IEEE 1149.1 unchanged. Scan order:
//   TDI -> core i input BSCs -> core i bidir groups -> PGBSCs (line 0 first)
//       -> OBSCs (line 0 first) -> core j bidir groups -> core j output BSCs -> TDO
// The cores and the wires themselves are outside this module: their signals are
// ports. The architecture (cell types and where they sit, one chain, one TAP, the
// G_SITEST and O_SITEST instructions) follows the method; the counts M_IN, K_OUT
// and N_BIDIR, the chain order and the opcodes are this design's choices.
//
// Timing: everything runs on TCK; TDO is combinational from the selected
// register's last stage during Shift-IR/Shift-DR and 0 otherwise (a simplification
// of the standard's falling-edge TDO register).
module si_soc_top
  import si_pkg::*;
#(
  parameter int unsigned N_IUT      = N_IUT_DEFAULT,  // interconnects under test (n)
  parameter int unsigned M_IN       = M_IN_DEFAULT,   // core i primary inputs
  parameter int unsigned K_OUT      = K_OUT_DEFAULT,  // core j primary outputs
  parameter int unsigned N_BIDIR    = 2,              // bidirectional lines between the cores
  parameter realtime     ILS_WINDOW = 2.0ns           // acceptable delay region of the sensors
) (
  // JTAG
  input  logic               tck,
  input  logic               tms,
  input  logic               tdi,
  input  logic               trst_n,
  output logic               tdo,
  // core i
  input  logic [M_IN-1:0]    core_i_in_pin,   // chip pins into core i
  output logic [M_IN-1:0]    core_i_in,       // core i inputs
  input  logic [N_IUT-1:0]   core_i_out,      // core i outputs onto the IUT
  // interconnects under test
  output logic [N_IUT-1:0]   iut_drive,       // driving ends (PGBSC outputs)
  input  logic [N_IUT-1:0]   iut_recv,        // receiving ends (OBSC inputs)
  // core j
  output logic [N_IUT-1:0]   core_j_in,       // core j inputs from the IUT
  input  logic [K_OUT-1:0]   core_j_out,      // core j outputs
  output logic [K_OUT-1:0]   core_j_out_pin,  // chip pins from core j
  // bidirectional lines: core side and pad side of each end
  input  logic [N_BIDIR-1:0] bi_i_core_out,
  input  logic [N_BIDIR-1:0] bi_i_core_oe,
  output logic [N_BIDIR-1:0] bi_i_core_in,
  output logic [N_BIDIR-1:0] bi_i_pad_out,
  output logic [N_BIDIR-1:0] bi_i_pad_oe,
  input  logic [N_BIDIR-1:0] bi_i_pad_in,
  input  logic [N_BIDIR-1:0] bi_j_core_out,
  input  logic [N_BIDIR-1:0] bi_j_core_oe,
  output logic [N_BIDIR-1:0] bi_j_core_in,
  output logic [N_BIDIR-1:0] bi_j_pad_out,
  output logic [N_BIDIR-1:0] bi_j_pad_oe,
  input  logic [N_BIDIR-1:0] bi_j_pad_in
);
  timeunit 1ns; timeprecision 1ps;

  tap_state_e state;
  logic tlr, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  instr_e   instr;
  logic     ir_so, byp_so, sel_bsr;
  bs_ctrl_t ctrl;

  tap_ctrl u_tap (
    .tck, .trst_n, .tms, .state, .tlr,
    .capture_dr, .shift_dr, .update_dr, .capture_ir, .shift_ir, .update_ir
  );

  si_instr_reg u_ir (
    .tck, .trst_n, .tdi, .tlr,
    .capture_dr, .shift_dr, .update_dr, .capture_ir, .shift_ir, .update_ir,
    .instr, .ir_so, .byp_so, .sel_bsr, .ctrl
  );

  // ---- boundary register -------------------------------------------------
  logic [M_IN:0]    ch_in;     // core i input cells
  logic [N_BIDIR:0] ch_bi_i;   // core i bidirectional groups
  logic             so_pg;     // end of the PGBSC row
  logic [N_IUT:0]   ch_ob;     // OBSCs
  logic [N_BIDIR:0] ch_bi_j;   // core j bidirectional groups
  logic [K_OUT:0]   ch_out;    // core j output cells

  assign ch_in[0] = tdi;

  for (genvar i = 0; i < M_IN; i++) begin : g_in
    bsc u_bsc (
      .tck, .ctrl, .pi(core_i_in_pin[i]), .scan_in(ch_in[i]), .scan_out(ch_in[i+1]),
      .po(core_i_in[i])
    );
  end

  assign ch_bi_i[0] = ch_in[M_IN];

  for (genvar i = 0; i < N_BIDIR; i++) begin : g_bi_i
    bidir_si_cell #(.ILS_WINDOW(ILS_WINDOW)) u_bi (
      .tck, .ctrl,
      .core_out(bi_i_core_out[i]), .core_oe(bi_i_core_oe[i]), .core_in(bi_i_core_in[i]),
      .pin_out(bi_i_pad_out[i]), .pin_oe(bi_i_pad_oe[i]), .pin_in(bi_i_pad_in[i]),
      .scan_in(ch_bi_i[i]), .scan_out(ch_bi_i[i+1])
    );
  end

  mt_pattern_gen #(.N(N_IUT)) u_tpg (
    .tck, .ctrl, .core_out(core_i_out), .scan_in(ch_bi_i[N_BIDIR]), .scan_out(so_pg),
    .pin(iut_drive)
  );

  assign ch_ob[0] = so_pg;

  for (genvar i = 0; i < N_IUT; i++) begin : g_ob
    obsc #(.ILS_WINDOW(ILS_WINDOW)) u_obsc (
      .tck, .ctrl, .pin(iut_recv[i]), .scan_in(ch_ob[i]), .scan_out(ch_ob[i+1]),
      .core_in(core_j_in[i])
    );
  end

  assign ch_bi_j[0] = ch_ob[N_IUT];

  for (genvar i = 0; i < N_BIDIR; i++) begin : g_bi_j
    bidir_si_cell #(.ILS_WINDOW(ILS_WINDOW)) u_bi (
      .tck, .ctrl,
      .core_out(bi_j_core_out[i]), .core_oe(bi_j_core_oe[i]), .core_in(bi_j_core_in[i]),
      .pin_out(bi_j_pad_out[i]), .pin_oe(bi_j_pad_oe[i]), .pin_in(bi_j_pad_in[i]),
      .scan_in(ch_bi_j[i]), .scan_out(ch_bi_j[i+1])
    );
  end

  assign ch_out[0] = ch_bi_j[N_BIDIR];

  for (genvar i = 0; i < K_OUT; i++) begin : g_out
    bsc u_bsc (
      .tck, .ctrl, .pi(core_j_out[i]), .scan_in(ch_out[i]), .scan_out(ch_out[i+1]),
      .po(core_j_out_pin[i])
    );
  end

  // ---- TDO ---------------------------------------------------------------
  always_comb begin
    if (shift_ir)      tdo = ir_so;
    else if (shift_dr) tdo = sel_bsr ? ch_out[K_OUT] : byp_so;
    else               tdo = 1'b0;
  end
endmodule
