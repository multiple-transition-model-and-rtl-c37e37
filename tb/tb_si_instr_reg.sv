// tb_si_instr_reg: self-checking testbench of the instruction register and decoder.
// The TAP strobes are driven directly. For each instruction the testbench shifts
// the opcode in, updates it, checks the value captured in Capture-IR (0001 shifted
// out), and then checks the decoded controls in Capture-DR, Shift-DR, Update-DR
// and an idle state against the instruction table of the design: which of ClockDR
// and UpdateDR reach the cells, Mode, SI, flag clearing, and the bypass register.
module tb_si_instr_reg;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0, trst_n = 1'b1, tdi = 1'b0;
  logic tlr, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  instr_e instr;
  logic ir_so, byp_so, sel_bsr;
  bs_ctrl_t ctrl;
  int checks = 0, failures = 0;

  si_instr_reg u_dut (.tck, .trst_n, .tdi, .tlr, .capture_dr, .shift_dr, .update_dr,
                      .capture_ir, .shift_ir, .update_ir, .instr, .ir_so, .byp_so,
                      .sel_bsr, .ctrl);

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic strobes(input logic [6:0] s);  // tlr cdr sdr udr cir sir uir
    {tlr, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir} = s;
  endtask

  task automatic load_ir(input logic [3:0] op);
    logic [3:0] got;
    strobes(7'b0000100); @(posedge tck); #1;            // Capture-IR
    strobes(7'b0000010);
    for (int i = 0; i < 4; i++) begin
      tdi = op[i]; #1; got[i] = ir_so;
      @(posedge tck); #1;
    end
    check(got == 4'b0001, 1'b1, "Capture-IR pattern shifted out");
    strobes(7'b0000001); @(posedge tck); #1;             // Update-IR
    strobes(7'b0000000);
  endtask

  // Expected decode: {clock_dr in CapDR, clock_dr in ShDR, update_dr, mode, si, sel_bsr}
  task automatic check_decode(input string name, input logic cap, input logic upd,
                              input logic mode, input logic si, input logic sel, input logic clr_sh);
    strobes(7'b0100000); #1;
    check(ctrl.clock_dr, cap, {name, " ClockDR in Capture-DR"});
    check(ctrl.shift_dr, 1'b0, {name, " ShiftDR low in Capture-DR"});
    strobes(7'b0010000); #1;
    check(ctrl.clock_dr, sel, {name, " ClockDR in Shift-DR"});
    check(ctrl.shift_dr, 1'b1, {name, " ShiftDR in Shift-DR"});
    check(ctrl.flag_clr, clr_sh, {name, " flag clear in Shift-DR"});
    strobes(7'b0001000); #1;
    check(ctrl.update_dr, upd, {name, " UpdateDR"});
    strobes(7'b0000000); #1;
    check(ctrl.clock_dr | ctrl.update_dr | ctrl.flag_clr, 1'b0, {name, " idle"});
    check(ctrl.mode, mode, {name, " Mode"});
    check(ctrl.si, si, {name, " SI"});
    check(sel_bsr, sel, {name, " boundary register selected"});
  endtask

  initial begin
    strobes('0);
    #1 trst_n = 0;
    #1;
    check(instr == I_BYPASS, 1'b1, "BYPASS after trst_n");
    trst_n = 1;
    @(negedge tck);

    load_ir(4'b0000); check(instr == I_EXTEST,   1'b1, "EXTEST loaded");
    check_decode("EXTEST",   1, 1, 1, 0, 1, 0);
    load_ir(4'b0001); check(instr == I_SAMPLE,   1'b1, "SAMPLE loaded");
    check_decode("SAMPLE",   1, 1, 0, 0, 1, 0);
    load_ir(4'b1000); check(instr == I_G_SITEST, 1'b1, "G_SITEST loaded");
    check_decode("G_SITEST", 0, 1, 1, 1, 1, 0);
    load_ir(4'b1001); check(instr == I_O_SITEST, 1'b1, "O_SITEST loaded");
    check_decode("O_SITEST", 1, 0, 1, 1, 1, 1);
    load_ir(4'b0110); check(instr == I_BYPASS,   1'b1, "unknown opcode selects BYPASS");
    check_decode("unknown",  0, 0, 0, 0, 0, 0);

    // Bypass register: Capture-DR loads 0, Shift-DR passes TDI with one cycle delay.
    strobes(7'b0100000); @(posedge tck); #1;
    check(byp_so, 1'b0, "bypass captures 0");
    strobes(7'b0010000);
    for (int i = 0; i < 16; i++) begin
      logic b;
      b = 1'($urandom);
      tdi = b; @(posedge tck); #1;
      check(byp_so, b, "bypass shifts");
    end

    // Test-Logic-Reset returns to BYPASS and clears the flags.
    load_ir(4'b1000);
    strobes(7'b1000000); #1;
    check(ctrl.flag_clr, 1'b1, "flag clear in Test-Logic-Reset");
    @(posedge tck); #1;
    check(instr == I_BYPASS, 1'b1, "Test-Logic-Reset selects BYPASS");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
