// tb_bidir_si_cell: self-checking testbench of the bidirectional enhanced cell group.
// Checks the functional path (Mode=0), loading enable and data through the
// three-cell scan segment (control -> drive -> receive), aggressor and victim
// pattern generation on the driven value with the enable held, and the integrity
// flag of the receive side captured with SI=1 after a late transition.
module tb_bidir_si_cell;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0;
  bs_ctrl_t ctrl;
  logic core_out, core_oe, core_in, pin_out, pin_oe, pin_in, scan_in, scan_out;
  int checks = 0, failures = 0;
  int n_toggle = 0;

  bidir_si_cell #(.ILS_WINDOW(2.0ns)) u_dut (.tck, .ctrl, .core_out, .core_oe, .core_in,
    .pin_out, .pin_oe, .pin_in, .scan_in, .scan_out);

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

  task automatic cyc(input logic cdr, input logic sdr, input logic udr);
    ctrl.clock_dr = cdr; ctrl.shift_dr = sdr; ctrl.update_dr = udr;
    @(posedge tck); #1;
    ctrl.clock_dr = 0; ctrl.shift_dr = 0; ctrl.update_dr = 0;
  endtask

  // Shift {ctl, drv, rcv}: the receive bit goes first, it travels furthest.
  task automatic shift3(input logic ctl, input logic drv, input logic rcv);
    scan_in = rcv; cyc(1, 1, 0);
    scan_in = drv; cyc(1, 1, 0);
    scan_in = ctl; cyc(1, 1, 0);
  endtask

  initial begin
    ctrl = '0; core_out = 0; core_oe = 0; pin_in = 0; scan_in = 0;
    ctrl.flag_clr = 1;
    @(negedge tck);
    ctrl.flag_clr = 0;

    for (int i = 0; i < 8; i++) begin
      {core_out, core_oe, pin_in} = 3'(i); #1;
      check(pin_out, core_out, "functional drive");
      check(pin_oe,  core_oe,  "functional enable");
      check(core_in, pin_in,   "functional receive");
    end

    // Test mode: enable 1, data 1.
    shift3(1, 1, 0); cyc(0, 0, 1);
    ctrl.mode = 1; #1;
    check(pin_oe, 1'b1, "enable from control cell");
    check(pin_out, 1'b1, "data from PGBSC");

    for (int sel = 0; sel < 2; sel++) begin
      logic exp;
      ctrl.si = 0; shift3(1, 0, 0); cyc(0, 0, 1);     // seed 0, enable 1
      ctrl.si = 1; shift3(1, 1'(sel), 0);              // select aggressor / victim
      exp = 0;
      for (int u = 1; u <= 4; u++) begin
        cyc(0, 0, 1);
        if (sel == 0 || u % 2 == 0) begin exp = ~exp; n_toggle++; end
        check(pin_out, exp, sel ? "victim drive" : "aggressor drive");
        check(pin_oe, 1'b1, "enable held during generation");
      end
    end

    // Receive side: late transition with SI=1 sets F, captured into the last FF1.
    ctrl.si = 1;
    @(posedge tck); #4 pin_in = ~pin_in;
    @(negedge tck);
    cyc(1, 0, 0);
    check(scan_out, 1'b1, "integrity flag captured");
    ctrl.flag_clr = 1; #1; ctrl.flag_clr = 0;
    @(posedge tck); #1 pin_in = ~pin_in;
    @(negedge tck);
    cyc(1, 0, 0);
    check(scan_out, 1'b0, "in-time transition after clear");

    checks++;
    if (n_toggle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
