// tb_pgbsc: self-checking testbench of the pattern generation boundary scan cell.
// Checks the three modes of the cell: normal (standard capture/shift/update and
// the Mode mux), aggressor (the line toggles on every UpdateDR) and victim (the
// line holds on the first UpdateDR after SI rises and toggles on every second one,
// so four UpdateDRs give value sequence s, s, ~s, ~s, s). The expected values are
// counted from the number of UpdateDRs, not from a copy of the cell.
module tb_pgbsc;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0;
  bs_ctrl_t ctrl;
  logic core_out, scan_in, scan_out, pin;
  int checks = 0, failures = 0;
  int n_victim_toggle = 0, n_aggr_toggle = 0;

  pgbsc u_dut (.tck, .ctrl, .core_out, .scan_in, .scan_out, .pin);

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
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // One TCK cycle with the given strobes.
  task automatic cyc(input logic cdr, input logic sdr, input logic udr);
    ctrl.clock_dr = cdr; ctrl.shift_dr = sdr; ctrl.update_dr = udr;
    @(posedge tck); #1;
    ctrl.clock_dr = 0; ctrl.shift_dr = 0; ctrl.update_dr = 0;
  endtask

  // Load FF1 by shifting one bit (scan_in) and FF2 from FF1 in normal mode.
  task automatic load(input logic seed, input logic sel);
    logic si_save;
    si_save = ctrl.si;
    ctrl.si = 0;
    scan_in = seed; cyc(1, 1, 0);     // FF1 = seed
    cyc(0, 0, 1);                     // FF2 = seed
    scan_in = sel;  cyc(1, 1, 0);     // FF1 = select bit
    ctrl.si = si_save;
  endtask

  initial begin
    ctrl = '0; core_out = 0; scan_in = 0;
    @(negedge tck);

    // ---- normal mode ----------------------------------------------------
    ctrl.mode = 0;
    for (int i = 0; i < 8; i++) begin
      core_out = 1'(i); #1;
      check(pin, core_out, "mode 0 passes the core output");
    end
    core_out = 1; cyc(1, 0, 0);       // capture
    check(scan_out, 1'b1, "capture core output");
    scan_in = 0; cyc(1, 1, 0);        // shift
    check(scan_out, 1'b0, "shift");
    cyc(0, 0, 1);                     // update
    ctrl.mode = 1; #1;
    check(pin, 1'b0, "update and mode 1 drive FF2");
    scan_in = 1; cyc(1, 1, 0); cyc(0, 0, 1);
    check(pin, 1'b1, "second update");
    cyc(0, 0, 0);
    check(pin, 1'b1, "holds without update");

    // ---- aggressor and victim, both seeds --------------------------------
    for (int sel = 0; sel < 2; sel++) begin
      for (int seed = 0; seed < 2; seed++) begin
        logic exp;
        ctrl.si = 0;
        load(1'(seed), 1'(sel));
        ctrl.si = 1;
        cyc(0, 0, 0);                 // SI settles, no update
        check(pin, 1'(seed), "seed applied");
        exp = 1'(seed);
        for (int u = 1; u <= 8; u++) begin
          logic prev_pin;
          prev_pin = pin;
          cyc(0, 0, 1);
          if (sel == 0) exp = ~exp;                   // aggressor: every update
          else if (u % 2 == 0) exp = ~exp;            // victim: updates 2, 4, ...
          check(pin, exp, sel ? "victim sequence" : "aggressor sequence");
          if (pin != prev_pin) begin
            if (sel) n_victim_toggle++; else n_aggr_toggle++;
          end
          cyc(0, 0, 0);
          check(pin, exp, "holds between updates");
        end
        check(pin, 1'(seed), "back at the seed after an even number of pairs");
        check(scan_out, 1'(sel), "victim-select bit kept in FF1");
      end
    end

    // SI low makes the cell normal again: update loads FF1.
    ctrl.si = 0;
    scan_in = 0; cyc(1, 1, 0); cyc(0, 0, 1);
    check(pin, 1'b0, "normal update after SI");

    checks++;
    if (n_victim_toggle == 0 || n_aggr_toggle == 0) failures++;
    $display("victim toggles=%0d aggressor toggles=%0d", n_victim_toggle, n_aggr_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
