// tb_obsc: self-checking testbench of the observation boundary scan cell.
// With SI=0 the cell must behave as a standard input cell (capture the pin, shift,
// update, Mode mux). With SI=1 a late transition on the pin (4 ns after TCK, the
// sensor allows 2 ns) must set the flag, Capture must load the flag instead of the
// pin, flag_clr must clear it, and an in-time transition must leave it clear.
module tb_obsc;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0;
  bs_ctrl_t ctrl;
  logic pin, scan_in, scan_out, core_in;
  int checks = 0, failures = 0;
  int n_flag_set = 0, n_flag_clr = 0;

  obsc #(.ILS_WINDOW(2.0ns)) u_dut (.tck, .ctrl, .pin, .scan_in, .scan_out, .core_in);

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

  task automatic cyc(input logic cdr, input logic sdr, input logic udr);
    ctrl.clock_dr = cdr; ctrl.shift_dr = sdr; ctrl.update_dr = udr;
    @(posedge tck); #1;
    ctrl.clock_dr = 0; ctrl.shift_dr = 0; ctrl.update_dr = 0;
  endtask

  // Capture then read FF1 on scan_out.
  task automatic capture_and_check(input logic exp, input string what);
    cyc(1, 0, 0);
    check(scan_out, exp, what);
  endtask

  initial begin
    ctrl = '0; pin = 0; scan_in = 0;
    ctrl.flag_clr = 1;
    @(negedge tck);
    ctrl.flag_clr = 0;

    // ---- standard behaviour, SI = 0 ----
    for (int i = 0; i < 6; i++) begin
      pin = 1'(i % 2); #1;
      check(core_in, pin, "mode 0 passes the pin");
      capture_and_check(pin, "capture pin");
    end
    scan_in = 1; cyc(1, 1, 0); check(scan_out, 1'b1, "shift");
    cyc(0, 0, 1); ctrl.mode = 1; #1; check(core_in, 1'b1, "update drives core");
    scan_in = 0; cyc(1, 1, 0); cyc(0, 0, 1); check(core_in, 1'b0, "second update");
    ctrl.mode = 0;

    // Late transition with SI = 0: flag may be set, but capture still takes the pin.
    @(posedge tck); #4 pin = ~pin;
    @(negedge tck);
    capture_and_check(pin, "SI=0 ignores the sensor");
    ctrl.flag_clr = 1; #1; ctrl.flag_clr = 0;

    // ---- SI = 1 ----
    ctrl.si = 1;
    for (int r = 0; r < 6; r++) begin
      logic late;
      late = 1'(r % 2);
      @(posedge tck);
      if (late) #4 pin = ~pin; else #1 pin = ~pin;
      @(negedge tck);
      capture_and_check(late, late ? "late transition sets F" : "in-time transition leaves F clear");
      if (late) n_flag_set++;
      capture_and_check(late, "F is sticky");
      ctrl.flag_clr = 1; #1; ctrl.flag_clr = 0; n_flag_clr++;
      capture_and_check(1'b0, "flag_clr clears F");
    end
    ctrl.si = 0;

    $display("flag set=%0d cleared=%0d", n_flag_set, n_flag_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
