// tb_ils: self-checking testbench of the integrity loss sensor model.
// With a 10 ns launch clock and a 2 ns acceptable region, a transition 1 ns after
// the edge must pass silently, one 3 ns after it must give one pulse of 0.5 ns,
// two transitions after the same edge (a glitch) must give a pulse, and nothing
// may be reported while en=0.
module tb_ils;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, en = 1'b0, sig = 1'b0, viol;
  int checks = 0, failures = 0;
  int pulses = 0;
  int n_late = 0, n_glitch = 0, n_ok = 0, n_off = 0;

  ils #(.WINDOW(2.0ns), .PULSE(0.5ns)) u_dut (.clk, .en, .sig_in(sig), .viol);

  always #5 clk = ~clk;
  always @(posedge viol) pulses++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pulses(input int before_cnt, input int n, input string what);
    checks++;
    if (pulses - before_cnt != n) begin
      failures++;
      $display("FAIL %s: %0d pulses, expected %0d", what, pulses - before_cnt, n);
    end
  endtask

  initial begin
    int p;
    en = 1;
    @(posedge clk);
    for (int r = 0; r < 20; r++) begin
      int kind;
      kind = r % 4;
      @(posedge clk);
      p = pulses;
      case (kind)
        0: begin #1.0 sig = ~sig; n_ok++; end                       // in time
        1: begin                                                     // late
             #3.0 sig = ~sig; n_late++;
             #0.25;
             checks++; if (viol !== 1'b1) begin failures++; $display("FAIL pulse missing"); end
             #0.5;
             checks++; if (viol !== 1'b0) begin failures++; $display("FAIL pulse too long"); end
           end
        2: begin #0.5 sig = ~sig; #0.5 sig = ~sig; n_glitch++; end  // glitch
        default: begin en = 0; #3.0 sig = ~sig; n_off++; end        // disabled
      endcase
      @(negedge clk);
      expect_pulses(p, (kind == 1 || kind == 2) ? 1 : 0,
                    kind == 0 ? "in-time transition" : kind == 1 ? "late transition" :
                    kind == 2 ? "glitch" : "sensor disabled");
      en = 1;
    end
    $display("ok=%0d late=%0d glitch=%0d disabled=%0d pulses=%0d", n_ok, n_late, n_glitch, n_off, pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
