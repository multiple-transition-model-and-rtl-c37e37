// tb_mt_pattern_gen: self-checking testbench of the MT pattern generator.
// Part 1, three lines with the middle one as victim: for each of the four seeds
// 000, 001, 100, 101 the five vectors seen on the lines must be exactly the rows
// of the resorted MT pattern table (e.g. 000 -> 101 -> 010 -> 111 -> 000).
// Part 1b: the two seeds 000 and 101 alone must produce all six maximum-aggressor
// pairs (000->101, 010->111, 111->010, 101->000, 010->101, 101->010).
// Part 2, eight lines with locality factor k=2: victim-select data 10010010 makes
// lines 0, 3, 6 victims; after four UpdateDRs one more 0 is shifted in and the
// victims move to lines 1, 4, 7, then to 2, 5. Every line must be a victim once,
// victims must toggle on every second and aggressors on every UpdateDR, and each
// group of four UpdateDRs must end on the seed.
module tb_mt_pattern_gen;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0;
  bs_ctrl_t ctrl;
  int checks = 0, failures = 0;

  // ---- part 1: N = 3 ------------------------------------------------------
  logic [2:0] co3 = '0, pin3;
  logic si3, so3;
  mt_pattern_gen #(.N(3)) u_dut3 (.tck, .ctrl, .core_out(co3), .scan_in(si3), .scan_out(so3), .pin(pin3));

  // ---- part 2: N = 8 ------------------------------------------------------
  logic [7:0] co8 = '0, pin8;
  logic si8, so8;
  mt_pattern_gen #(.N(8)) u_dut8 (.tck, .ctrl, .core_out(co8), .scan_in(si8), .scan_out(so8), .pin(pin8));

  always #5 tck = ~tck;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input logic cdr, input logic sdr, input logic udr);
    ctrl.clock_dr = cdr; ctrl.shift_dr = sdr; ctrl.update_dr = udr;
    @(posedge tck); #1;
    ctrl.clock_dr = 0; ctrl.shift_dr = 0; ctrl.update_dr = 0;
  endtask

  // Strings of the table are written line 1 first; line 1 is bit 0.
  function automatic logic [2:0] v3(input string s);
    return {s[2] == "1", s[1] == "1", s[0] == "1"};
  endfunction

  // Shift a word into the row, last bit (line 0) shifted in last.
  task automatic shift3(input logic [2:0] w);
    for (int i = 2; i >= 0; i--) begin si3 = w[i]; cyc(1, 1, 0); end
  endtask
  task automatic shift8(input logic [7:0] w);
    for (int i = 7; i >= 0; i--) begin si8 = w[i]; cyc(1, 1, 0); end
  endtask

  string tbl [4][5] = '{
    '{"000", "101", "010", "111", "000"},
    '{"001", "100", "011", "110", "001"},
    '{"100", "001", "110", "011", "100"},
    '{"101", "000", "111", "010", "101"}
  };

  int victim_seen [8];
  int n_rot = 0;

  initial begin
    ctrl = '0; si3 = 0; si8 = 0;
    ctrl.mode = 1;
    @(negedge tck);

    for (int s = 0; s < 4; s++) begin
      ctrl.si = 0;
      shift3(v3(tbl[s][0])); cyc(0, 0, 1);          // seed into FF2
      ctrl.si = 1;
      shift3(v3("010"));                            // middle line is victim
      checks++;
      if (pin3 !== v3(tbl[s][0])) begin
        failures++; $display("seed %s not applied: %b", tbl[s][0], pin3);
      end
      for (int u = 1; u <= 4; u++) begin
        cyc(0, 0, 1);
        checks++;
        if (pin3 !== v3(tbl[s][u])) begin
          failures++;
          $display("seed %s update %0d: got %b%b%b expected %s", tbl[s][0], u,
                   pin3[0], pin3[1], pin3[2], tbl[s][u]);
        end
      end
    end

    // ---- part 1b: seeds 000 and 101 alone give all six maximum-aggressor pairs ----
    begin
      string ma_from [6] = '{"000", "010", "111", "101", "010", "101"};
      string ma_to   [6] = '{"101", "111", "010", "000", "101", "010"};
      logic  seen [6];
      string ma_seeds [2] = '{"000", "101"};
      foreach (seen[i]) seen[i] = 0;
      foreach (ma_seeds[q]) begin
        logic [2:0] prevv;
        ctrl.si = 0;
        shift3(v3(ma_seeds[q])); cyc(0, 0, 1);
        ctrl.si = 1;
        shift3(v3("010"));
        for (int u = 1; u <= 4; u++) begin
          prevv = pin3;
          cyc(0, 0, 1);
          for (int i = 0; i < 6; i++)
            if (prevv == v3(ma_from[i]) && pin3 == v3(ma_to[i])) seen[i] = 1;
        end
      end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (!seen[i]) begin failures++; $display("MA pair %s -> %s not generated", ma_from[i], ma_to[i]); end
      end
    end

    // ---- part 2 ----
    foreach (victim_seen[i]) victim_seen[i] = 0;
    for (int seed = 0; seed < 4; seed++) begin
      logic [7:0] sd, sel, prev, exp;
      sd = 8'($urandom);
      ctrl.si = 0;
      shift8(sd); cyc(0, 0, 1);
      ctrl.si = 1;
      sel = 8'b0100_1001;                           // lines 0, 3, 6
      shift8(sel);
      for (int r = 0; r < 3; r++) begin
        checks++;
        if (pin8 !== sd) begin failures++; $display("rotation %0d does not start on the seed", r); end
        for (int i = 0; i < 8; i++) if (sel[i]) victim_seen[i]++;
        for (int u = 1; u <= 4; u++) begin
          prev = pin8;
          cyc(0, 0, 1);
          exp = prev ^ (~sel | ((u % 2 == 0) ? sel : 8'h00));
          checks++;
          if (pin8 !== exp) begin
            failures++; $display("rotation %0d update %0d: got %b expected %b", r, u, pin8, exp);
          end
        end
        checks++;
        if (pin8 !== sd) begin failures++; $display("rotation %0d does not end on the seed", r); end
        si8 = 0; cyc(1, 1, 0);                      // shift one 0: next victims
        sel = {sel[6:0], 1'b0};
        n_rot++;
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (victim_seen[i] == 0) begin failures++; $display("line %0d never victim", i); end
    end

    $display("rotations=%0d", n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
