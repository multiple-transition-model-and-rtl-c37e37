// tb_si_soc_top: end-to-end testbench of the signal-integrity boundary-scan SoC,
// run with every parameter of the top at its default.
//
// The testbench plays the tester: it drives TCK/TMS/TDI/TRST, and runs
//   1. BYPASS: a bit stream must come back one TCK later;
//   2. SAMPLE/PRELOAD: core values pass through, the chain captures them;
//   3. EXTEST: a static pattern is applied on the interconnects and captured at
//      the receivers (the classic interconnect test);
//   4. the multiple-transition procedure: for each seed, EXTEST loads the seed,
//      G_SITEST is loaded, victim-select data 100100... is scanned in (its
//      Update-DR is the first UpdateDR of four), three more UpdateDRs follow, and
//      the victims rotate by shifting one 0 into the chain (its Update-DR starts
//      the next four) until every line has been a victim (k = 2, three victim
//      positions). Flags are read with O_SITEST after every victim position for
//      the first seed (read-out method 2), after every pattern pair for the
//      first victim position of the second seed (method 1), and once per seed
//      otherwise (method 3). Seven seeds are run; in the last one the
//      bidirectional lines are driven from core j instead of core i.
// The interconnects are modelled here with crosstalk defects: line DLY_LINE
// arrives 4 ns late when it switches against both neighbours, line GL_LINE
// glitches when it is quiet and both neighbours switch the same way; all other
// transitions arrive after 1 ns (the sensors accept 2 ns). The testbench keeps
// its own model of every cell's two stages, checks the lines after every
// UpdateDR, predicts which sensors must fire, and compares every bit scanned out
// of TDO with the model. It counts each mechanism and fails if one never occurs.
module tb_si_soc_top;
  import si_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int N  = N_IUT_DEFAULT;
  localparam int M  = M_IN_DEFAULT;
  localparam int K  = K_OUT_DEFAULT;
  localparam int B  = 2;
  localparam int L  = M + 3*B + 2*N + 3*B + K;   // boundary register length
  localparam int KL = 2;                         // locality factor used by the procedure
  localparam int DLY_LINE = 10;
  localparam int GL_LINE  = 21;

  typedef enum int {C_STD_IN, C_CTL_I, C_PG_I, C_OB_I, C_PG, C_OB,
                    C_CTL_J, C_PG_J, C_OB_J, C_STD_OUT} cell_e;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1, tdo;
  logic [M-1:0] core_i_in_pin, core_i_in;
  logic [N-1:0] core_i_out, iut_drive, iut_recv, core_j_in;
  logic [K-1:0] core_j_out, core_j_out_pin;
  logic [B-1:0] bi_i_core_out, bi_i_core_oe, bi_i_core_in, bi_i_pad_out, bi_i_pad_oe, bi_i_pad_in;
  logic [B-1:0] bi_j_core_out, bi_j_core_oe, bi_j_core_in, bi_j_pad_out, bi_j_pad_oe, bi_j_pad_in;

  si_soc_top u_dut (.*);

  always #5 tck = ~tck;

  int checks = 0, failures = 0;
  longint tck_count = 0;
  always @(posedge tck) tck_count++;

  // mechanism counters
  int n_bypass = 0, n_sample = 0, n_extest = 0, n_victim_tog = 0, n_aggr_tog = 0;
  int n_rotate = 0, n_seed_back = 0, n_late = 0, n_glitch = 0, n_flag_read = 0;
  int n_flag_cleared = 0, n_method1 = 0, n_method2 = 0, n_method3 = 0, n_bidir_tog = 0, n_bidir_j_tog = 0;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------------------
  // Interconnect model
  // ---------------------------------------------------------------------------
  logic [N-1:0] w_prev;
  logic         bi_line [B];
  always @(posedge tck) begin
    logic [N-1:0] cur, late, gl;
    #0.1;
    cur  = iut_drive;
    late = '0; gl = '0;
    for (int i = 1; i < N - 1; i++) begin
      logic ti, tl, tr;
      ti = cur[i] ^ w_prev[i]; tl = cur[i-1] ^ w_prev[i-1]; tr = cur[i+1] ^ w_prev[i+1];
      if (i == DLY_LINE && ti && tl && tr && cur[i-1] != cur[i] && cur[i+1] != cur[i]) late[i] = 1;
      if (i == GL_LINE && !ti && tl && tr && cur[i-1] == cur[i+1]) gl[i] = 1;
    end
    for (int b = 0; b < B; b++)
      if (bi_i_pad_oe[b])      bi_line[b] = bi_i_pad_out[b];
      else if (bi_j_pad_oe[b]) bi_line[b] = bi_j_pad_out[b];
    w_prev = cur;
    #0.9;
    iut_recv = (iut_recv & late) | (cur & ~late);
    iut_recv = iut_recv ^ gl;
    for (int b = 0; b < B; b++) begin
      bi_i_pad_in[b] = bi_line[b];
      bi_j_pad_in[b] = bi_line[b];
    end
    #0.3;
    iut_recv = iut_recv ^ gl;
    #2.7;
    iut_recv = cur;
  end

  // ---------------------------------------------------------------------------
  // Reference model of the boundary register
  // ---------------------------------------------------------------------------
  cell_e ctype [L];
  int    cline [L];        // which line / pin the cell sits on
  logic  m1 [L], m2 [L], m3 [L];
  logic  mflag [L];
  instr_e m_instr;

  function automatic logic m_mode();
    return m_instr inside {I_EXTEST, I_G_SITEST, I_O_SITEST};
  endfunction
  function automatic logic m_si();
    return m_instr inside {I_G_SITEST, I_O_SITEST};
  endfunction
  function automatic logic is_pg(int j);  return ctype[j] inside {C_PG, C_PG_I, C_PG_J}; endfunction
  function automatic logic is_ob(int j);  return ctype[j] inside {C_OB, C_OB_I, C_OB_J}; endfunction

  function automatic logic pin_of(int j);   // parallel input seen by the cell
    case (ctype[j])
      C_STD_IN:  return core_i_in_pin[cline[j]];
      C_CTL_I:   return bi_i_core_oe[cline[j]];
      C_PG_I:    return bi_i_core_out[cline[j]];
      C_OB_I:    return bi_i_pad_in[cline[j]];
      C_PG:      return core_i_out[cline[j]];
      C_OB:      return iut_recv[cline[j]];
      C_CTL_J:   return bi_j_core_oe[cline[j]];
      C_PG_J:    return bi_j_core_out[cline[j]];
      C_OB_J:    return bi_j_pad_in[cline[j]];
      default:   return core_j_out[cline[j]];
    endcase
  endfunction

  function automatic logic [N-1:0] exp_drive();
    logic [N-1:0] v;
    for (int j = 0; j < L; j++) if (ctype[j] == C_PG) v[cline[j]] = m_mode() ? m2[j] : core_i_out[cline[j]];
    return v;
  endfunction

  initial begin
    int j = 0;
    for (int i = 0; i < M; i++) begin ctype[j] = C_STD_IN; cline[j++] = i; end
    for (int b = 0; b < B; b++) begin
      ctype[j] = C_CTL_I; cline[j++] = b; ctype[j] = C_PG_I; cline[j++] = b; ctype[j] = C_OB_I; cline[j++] = b;
    end
    for (int i = 0; i < N; i++) begin ctype[j] = C_PG; cline[j++] = i; end
    for (int i = 0; i < N; i++) begin ctype[j] = C_OB; cline[j++] = i; end
    for (int b = 0; b < B; b++) begin
      ctype[j] = C_CTL_J; cline[j++] = b; ctype[j] = C_PG_J; cline[j++] = b; ctype[j] = C_OB_J; cline[j++] = b;
    end
    for (int i = 0; i < K; i++) begin ctype[j] = C_STD_OUT; cline[j++] = i; end
  end

  // Expected sensor outcome of one launch on the IUT (same defect rule as the wires).
  task automatic predict_flags(input logic [N-1:0] oldv, input logic [N-1:0] newv);
    if (!m_si()) return;
    for (int i = 1; i < N - 1; i++) begin
      logic ti, tl, tr;
      ti = oldv[i] ^ newv[i]; tl = oldv[i-1] ^ newv[i-1]; tr = oldv[i+1] ^ newv[i+1];
      if (i == DLY_LINE && ti && tl && tr && newv[i-1] != newv[i] && newv[i+1] != newv[i]) begin
        mflag[M + 3*B + N + i] = 1; n_late++;
      end
      if (i == GL_LINE && !ti && tl && tr && newv[i-1] == newv[i+1]) begin
        mflag[M + 3*B + N + i] = 1; n_glitch++;
      end
    end
  endtask

  // Model of the UpdateDR reaching the cells.
  task automatic model_update();
    logic [N-1:0] oldv, newv;
    oldv = exp_drive();
    for (int j = 0; j < L; j++) begin
      if (is_pg(j) && m_si()) begin
        logic en;
        en = m1[j] ? !m3[j] : 1'b1;
        if (en) begin
          m2[j] = !m2[j];
          if (ctype[j] == C_PG) begin if (m1[j]) n_victim_tog++; else n_aggr_tog++; end
          else if (ctype[j] == C_PG_J) n_bidir_j_tog++;
          else n_bidir_tog++;
        end
        m3[j] = !m3[j];
      end else begin
        m2[j] = m1[j];
      end
    end
    newv = exp_drive();
    predict_flags(oldv, newv);
  endtask

  // ---------------------------------------------------------------------------
  // JTAG driver
  // ---------------------------------------------------------------------------
  // One TCK cycle; jtdo holds TDO as seen before the rising edge.
  logic jtdo;
  task automatic jclk(input logic t_ms, input logic t_di);
    @(negedge tck);
    tms = t_ms; tdi = t_di;
    #1 jtdo = tdo;
    @(posedge tck);
  endtask

  task automatic jclk0(input logic t_ms);
    jclk(t_ms, 1'b0);
  endtask

  // Called right after the rising edge that applied an UpdateDR: compare the lines
  // with the model within the same TCK cycle.
  task automatic check_lines(input string what);
    #2;
    check(iut_drive === exp_drive(), {what, ": interconnect drive"});
    for (int j = 0; j < L; j++) begin
      if (ctype[j] == C_PG_I && m_mode()) check(bi_i_pad_out[cline[j]] === m2[j], {what, ": bidir drive"});
      if (ctype[j] == C_CTL_I && m_mode()) check(bi_i_pad_oe[cline[j]] === m2[j], {what, ": bidir enable"});
      if (ctype[j] == C_PG_J && m_mode()) check(bi_j_pad_out[cline[j]] === m2[j], {what, ": bidir drive, j end"});
      if (ctype[j] == C_CTL_J && m_mode()) check(bi_j_pad_oe[cline[j]] === m2[j], {what, ": bidir enable, j end"});
    end
  endtask

  // Reset the TAP and go to Run-Test/Idle.
  task automatic tap_reset();
    trst_n = 0; #3; trst_n = 1;
    jclk0(1); jclk0(0);
    m_instr = I_BYPASS;
    for (int j = 0; j < L; j++) begin mflag[j] = 0; m3[j] = 1; end
  endtask

  // IR scan from Run-Test/Idle back to Run-Test/Idle.
  task automatic ir_scan(input instr_e op);
    logic [IR_W-1:0] got;
    jclk0(1); jclk0(1); jclk0(0); jclk0(0);        // Select-DR, Select-IR, Capture-IR, Shift-IR
    for (int i = 0; i < IR_W; i++) begin jclk(i == IR_W - 1, op[i]); got[i] = jtdo; end
    check(got == 4'b0001, "Capture-IR value");
    jclk0(1);                                      // Update-IR
    m_instr = op;
    if (!m_si()) for (int j = 0; j < L; j++) m3[j] = 1;
    jclk0(0);                                      // Run-Test/Idle
  endtask

  // DR scan of nbits from Run-Test/Idle to Run-Test/Idle. din[j] is the bit that
  // must end in cell j (when nbits == L); dout[j] is what cell j held after capture.
  task automatic dr_scan(input logic din [L], input int nbits, output logic dout [L]);
    logic d;
    logic cap;
    jclk0(1); jclk0(0);                            // Select-DR, Capture-DR
    // the edge leaving Capture-DR captures
    cap = (m_instr != I_BYPASS) && (m_instr != I_G_SITEST);
    jclk0(0);
    if (cap) for (int j = 0; j < L; j++) begin
      m1[j] = (is_ob(j) && m_si()) ? mflag[j] : pin_of(j);
    end
    if (m_instr == I_O_SITEST) begin
      for (int j = 0; j < L; j++) if (mflag[j]) n_flag_cleared++;
      for (int j = 0; j < L; j++) mflag[j] = 0;
    end
    for (int t = 0; t < nbits; t++) begin
      logic bin;
      bin = din[nbits - 1 - t];
      jclk(t == nbits - 1, bin); d = jtdo;
      if (m_instr != I_BYPASS) begin
        dout[L - 1 - t] = d;
        check(d === m1[L - 1], "TDO equals the model's last cell");
        for (int j = L - 1; j > 0; j--) m1[j] = m1[j-1];
        m1[0] = bin;
      end
    end
    jclk0(1);                                      // Update-DR
    jclk0(0);                                      // Run-Test/Idle; this edge updates
    if (m_instr inside {I_EXTEST, I_SAMPLE, I_G_SITEST}) begin
      model_update();
      check_lines("after DR scan");
    end
  endtask

  // One extra UpdateDR: Select-DR, Capture-DR, Exit1-DR, Update-DR, Run-Test/Idle.
  // The update takes effect on the edge that leaves Update-DR.
  task automatic pulse_update();
    jclk0(1); jclk0(0); jclk0(1);
    if (m_instr != I_G_SITEST && m_instr != I_BYPASS)
      for (int j = 0; j < L; j++) m1[j] = (is_ob(j) && m_si()) ? mflag[j] : pin_of(j);
    jclk0(1);
    jclk0(0);                                      // this edge updates
    model_update();
    check_lines("after UpdateDR");
  endtask

  // ---------------------------------------------------------------------------
  // Stimulus
  // ---------------------------------------------------------------------------
  logic vin [L], vout [L];

  // Chain image: PGBSC cells take pg[], bidir i-side enable/data take 1/0,
  // everything else 0.
  logic j_drives = 1'b0;   // which end drives the bidirectional lines
  task automatic build_chain(input logic [N-1:0] pg, output logic v [L]);
    for (int j = 0; j < L; j++) begin
      case (ctype[j])
        C_PG:    v[j] = pg[cline[j]];
        C_CTL_I: v[j] = !j_drives;
        C_CTL_J: v[j] = j_drives;
        default: v[j] = 1'b0;
      endcase
    end
  endtask

  // O_SITEST read-out; the scan refills the PGBSCs with victim-select data sel.
  task automatic read_flags(input string what, input logic [N-1:0] sel);
    logic [N-1:0] seen;
    logic refill [L];
    ir_scan(I_O_SITEST);
    build_chain(sel, refill);
    dr_scan(refill, L, vout);
    for (int i = 0; i < N; i++) seen[i] = vout[M + 3*B + N + i];
    n_flag_read++;
    // every scanned-out bit, flags included, was compared with the model in dr_scan
    if (seen != '0) $display("%s: flags %b", what, seen);
  endtask

  initial begin
    logic [N-1:0] seeds [7];
    logic [N-1:0] sel0;
    longint t0;

    core_i_in_pin = '0; core_i_out = '0; core_j_out = '0;
    bi_i_core_out = '0; bi_i_core_oe = '0; bi_j_core_out = '0; bi_j_core_oe = '0;
    iut_recv = '0; w_prev = '0;
    foreach (bi_line[b]) bi_line[b] = 0;
    bi_i_pad_in = '0; bi_j_pad_in = '0;

    tap_reset();

    // ---- 1. BYPASS -----------------------------------------------------------
    begin
      logic d, prevb;
      jclk0(1); jclk0(0); jclk0(0);                // Select-DR, Capture-DR, Shift-DR
      prevb = 0;                                   // bypass captured 0
      for (int t = 0; t < 32; t++) begin
        logic b;
        b = 1'($urandom);
        jclk(t == 31, b); d = jtdo;
        check(d === prevb, "BYPASS delays TDI by one TCK");
        prevb = b;
      end
      jclk0(1); jclk0(0);
      n_bypass++;
    end

    // ---- 2. SAMPLE/PRELOAD ---------------------------------------------------
    ir_scan(I_SAMPLE);
    core_i_in_pin = M'($urandom); core_i_out = N'($urandom); core_j_out = K'($urandom);
    #1;
    check(core_i_in === core_i_in_pin && iut_drive === core_i_out && core_j_out_pin === core_j_out,
          "SAMPLE leaves the functional paths alone");
    for (int j = 0; j < L; j++) vin[j] = 1'($urandom);
    dr_scan(vin, L, vout);                         // captures core values, preloads vin
    for (int i = 0; i < M; i++) check(vout[i] === core_i_in_pin[i], "SAMPLE captured core i input pin");
    for (int i = 0; i < N; i++) check(vout[M + 3*B + i] === core_i_out[i], "SAMPLE captured core i output");
    n_sample++;

    // ---- 3. EXTEST static interconnect test ------------------------------------
    ir_scan(I_EXTEST);
    for (int r = 0; r < 3; r++) begin
      logic [N-1:0] pat;
      pat = (r == 0) ? '0 : (r == 1) ? '1 : N'($urandom);
      build_chain(pat, vin);
      dr_scan(vin, L, vout);                       // applies pat
      repeat (2) @(negedge tck);
      for (int j = 0; j < L; j++)
        if (ctype[j] == C_OB) check(core_j_in[cline[j]] === m2[j], "EXTEST drives core j from the receive cells' update stage");
      dr_scan(vin, L, vout);                       // captures what arrived
      for (int i = 0; i < N; i++) check(vout[M + 3*B + N + i] === pat[i], "EXTEST captured the static pattern");
      n_extest++;
    end

    // ---- 4. multiple-transition procedure ------------------------------------
    seeds[0] = '0;
    seeds[1] = '1;
    for (int i = 0; i < N; i++) seeds[2][i] = (i % 3 == 1);
    seeds[3] = N'($urandom); seeds[4] = N'($urandom); seeds[5] = N'($urandom);
    seeds[6] = '0;
    for (int i = 0; i < N; i++) sel0[i] = (i % (KL + 1) == 0);

    // clear any flag left from earlier phases
    read_flags("initial flag read", '0);

    t0 = tck_count;
    for (int s = 0; s < 7; s++) begin
      logic [N-1:0] sel;
      int victims [N];
      j_drives = (s == 6);                         // last seed: core j drives the bidirectional lines
      foreach (victims[i]) victims[i] = 0;
      // seed into FF2 with SI = 0
      ir_scan(I_EXTEST);
      build_chain(seeds[s], vin);
      dr_scan(vin, L, vout);
      check(iut_drive === seeds[s], "seed applied");
      ir_scan(I_G_SITEST);
      sel = sel0;
      build_chain(sel, vin);
      dr_scan(vin, L, vout);                       // victim-select data; first UpdateDR
      for (int r = 0; r <= KL; r++) begin
        for (int i = 0; i < N; i++) if (sel[i]) victims[i]++;
        if (s == 1 && r == 0) begin                // method 1: read after every vector pair
          for (int u = 2; u <= 4; u++) begin
            read_flags($sformatf("seed %0d pair %0d", s, u - 1), sel);
            ir_scan(I_G_SITEST);
            pulse_update();
            n_method1++;
          end
        end else begin
          repeat (3) pulse_update();               // UpdateDRs 2..4
        end
        check(iut_drive === seeds[s], "four UpdateDRs return to the seed");
        if (iut_drive === seeds[s]) n_seed_back++;
        if (r == KL) break;
        sel = {sel[N-2:0], 1'b0};
        if (s == 0) begin                          // method 2: read after every victim position
          read_flags($sformatf("seed %0d victim position %0d", s, r), '0);
          n_method2++;
          ir_scan(I_G_SITEST);
          build_chain(sel, vin);
          dr_scan(vin, L, vout);                   // next victim-select data; first UpdateDR
        end else begin
          logic one [L];
          foreach (one[j]) one[j] = 0;
          dr_scan(one, 1, vout);                   // shift one 0: victims rotate; first UpdateDR
        end
        n_rotate++;
      end
      for (int i = 0; i < N; i++) check(victims[i] == 1, "every line is victim exactly once per seed");
      if (s != 0) n_method3++;
      read_flags($sformatf("seed %0d end", s), '0);
    end
    $display("MT procedure: %0d seeds, %0d TCK (including read-outs)", 7, tck_count - t0);

    // a second read-out right after one must find every flag cleared
    read_flags("read after read", '0);
    for (int i = 0; i < N; i++) check(vout[M + 3*B + N + i] === 1'b0, "flags cleared by the read-out");

    $display("bypass=%0d sample=%0d extest=%0d victim_toggles=%0d aggressor_toggles=%0d",
             n_bypass, n_sample, n_extest, n_victim_tog, n_aggr_tog);
    $display("rotations=%0d seed_returns=%0d late=%0d glitch=%0d flag_reads=%0d flags_cleared=%0d",
             n_rotate, n_seed_back, n_late, n_glitch, n_flag_read, n_flag_cleared);
    $display("method1=%0d method2=%0d method3=%0d bidir_toggles=%0d", n_method1, n_method2, n_method3, n_bidir_tog);
    check(n_bypass > 0, "BYPASS exercised");
    check(n_sample > 0, "SAMPLE exercised");
    check(n_extest > 0, "EXTEST exercised");
    check(n_victim_tog > 0, "victim mode exercised");
    check(n_aggr_tog > 0, "aggressor mode exercised");
    check(n_rotate > 0, "victim rotation exercised");
    check(n_seed_back > 0, "seed restoration exercised");
    check(n_late > 0, "delay violation exercised");
    check(n_glitch > 0, "glitch violation exercised");
    check(n_flag_cleared > 0, "flag clearing exercised");
    check(n_method1 > 0 && n_method2 > 0 && n_method3 > 0, "read-out methods 1, 2 and 3 exercised");
    check(n_bidir_tog > 0, "bidirectional pattern generation from core i exercised");
    check(n_bidir_j_tog > 0, "bidirectional pattern generation from core j exercised");
    $display("bidir_j_toggles=%0d", n_bidir_j_tog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
