// tb_dmc_fault_coverage - fault-detection claims of the DMC scheme, checked
// on Network 4.
//
// Network 4 is built from dmc_gate with a stuck-at fault site on every line
// (dmc_net_faulty), once with 2T(4) gates and once with 2T(6) gates. For
// each fault pattern the two tests T0 = (0...0, 0000) and
// T0bar = (1...1, 1111) are applied; a pattern is detected when the output
// differs from the fault-free answer (0, then 1) for at least one of them.
//   1. 2T(4): every single stuck-at fault (46 of them) is detected.
//   2. 2T(4): every pair of faults on distinct lines is detected whenever no
//      gate sees more than one faulty control input; the other pairs are
//      counted, and the pair k1 s-a-1 + k2 s-a-1 on the stems (which moves
//      T0 into the normal-mode segment 1100) must be among the escapes.
//   3. 2T(4): random multiple-fault patterns with any data/output faults
//      and at most one faulty control input per gate are all detected.
//   4. 2T(6): every single fault, and random patterns with at most two
//      faulty control inputs per gate, are detected.
// Counts of each kind are printed at the end.
module tb_dmc_fault_coverage;

  int checks, failures;

  // ---- 2T(4) network ----
  logic [1:4]             k4;
  logic [1:4]             d4;
  logic [3:0][1:0]        s4;
  logic [2:0][3:0][1:0]   kp4;
  logic [2:0][1:0][1:0]   dp4;
  logic [1:0]             o4;
  logic                   f4;

  dmc_net_faulty #(.R(4)) u_n4 (.k(k4), .d(d4), .stem_c(s4), .kpin_c(kp4),
                                .dpin_c(dp4), .out_c(o4), .f(f4));

  // ---- 2T(6) network ----
  logic [1:6]             k6;
  logic [1:4]             d6;
  logic [5:0][1:0]        s6;
  logic [2:0][5:0][1:0]   kp6;
  logic [2:0][1:0][1:0]   dp6;
  logic [1:0]             o6;
  logic                   f6;

  dmc_net_faulty #(.R(6)) u_n6 (.k(k6), .d(d6), .stem_c(s6), .kpin_c(kp6),
                                .dpin_c(dp6), .out_c(o6), .f(f6));

  // Line numbering for the 2T(r) network with r controls:
  //   0..r-1        control stems
  //   r..4r-1       control pins, gate g = (l-r)/r, pin (l-r)%r
  //   4r..4r+5      data pins, gate (l-4r)/2, pin (l-4r)%2
  //   4r+6          network output
  function automatic int nlines(int r);
    return 4 * r + 7;
  endfunction

  task automatic clear4();
    s4 = '0; kp4 = '0; dp4 = '0; o4 = '0;
  endtask
  task automatic clear6();
    s6 = '0; kp6 = '0; dp6 = '0; o6 = '0;
  endtask

  task automatic set4(int l, logic [1:0] c);
    if (l < 4)             s4[l] = c;
    else if (l < 16)       kp4[(l-4)/4][(l-4)%4] = c;
    else if (l < 22)       dp4[(l-16)/2][(l-16)%2] = c;
    else                   o4 = c;
  endtask
  task automatic set6(int l, logic [1:0] c);
    if (l < 6)             s6[l] = c;
    else if (l < 24)       kp6[(l-6)/6][(l-6)%6] = c;
    else if (l < 30)       dp6[(l-24)/2][(l-24)%2] = c;
    else                   o6 = c;
  endtask

  task automatic detect4(output logic det);
    logic r0, r1;
    k4 = '0; d4 = '0; #1; r0 = f4;
    k4 = '1; d4 = '1; #1; r1 = f4;
    det = (r0 !== 1'b0) || (r1 !== 1'b1);
  endtask
  task automatic detect6(output logic det);
    logic r0, r1;
    k6 = '0; d6 = '0; #1; r0 = f6;
    k6 = '1; d6 = '1; #1; r1 = f6;
    det = (r0 !== 1'b0) || (r1 !== 1'b1);
  endtask

  // Number of faulty control inputs each gate sees, worst gate.
  function automatic int max_ctrl4();
    int m;
    m = 0;
    for (int g = 0; g < 3; g++) begin
      int n;
      n = 0;
      for (int i = 0; i < 4; i++)
        if ((s4[i] inside {2'd1, 2'd2}) || (kp4[g][i] inside {2'd1, 2'd2})) n++;
      if (n > m) m = n;
    end
    return m;
  endfunction

  task automatic expect_det(string what, logic det);
    checks++;
    if (!det) begin
      failures++;
      $display("FAIL %s: fault pattern not detected", what);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int singles4, pairs_cov, pairs_esc, multi4, singles6, multi6;
    logic det, esc_ab;
    checks = 0; failures = 0;
    singles4 = 0; pairs_cov = 0; pairs_esc = 0; multi4 = 0;
    singles6 = 0; multi6 = 0;
    esc_ab = 1'b0;
    clear4(); clear6();
    k4 = '0; d4 = '0; k6 = '0; d6 = '0;

    // Fault-free networks give 0 and 1.
    detect4(det);
    checks++; if (det) begin failures++; $display("FAIL fault-free 2T(4) network flagged"); end
    detect6(det);
    checks++; if (det) begin failures++; $display("FAIL fault-free 2T(6) network flagged"); end

    // 1. Single faults, 2T(4).
    for (int l = 0; l < nlines(4); l++) begin
      for (int c = 1; c <= 2; c++) begin
        clear4(); set4(l, c[1:0]);
        detect4(det);
        expect_det($sformatf("2T(4) single fault line %0d s-a-%0d", l, c - 1), det);
        singles4++;
      end
    end

    // 2. Pairs of faults on distinct lines, 2T(4).
    for (int l1 = 0; l1 < nlines(4); l1++) begin
      for (int l2 = l1 + 1; l2 < nlines(4); l2++) begin
        for (int c1 = 1; c1 <= 2; c1++) begin
          for (int c2 = 1; c2 <= 2; c2++) begin
            clear4(); set4(l1, c1[1:0]); set4(l2, c2[1:0]);
            detect4(det);
            if (max_ctrl4() <= 1) begin
              expect_det($sformatf("2T(4) pair %0d/%0d %0d/%0d", l1, c1 - 1, l2, c2 - 1), det);
              pairs_cov++;
            end else if (!det) begin
              pairs_esc++;
              if (l1 == 0 && l2 == 1 && c1 == 2 && c2 == 2) esc_ab = 1'b1;
            end
          end
        end
      end
    end
    checks++;
    if (!esc_ab) begin
      failures++;
      $display("FAIL stems k1, k2 stuck at 1 were expected to escape the two tests");
    end

    // 3. Random multiple faults, at most one faulty control input per gate.
    for (int n = 0; n < 20000; n++) begin
      clear4();
      for (int l = 16; l < nlines(4); l++) set4(l, 2'($urandom_range(0, 2)));
      if ($urandom_range(0, 3) == 0) begin
        // one stem fault: it reaches one control input of every gate
        set4($urandom_range(0, 3), 2'($urandom_range(1, 2)));
      end else begin
        for (int g = 0; g < 3; g++)
          if ($urandom_range(0, 1) == 1)
            kp4[g][$urandom_range(0, 3)] = 2'($urandom_range(1, 2));
      end
      if (s4 == '0 && kp4 == '0 && dp4 == '0 && o4 == '0) continue;
      detect4(det);
      expect_det("2T(4) multiple faults", det);
      multi4++;
    end

    // 4. 2T(6): single faults and up to two faulty control inputs per gate.
    for (int l = 0; l < nlines(6); l++) begin
      for (int c = 1; c <= 2; c++) begin
        clear6(); set6(l, c[1:0]);
        detect6(det);
        expect_det($sformatf("2T(6) single fault line %0d s-a-%0d", l, c - 1), det);
        singles6++;
      end
    end
    for (int n = 0; n < 20000; n++) begin
      clear6();
      for (int l = 24; l < nlines(6); l++) set6(l, 2'($urandom_range(0, 2)));
      for (int g = 0; g < 3; g++) begin
        int nf;
        nf = $urandom_range(0, 2);
        for (int j = 0; j < nf; j++)
          kp6[g][$urandom_range(0, 5)] = 2'($urandom_range(1, 2));
      end
      if (kp6 == '0 && dp6 == '0 && o6 == '0) continue;
      detect6(det);
      expect_det("2T(6) multiple faults", det);
      multi6++;
    end

    $display("2T(4): %0d single faults, %0d covered pairs, %0d escaping pairs with two control faults on one gate, %0d multiple-fault patterns",
             singles4, pairs_cov, pairs_esc, multi4);
    $display("2T(6): %0d single faults, %0d multiple-fault patterns", singles6, multi6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
