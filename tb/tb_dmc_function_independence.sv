// tb_dmc_function_independence - the same two tests on many DMC networks.
//
// The claim of the scheme is that T0 = (0000, all data 0) and
// T0bar = (1111, all data 1) test any network of 2T(4) gates, whatever its
// function and wiring. This testbench rebuilds several network shapes from
// 2T(4) gates, each with two different choices of normal-mode functions,
// and lets dmc_net_check verify, for each:
//   - normal mode (k = 1100) computes the same function as the equivalent
//     conventional netlist (one-to-one gate replacement);
//   - every single stuck-at fault is detected by the two tests;
//   - random multiple-fault patterns with at most one faulty control input
//     per gate are detected.
// Shapes: two gates with a three-input first gate feeding the middle input
// of the second; three two-input gates feeding a three-input gate; two
// three-input gates feeding a two-input gate; a two-input gate feeding a
// second gate with one more primary input; a network with reconvergent
// fan-out and a one-input gate (an inverter in normal mode); and the
// redundant netlist f = x + x.y, whose AND output stuck at 0 cannot be found
// by any normal-mode test but is found by the two DMC tests.
module tb_dmc_function_independence;
  import dmc_pkg::*;

  localparam int NC = 12;
  logic go;
  int   c [NC];
  int   fl [NC];
  logic e [NC];

  // Two gates: g0(d11,d12,d13) -> middle input of g1(d21, g0, d23).
  dmc_net_check #(.NI(5), .NG(2), .NIN('{0: 3, 1: 3, default: 1}),
                  .SRC('{0: '{0, 1, 2}, 1: '{3, 5, 4}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_NAND, 1: FN_NAND, default: FN_NAND}), .NAME("two-gate, NAND"))
    u0 (.go(go), .checks(c[0]), .failures(fl[0]), .finished(e[0]));
  dmc_net_check #(.NI(5), .NG(2), .NIN('{0: 3, 1: 3, default: 1}),
                  .SRC('{0: '{0, 1, 2}, 1: '{3, 5, 4}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_NOR, 1: FN_XOR, default: FN_NAND}), .NAME("two-gate, NOR/XOR"))
    u1 (.go(go), .checks(c[1]), .failures(fl[1]), .finished(e[1]));

  // Three two-input gates into a three-input gate.
  dmc_net_check #(.NI(6), .NG(4), .NIN('{0: 2, 1: 2, 2: 2, 3: 3, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{2, 3, 0}, 2: '{4, 5, 0}, 3: '{6, 7, 8}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_NAND, 1: FN_NAND, 2: FN_NAND, 3: FN_NAND, default: FN_NAND}), .NAME("3+1 gates, NAND"))
    u2 (.go(go), .checks(c[2]), .failures(fl[2]), .finished(e[2]));
  dmc_net_check #(.NI(6), .NG(4), .NIN('{0: 2, 1: 2, 2: 2, 3: 3, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{2, 3, 0}, 2: '{4, 5, 0}, 3: '{6, 7, 8}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_AND, 1: FN_OR, 2: FN_XNOR, 3: FN_NAND, default: FN_NAND}), .NAME("3+1 gates, mixed"))
    u3 (.go(go), .checks(c[3]), .failures(fl[3]), .finished(e[3]));

  // Two three-input gates into a two-input gate.
  dmc_net_check #(.NI(6), .NG(3), .NIN('{0: 3, 1: 3, 2: 2, default: 1}),
                  .SRC('{0: '{0, 1, 2}, 1: '{3, 4, 5}, 2: '{6, 7, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_NAND, 1: FN_NAND, 2: FN_NAND, default: FN_NAND}), .NAME("2+1 gates, NAND"))
    u4 (.go(go), .checks(c[4]), .failures(fl[4]), .finished(e[4]));
  dmc_net_check #(.NI(6), .NG(3), .NIN('{0: 3, 1: 3, 2: 2, default: 1}),
                  .SRC('{0: '{0, 1, 2}, 1: '{3, 4, 5}, 2: '{6, 7, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_XOR, 1: FN_NOR, 2: FN_AND, default: FN_NAND}), .NAME("2+1 gates, mixed"))
    u5 (.go(go), .checks(c[5]), .failures(fl[5]), .finished(e[5]));

  // Chain: g0(d11,d12) -> g1(g0, d22).
  dmc_net_check #(.NI(3), .NG(2), .NIN('{0: 2, 1: 2, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{3, 2, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_NAND, 1: FN_NAND, default: FN_NAND}), .NAME("chain, NAND"))
    u6 (.go(go), .checks(c[6]), .failures(fl[6]), .finished(e[6]));
  dmc_net_check #(.NI(3), .NG(2), .NIN('{0: 2, 1: 2, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{3, 2, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_OR, 1: FN_XNOR, default: FN_NAND}), .NAME("chain, OR/XNOR"))
    u7 (.go(go), .checks(c[7]), .failures(fl[7]), .finished(e[7]));

  // Reconvergent fan-out: g0 feeds g1 and g2, which meet in g3; g4 inverts.
  dmc_net_check #(.NI(3), .NG(5), .NIN('{0: 2, 1: 2, 2: 2, 3: 2, 4: 1, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{3, 2, 0}, 2: '{3, 1, 0}, 3: '{4, 5, 0}, 4: '{6, 0, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_NAND, 1: FN_NAND, 2: FN_NAND, 3: FN_NAND, 4: FN_NAND, default: FN_NAND}),
                  .NAME("reconvergent fan-out, NAND"))
    u8 (.go(go), .checks(c[8]), .failures(fl[8]), .finished(e[8]));
  dmc_net_check #(.NI(3), .NG(5), .NIN('{0: 2, 1: 2, 2: 2, 3: 2, 4: 1, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{3, 2, 0}, 2: '{3, 1, 0}, 3: '{4, 5, 0}, 4: '{6, 0, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_XOR, 1: FN_NOR, 2: FN_AND, 3: FN_OR, 4: FN_NAND, default: FN_NAND}),
                  .NAME("reconvergent fan-out, mixed"))
    u9 (.go(go), .checks(c[9]), .failures(fl[9]), .finished(e[9]));

  // Redundant netlist f = x + x.y. Line 18 is the output stem of the AND
  // gate (4 stems + 2x4 control pins + 2x3 data slots come before it).
  dmc_net_check #(.NI(2), .NG(2), .NIN('{0: 2, 1: 2, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{0, 2, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_AND, 1: FN_OR, default: FN_NAND}), .NAME("redundant x + x.y"),
                  .RED_LINE(18), .RED_CODE(1))
    u10 (.go(go), .checks(c[10]), .failures(fl[10]), .finished(e[10]));
  dmc_net_check #(.NI(2), .NG(2), .NIN('{0: 2, 1: 2, default: 1}),
                  .SRC('{0: '{0, 1, 0}, 1: '{0, 2, 0}, default: '{0, 0, 0}}),
                  .FNS('{0: FN_NAND, 1: FN_NAND, default: FN_NAND}), .NAME("x.y NAND chain"))
    u11 (.go(go), .checks(c[11]), .failures(fl[11]), .finished(e[11]));

  int checks, failures;

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    checks = 0; failures = 0;
    go = 1'b0;
    #1;
    go = 1'b1;
    do begin
      #1;
      all = 1'b1;
      for (int i = 0; i < NC; i++) if (!e[i]) all = 1'b0;
    end while (!all);
    for (int i = 0; i < NC; i++) begin
      checks   += c[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
