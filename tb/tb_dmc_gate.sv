// tb_dmc_gate - self-checking testbench of the 2T(r) gate.
//
// Runs dmc_gate_check on three configurations: the 2T(4) gate of the
// worked example (A = 0000, NAND, two data inputs), a 2T(4) gate with a
// different test vector and an XOR normal mode, and a 2T(6) gate, which
// must tolerate two faulty control inputs. It also checks a few rows of
// the 2T(4) truth table by hand: forced 1 next to A, forced 0 next to ~A,
// NAND in the normal-mode segment 1100.
module tb_dmc_gate;
  import dmc_pkg::*;

  int   checks, failures;
  logic go;
  int   c0, c1, c2, f0, f1, f2;
  logic e0, e1, e2;

  dmc_gate_check #(.R(4), .N(2), .A(4'b0000), .FN(FN_NAND))
    u_c0 (.go(go), .checks(c0), .failures(f0), .finished(e0));
  dmc_gate_check #(.R(4), .N(3), .A(4'b1010), .FN(FN_XOR))
    u_c1 (.go(go), .checks(c1), .failures(f1), .finished(e1));
  dmc_gate_check #(.R(6), .N(3), .A(6'b110010), .FN(FN_NOR))
    u_c2 (.go(go), .checks(c2), .failures(f2), .finished(e2));

  // Hand-worked rows of the 2T(4) NAND gate with A = 0000.
  logic [1:4] k;
  logic [1:2] d;
  logic       f;
  dmc_gate #(.R(4), .N(2), .A(4'b0000), .FN(FN_NAND)) u_hand (.k(k), .d(d), .f(f));

  task automatic hand(logic [1:4] kk, logic [1:2] dd, logic exp);
    k = kk; d = dd; #1;
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL hand row k=%b d=%b: f=%b expected %b", kk, dd, f, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; go = 1'b0;
    k = '0; d = '0;
    #1;
    hand(4'b0000, 2'b00, 1'b0);   // T0: OR of 00
    hand(4'b0000, 2'b10, 1'b1);   // OR segment
    hand(4'b1111, 2'b11, 1'b1);   // T0bar: AND of 11
    hand(4'b1111, 2'b01, 1'b0);   // AND segment
    hand(4'b0100, 2'b00, 1'b1);   // one away from A: forced 1
    hand(4'b0001, 2'b11, 1'b1);
    hand(4'b1101, 2'b11, 1'b0);   // one away from ~A: forced 0
    hand(4'b0111, 2'b00, 1'b0);
    hand(4'b1100, 2'b11, 1'b0);   // normal mode NAND
    hand(4'b1100, 2'b01, 1'b1);
    hand(4'b0011, 2'b11, 1'b0);   // another normal-mode segment
    go = 1'b1;
    wait (e0 && e1 && e2);
    checks   += c0 + c1 + c2;
    failures += f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
