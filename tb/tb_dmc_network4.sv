// tb_dmc_network4 - self-checking testbench of Network 4.
//
// Sweeps all 16 control vectors against all 16 data vectors and compares f
// with a reference that composes three 2T(4) reference gates in the shape
// of the network. It then checks the three closed forms the network must
// show with A = 0000 and NAND in normal mode:
//   k = 1100   f = d11.d12 + d21.d22
//   k = 0000   f = OR of all data inputs
//   k = 1111   f = AND of all data inputs
// and the two test results (0 for T0, 1 for T0bar). Finally it shows the
// known escape of the scheme: with k1 and k2 both stuck at 1, T0 puts the
// network in normal mode, which still answers 0, so the double fault is not
// seen by T0, and T0bar (k = 1111) is unaffected by it.
module tb_dmc_network4;
  import dmc_pkg::*;

  int checks, failures;
  logic [1:4] k;
  logic d11, d12, d21, d22;
  logic f;

  dmc_network4 dut (.k(k), .d11(d11), .d12(d12), .d21(d21), .d22(d22), .f(f));

  function automatic logic gate_ref(logic [1:4] kk, logic x, logic y);
    int h;
    h = $countones(kk);          // distance from A = 0000
    case (h)
      0:       return x | y;
      1:       return 1'b1;
      2:       return ~(x & y);
      3:       return 1'b0;
      default: return x & y;
    endcase
  endfunction

  task automatic check(string what, logic exp);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL %s k=%b d=%b%b%b%b: f=%b expected %b",
               what, k, d11, d12, d21, d22, f, exp);
    end
  endtask

  task automatic drive(logic [1:4] kk, logic [3:0] dv);
    k = kk;
    {d11, d12, d21, d22} = dv;
    #1;
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int kv = 0; kv < 16; kv++) begin
      for (int dv = 0; dv < 16; dv++) begin
        drive(kv[3:0], dv[3:0]);
        check("sweep", gate_ref(k, gate_ref(k, d11, d12), gate_ref(k, d21, d22)));
      end
    end
    for (int dv = 0; dv < 16; dv++) begin
      drive(4'b1100, dv[3:0]);
      check("normal", (d11 & d12) | (d21 & d22));
      drive(4'b0000, dv[3:0]);
      check("test OR", d11 | d12 | d21 | d22);
      drive(4'b1111, dv[3:0]);
      check("test AND", d11 & d12 & d21 & d22);
    end
    drive(4'b0000, 4'b0000); check("T0", 1'b0);
    drive(4'b1111, 4'b1111); check("T0bar", 1'b1);
    // k1 and k2 stuck at 1 while T0 is applied: the network sees 1100.
    drive(4'b1100, 4'b0000); check("double control fault escapes T0", 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
