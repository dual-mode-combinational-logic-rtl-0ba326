// dmc_gate_check - checks one configuration of dmc_gate.
//
// Instantiates dmc_gate with the given parameters and, once go rises:
//  1. sweeps every control vector and data vector and compares the output
//     with a reference built from the segment rules of the 2T(r) gate
//     (OR for k = A, AND for k = ~A, 1 within T of A, 0 within T of ~A,
//     the normal-mode function elsewhere);
//  2. applies the two tests (A, 0...0) and (~A, 1...1) and checks 0 and 1;
//  3. for every pattern of stuck-at faults on the data inputs and the
//     output combined with at most T stuck control inputs, applies the two
//     tests with the faulty values and checks that at least one of them
//     gives the wrong answer.
// Results come back on checks / failures; finished rises at the end.
module dmc_gate_check
  import dmc_pkg::*;
#(
  parameter int unsigned R  = 4,
  parameter int unsigned N  = 2,
  parameter logic [1:R]  A  = '0,
  parameter dmc_fn_e     FN = FN_NAND
) (
  input  logic go,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int unsigned T = (R - 2) / 2;

  logic [1:R] k;
  logic [1:N] d;
  logic       f;

  dmc_gate #(.R(R), .N(N), .A(A), .FN(FN)) dut (.k(k), .d(d), .f(f));

  function automatic logic ref_f(logic [1:R] kk, logic [1:N] dd);
    int h;
    h = $countones(kk ^ A);
    if (h == 0) return |dd;
    if (h == int'(R)) return &dd;
    if (h <= int'(T)) return 1'b1;
    if (h >= int'(R - T)) return 1'b0;
    case (FN)
      FN_AND:  return &dd;
      FN_OR:   return |dd;
      FN_NAND: return ~&dd;
      FN_NOR:  return ~|dd;
      FN_XOR:  return ^dd;
      default: return ~^dd;
    endcase
  endfunction

  // Value of a line carrying v under fault code c (0 none, 1 s-a-0, 2 s-a-1).
  function automatic logic inj(logic v, int c);
    return (c == 1) ? 1'b0 : (c == 2) ? 1'b1 : v;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s R=%0d N=%0d k=%b d=%b: f=%b expected %b",
               what, R, N, k, d, got, exp);
    end
  endtask

  // Output of the gate under one fault pattern for the given test
  // (0: T0, 1: T0bar).
  task automatic apply_faulty(int test, int kc[R], int dc[N], int oc,
                              output logic out);
    for (int i = 0; i < int'(R); i++)
      k[i+1] = inj((test == 0) ? A[i+1] : ~A[i+1], kc[i]);
    for (int i = 0; i < int'(N); i++)
      d[i+1] = inj(test[0], dc[i]);
    #1;
    out = inj(f, oc);
  endtask

  initial begin
    checks   = 0;
    failures = 0;
    finished = 1'b0;
    k = '0;
    d = '0;
    wait (go);

    // 1. Full truth table.
    for (int kv = 0; kv < (1 << R); kv++) begin
      for (int dv = 0; dv < (1 << N); dv++) begin
        k = kv[R-1:0];
        d = dv[N-1:0];
        #1;
        check("truth table", f, ref_f(k, d));
      end
    end

    // 2. The two function-independent tests.
    k = A;  d = '0; #1; check("T0", f, 1'b0);
    k = ~A; d = '1; #1; check("T0bar", f, 1'b1);

    // 3. Fault patterns: any data/output faults, at most T control faults.
    begin
      int kc[R];
      int dc[N];
      int ncodes_k, ncodes_d, nfk, oc;
      logic o0, o1;
      int missed;
      missed = 0;
      ncodes_k = 1;
      for (int i = 0; i < int'(R); i++) ncodes_k *= 3;
      ncodes_d = 1;
      for (int i = 0; i < int'(N); i++) ncodes_d *= 3;
      for (int ck = 0; ck < ncodes_k; ck++) begin
        int x;
        x = ck;
        nfk = 0;
        for (int i = 0; i < int'(R); i++) begin
          kc[i] = x % 3;
          x = x / 3;
          if (kc[i] != 0) nfk++;
        end
        if (nfk > int'(T)) continue;
        for (int cd = 0; cd < ncodes_d; cd++) begin
          x = cd;
          for (int i = 0; i < int'(N); i++) begin
            dc[i] = x % 3;
            x = x / 3;
          end
          for (oc = 0; oc < 3; oc++) begin
            if (ck == 0 && cd == 0 && oc == 0) continue;
            apply_faulty(0, kc, dc, oc, o0);
            apply_faulty(1, kc, dc, oc, o1);
            checks++;
            if (o0 == 1'b0 && o1 == 1'b1) begin
              failures++;
              missed++;
              if (missed <= 5)
                $display("FAIL fault pattern not detected R=%0d ck=%0d cd=%0d oc=%0d",
                         R, ck, cd, oc);
            end
          end
        end
      end
    end
    finished = 1'b1;
  end

endmodule
