// dmc_net_check - builds one DMC network from a netlist description and
// checks the two-test claims on it.
//
// The network has NI primary inputs and NG 2T(4) gates in topological order;
// gate g has NIN[g] (1 to 3) data inputs, input j taken from SRC[g][j]
// (0..NI-1: primary input, NI+h: output of gate h) and normal-mode function
// FNS[g] (the arrays hold up to 8 gates; entries from NG on are unused).
// All gates share the controls k1..k4 (A = 0000, normal mode 1100).
// The output of the last gate is the network output. Every line carries a
// stuck-at fault site: control stems, control pins, data pins, gate-output
// stems (which matter where a gate fans out) and primary-input stems.
//
// Once go rises the checker
//   1. compares the fault-free network at k = 1100 with the same netlist of
//      conventional gates, for every input vector;
//   2. checks that T0 gives 0 and T0bar gives 1;
//   3. checks that every single stuck-at fault is detected by T0 or T0bar;
//   4. checks NRAND random multiple-fault patterns with at most one faulty
//      control input per gate, all of which must be detected;
//   5. if RED_LINE is set, checks that the fault RED_LINE / RED_CODE leaves
//      the normal-mode function unchanged for every input vector, i.e. that
//      no normal-mode test could find it (a redundancy of the netlist).
// Line numbering: 0..3 control stems, 4.. control pins (4 per gate), then
// data pins (3 slots per gate), gate-output stems, primary-input stems.
module dmc_net_check
  import dmc_pkg::*;
#(
  parameter int      NI    = 4,
  parameter int      NG    = 3,
  parameter int      NIN   [8]    = '{default: 2},
  parameter int      SRC   [8][3] = '{default: '{default: 0}},
  parameter dmc_fn_e FNS   [8]    = '{default: FN_NAND},
  parameter int      NRAND = 2000,
  parameter string   NAME  = "net",
  parameter int      RED_LINE = -1,   // line whose fault normal mode cannot see
  parameter int      RED_CODE = 1     // and the stuck value of that fault (1: s-a-0)
) (
  input  logic go,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int R  = 4;
  localparam int L_KPIN = R;
  localparam int L_DPIN = R + NG * R;
  localparam int L_GOUT = L_DPIN + NG * 3;
  localparam int L_PI   = L_GOUT + NG;
  localparam int NL     = L_PI + NI;

  logic [1:0]  code [NL];
  logic [1:R]  k;
  logic [NI-1:0] pi;

  function automatic logic inj(logic v, logic [1:0] c);
    return (c == 2'd1) ? 1'b0 : (c == 2'd2) ? 1'b1 : v;
  endfunction

  logic [1:R] ks;
  logic       pis  [NI];
  logic       gout [NG];
  logic       gs   [NG];

  always_comb begin
    for (int i = 0; i < R; i++) ks[i+1] = inj(k[i+1], code[i]);
    for (int i = 0; i < NI; i++) pis[i] = inj(pi[i], code[L_PI + i]);
    for (int g = 0; g < NG; g++) gs[g] = inj(gout[g], code[L_GOUT + g]);
  end

  for (genvar g = 0; g < NG; g++) begin : g_gate
    logic [1:R] kg;
    logic [1:3] dg;
    always_comb begin
      for (int i = 0; i < R; i++) kg[i+1] = inj(ks[i+1], code[L_KPIN + g * R + i]);
      for (int j = 0; j < 3; j++) begin
        logic v;
        v = 1'b0;
        if (j < NIN[g]) v = (SRC[g][j] < NI) ? pis[SRC[g][j]] : gs[SRC[g][j] - NI];
        dg[j+1] = inj(v, code[L_DPIN + g * 3 + j]);
      end
    end
    if (NIN[g] == 1) begin : g_n1
      dmc_gate #(.R(R), .N(1), .A(NET4_A), .FN(FNS[g])) u (.k(kg), .d(dg[1:1]), .f(gout[g]));
    end else if (NIN[g] == 2) begin : g_n2
      dmc_gate #(.R(R), .N(2), .A(NET4_A), .FN(FNS[g])) u (.k(kg), .d(dg[1:2]), .f(gout[g]));
    end else begin : g_n3
      dmc_gate #(.R(R), .N(3), .A(NET4_A), .FN(FNS[g])) u (.k(kg), .d(dg[1:3]), .f(gout[g]));
    end
  end

  logic f;
  assign f = gs[NG-1];

  // Conventional netlist for the normal-mode comparison.
  function automatic logic conv(logic [NI-1:0] x);
    logic o [NG];
    for (int g = 0; g < NG; g++) begin
      logic [2:0] v;
      logic a, r, xr;
      v = '0;
      for (int j = 0; j < NIN[g]; j++)
        v[j] = (SRC[g][j] < NI) ? x[SRC[g][j]] : o[SRC[g][j] - NI];
      a  = 1'b1; r = 1'b0; xr = 1'b0;
      for (int j = 0; j < NIN[g]; j++) begin
        a  = a & v[j];
        r  = r | v[j];
        xr = xr ^ v[j];
      end
      case (FNS[g])
        FN_AND:  o[g] = a;
        FN_OR:   o[g] = r;
        FN_NAND: o[g] = ~a;
        FN_NOR:  o[g] = ~r;
        FN_XOR:  o[g] = xr;
        default: o[g] = ~xr;
      endcase
    end
    return o[NG-1];
  endfunction

  function automatic bit valid_line(int l);
    if (l >= L_DPIN && l < L_GOUT) return ((l - L_DPIN) % 3) < NIN[(l - L_DPIN) / 3];
    return 1'b1;
  endfunction

  task automatic clear();
    for (int l = 0; l < NL; l++) code[l] = 2'd0;
  endtask

  task automatic detect(output logic det);
    logic r0, r1;
    k = NET4_A;  pi = '0; #1; r0 = f;
    k = ~NET4_A; pi = '1; #1; r1 = f;
    det = (r0 !== 1'b0) || (r1 !== 1'b1);
  endtask

  task automatic fail(string msg);
    failures++;
    if (failures <= 5) $display("FAIL %s: %s", NAME, msg);
  endtask

  initial begin
    logic det;
    int nsingle, nmulti;
    checks = 0; failures = 0; finished = 1'b0;
    nsingle = 0; nmulti = 0;
    clear();
    k = '0; pi = '0;
    wait (go);

    // 1. Normal mode equals the conventional netlist.
    for (int x = 0; x < (1 << NI); x++) begin
      k = NET4_NORMAL; pi = x[NI-1:0]; #1;
      checks++;
      if (f !== conv(pi)) fail($sformatf("normal mode differs for inputs %b", pi));
    end

    // 2. Fault-free answers to the two tests.
    detect(det);
    checks++;
    if (det) fail("fault-free network does not answer 0 / 1");

    // 3. Every single stuck-at fault.
    for (int l = 0; l < NL; l++) begin
      if (!valid_line(l)) continue;
      for (int c = 1; c <= 2; c++) begin
        clear(); code[l] = c[1:0];
        detect(det);
        checks++; nsingle++;
        if (!det) fail($sformatf("single fault on line %0d s-a-%0d not detected", l, c - 1));
      end
    end

    // 4. Random multiple faults, at most one faulty control per gate.
    for (int n = 0; n < NRAND; n++) begin
      bit any;
      clear();
      any = 1'b0;
      for (int l = L_DPIN; l < NL; l++)
        if (valid_line(l) && $urandom_range(0, 2) == 0) begin
          code[l] = 2'($urandom_range(1, 2));
          any = 1'b1;
        end
      if ($urandom_range(0, 3) == 0) begin
        int i;
        i = $urandom_range(0, R - 1);
        code[i] = 2'($urandom_range(1, 2));
        any = 1'b1;
        // pins on the same index may be faulty too: still one per gate
        for (int g = 0; g < NG; g++)
          if ($urandom_range(0, 3) == 0) code[L_KPIN + g * R + i] = 2'($urandom_range(1, 2));
      end else begin
        for (int g = 0; g < NG; g++)
          if ($urandom_range(0, 1) == 1) begin
            code[L_KPIN + g * R + $urandom_range(0, R - 1)] = 2'($urandom_range(1, 2));
            any = 1'b1;
          end
      end
      if (!any) continue;
      detect(det);
      checks++; nmulti++;
      if (!det) fail("multiple-fault pattern not detected");
    end
    // 5. A fault hidden by a logic redundancy in normal mode.
    if (RED_LINE >= 0) begin
      for (int x = 0; x < (1 << NI); x++) begin
        clear();
        code[RED_LINE] = RED_CODE[1:0];
        k = NET4_NORMAL; pi = x[NI-1:0]; #1;
        checks++;
        if (f !== conv(pi)) fail($sformatf("line %0d changes normal mode for inputs %b", RED_LINE, pi));
      end
      clear();
    end

    $display("%s: %0d gates, %0d single faults, %0d multiple-fault patterns, failures %0d",
             NAME, NG, nsingle, nmulti, failures);
    finished = 1'b1;
  end

endmodule
