// dmc_network4 - Network 4: a two-level DMC network of three 2T(4) gates.
//
// Gate 1 takes d11 and d12, gate 2 takes d21 and d22, and gate 3 combines
// the outputs of gates 1 and 2 into the network output f. All three gates
// share the four control lines k1..k4, as every DMC network must: the
// controls come straight from network inputs and never from data signals.
//
// With the default configuration (test vector A = 0000, NAND in normal
// mode) the network behaves as:
//   k = 1100 (normal mode)       f = d11.d12 + d21.d22   (NAND-NAND)
//   k = A    (test pattern T0)   f = d11 + d12 + d21 + d22, 0 for all-0 data
//   k = ~A   (test pattern T0bar) f = d11.d12.d21.d22,    1 for all-1 data
// so the two function-independent tests expect f = 0 and f = 1.
//
// The gate count, the connections and the shared controls are those of the
// original Network 4; the NAND normal mode and A = 0000 are the scheme's
// worked example. Purely combinational: f settles within the delay of two
// gate levels.
module dmc_network4
  import dmc_pkg::*;
#(
  parameter logic [1:4] A  = NET4_A,   // test vector a1..a4
  parameter dmc_fn_e    FN = NET4_FN   // normal-mode function of every gate
) (
  input  logic [1:4] k,     // shared control lines k1..k4
  input  logic       d11,
  input  logic       d12,
  input  logic       d21,
  input  logic       d22,
  output logic       f
);

  logic f1, f2;

  dmc_gate #(.R(NET4_R), .N(2), .A(A), .FN(FN)) u_gate1 (
    .k(k), .d({d11, d12}), .f(f1)
  );

  dmc_gate #(.R(NET4_R), .N(2), .A(A), .FN(FN)) u_gate2 (
    .k(k), .d({d21, d22}), .f(f2)
  );

  dmc_gate #(.R(NET4_R), .N(2), .A(A), .FN(FN)) u_gate3 (
    .k(k), .d({f1, f2}), .f(f)
  );

endmodule
