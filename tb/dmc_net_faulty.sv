// dmc_net_faulty - Network 4 built from dmc_gate with stuck-at fault sites.
//
// Same shape as dmc_network4 (gates 1 and 2 feed gate 3, shared controls),
// but every line passes through a fault site whose 2-bit code selects
// 0 = fault-free, 1 = stuck-at-0, 2 = stuck-at-1 (3 acts as fault-free):
//   stem_c[i]      control line k(i+1) before it branches to the gates
//   kpin_c[g][i]   control input k(i+1) of gate g+1
//   dpin_c[g][j]   data input j+1 of gate g+1 (for gate 3 these are the
//                  outputs of gates 1 and 2)
//   out_c          network output
// Used by the fault-coverage testbench; R sets the number of controls.
module dmc_net_faulty
  import dmc_pkg::*;
#(
  parameter int unsigned R = 4
) (
  input  logic [1:R]                k,
  input  logic [1:4]                d,       // d11, d12, d21, d22
  input  logic [R-1:0][1:0]         stem_c,
  input  logic [2:0][R-1:0][1:0]    kpin_c,
  input  logic [2:0][1:0][1:0]      dpin_c,
  input  logic [1:0]                out_c,
  output logic                      f
);

  function automatic logic inj(logic v, logic [1:0] c);
    return (c == 2'd1) ? 1'b0 : (c == 2'd2) ? 1'b1 : v;
  endfunction

  logic [1:R] ks;
  logic [2:0][1:R] kg;
  logic [2:0][1:2] dg;
  logic f1, f2, f3;

  always_comb begin
    for (int i = 0; i < int'(R); i++) ks[i+1] = inj(k[i+1], stem_c[i]);
    for (int g = 0; g < 3; g++)
      for (int i = 0; i < int'(R); i++) kg[g][i+1] = inj(ks[i+1], kpin_c[g][i]);
    dg[0][1] = inj(d[1], dpin_c[0][0]);
    dg[0][2] = inj(d[2], dpin_c[0][1]);
    dg[1][1] = inj(d[3], dpin_c[1][0]);
    dg[1][2] = inj(d[4], dpin_c[1][1]);
    dg[2][1] = inj(f1, dpin_c[2][0]);
    dg[2][2] = inj(f2, dpin_c[2][1]);
    f = inj(f3, out_c);
  end

  dmc_gate #(.R(R), .N(2), .A('0), .FN(FN_NAND)) u_g1 (.k(kg[0]), .d(dg[0]), .f(f1));
  dmc_gate #(.R(R), .N(2), .A('0), .FN(FN_NAND)) u_g2 (.k(kg[1]), .d(dg[1]), .f(f2));
  dmc_gate #(.R(R), .N(2), .A('0), .FN(FN_NAND)) u_g3 (.k(kg[2]), .d(dg[2]), .f(f3));

endmodule
