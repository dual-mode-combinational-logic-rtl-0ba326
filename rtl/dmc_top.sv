// dmc_top - Network 4 as a self-testable DMC network.
//
// The DMC network (three 2T(4) gates, see dmc_network4) computes
// f = d11.d12 + d21.d22 when its controls hold the normal-mode vector
// k = 1100. Its controls and data normally come from the ports k_in and
// d_in. A pulse on test_start hands them to the two-pattern tester for two
// clock cycles: it applies T0 = (0000, 0000) and T0bar = (1111, 1111),
// checks that f answers 0 and then 1, and reports the verdict on
// test_done / test_pass / test_fail_t0 / test_fail_t1 two cycles after the
// start. While test_busy is high the k_in and d_in ports are ignored.
//
// d_in[1:4] carries d11, d12, d21, d22 in that order. The network itself is
// combinational: in normal operation f follows k_in and d_in without a
// clock. The tester and the input multiplexer are this implementation's
// choice of how the two tests reach the network; they sit outside the DMC
// network and are not covered by its tests.
module dmc_top
  import dmc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:4] k_in,        // control lines k1..k4
  input  logic [1:4] d_in,        // d11, d12, d21, d22
  output logic       f,           // network output
  input  logic       test_start,
  output logic       test_busy,
  output logic       test_done,
  output logic       test_pass,
  output logic       test_fail_t0,
  output logic       test_fail_t1
);

  logic [1:4] tst_k, tst_d;
  logic [1:4] net_k, net_d;

  dmc_tester #(.R(NET4_R), .M(4), .P(1), .A(NET4_A)) u_tester (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (test_start),
    .net_k   (tst_k),
    .net_d   (tst_d),
    .net_f   (f),
    .busy    (test_busy),
    .done    (test_done),
    .pass    (test_pass),
    .fail_t0 (test_fail_t0),
    .fail_t1 (test_fail_t1)
  );

  assign net_k = test_busy ? tst_k : k_in;
  assign net_d = test_busy ? tst_d : d_in;

  dmc_network4 #(.A(NET4_A), .FN(NET4_FN)) u_net (
    .k   (net_k),
    .d11 (net_d[1]),
    .d12 (net_d[2]),
    .d21 (net_d[3]),
    .d22 (net_d[4]),
    .f   (f)
  );

endmodule
