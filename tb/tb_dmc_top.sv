// tb_dmc_top - end-to-end testbench of the self-testable Network 4.
//
// Runs the top with its default configuration and exercises every mechanism:
//   normal mode   k_in = 1100, all 16 data vectors: f = d11.d12 + d21.d22
//   other normal-mode segments (two 1s in k_in): same NAND-NAND function
//   test segments k_in = 0000 / 1111: OR / AND of all data inputs
//   forced segments: one 1 in k_in gives f = 1, three 1s give f = 0
//   self-test     test_start runs T0 then T0bar; pass two cycles later,
//                 with k_in / d_in held at values that would disturb it
//   detection     the self-test is repeated with the output of gate 1
//                 stuck at 0 and then at 1, and with the shared control
//                 line k1 stuck at 1; each must be reported as a failure
//                 of the expected test
// Each mechanism is counted, and one that never happened is a failure.
module tb_dmc_top;

  int checks, failures;
  int n_normal, n_test_or, n_test_and, n_force1, n_force0;
  int n_selftest_pass, n_selftest_fail, n_override;

  logic       clk, rst_n;
  logic [1:4] k_in, d_in;
  logic       f;
  logic       test_start, test_busy, test_done, test_pass;
  logic       test_fail_t0, test_fail_t1;

  dmc_top dut (
    .clk(clk), .rst_n(rst_n), .k_in(k_in), .d_in(d_in), .f(f),
    .test_start(test_start), .test_busy(test_busy), .test_done(test_done),
    .test_pass(test_pass), .test_fail_t0(test_fail_t0),
    .test_fail_t1(test_fail_t1)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: k_in=%b d_in=%b got %b expected %b",
               what, k_in, d_in, got, exp);
    end
  endtask

  // Runs one self-test with k_in / d_in set to a disturbing value and
  // returns the verdict flags. With healthy set, f must read 0 under T0.
  task automatic selftest(input logic healthy, output logic p, output logic e0, output logic e1);
    int cyc;
    @(negedge clk);
    k_in = 4'b1100;
    d_in = 4'b1010;
    test_start = 1'b1;
    @(negedge clk);
    test_start = 1'b0;
    cyc = 0;
    while (!test_done && cyc < 10) begin
      checks++;
      if (!test_busy) begin
        failures++;
        $display("FAIL busy low before done");
      end else if (cyc == 0 && healthy && f !== 1'b0) begin
        failures++;   // T0 applied despite k_in/d_in
        $display("FAIL f=%b under T0", f);
      end else if (cyc == 0 && healthy) n_override++;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 2) begin
      failures++;
      $display("FAIL verdict after %0d cycles, expected 2", cyc);
    end
    p = test_pass; e0 = test_fail_t0; e1 = test_fail_t1;
    @(negedge clk);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p, e0, e1;
    checks = 0; failures = 0;
    n_normal = 0; n_test_or = 0; n_test_and = 0; n_force1 = 0; n_force0 = 0;
    n_selftest_pass = 0; n_selftest_fail = 0; n_override = 0;
    rst_n = 1'b0; test_start = 1'b0; k_in = '0; d_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Combinational sweep of all control and data vectors.
    for (int kv = 0; kv < 16; kv++) begin
      for (int dv = 0; dv < 16; dv++) begin
        logic [3:0] dd;
        logic       nn;
        k_in = kv[3:0];
        d_in = dv[3:0];
        dd   = dv[3:0];
        #1;
        nn = (dd[3] & dd[2]) | (dd[1] & dd[0]);
        case ($countones(k_in))
          0: begin expect_eq("T0 segment (OR)", f, |dd);  n_test_or++;  end
          1: begin expect_eq("forced 1", f, 1'b1);         n_force1++;   end
          2: begin expect_eq("normal mode", f, nn);        n_normal++;   end
          3: begin expect_eq("forced 0", f, 1'b0);         n_force0++;   end
          default: begin expect_eq("T0bar segment (AND)", f, &dd); n_test_and++; end
        endcase
      end
    end

    // Self-test of the fault-free network.
    selftest(1'b1, p, e0, e1);
    expect_eq("self-test pass", p, 1'b1);
    expect_eq("self-test no T0 failure", e0, 1'b0);
    expect_eq("self-test no T1 failure", e1, 1'b0);
    if (p) n_selftest_pass++;

    // Output of gate 1 stuck at 0: T0bar gives AND(0, 1) = 0.
    force dut.u_net.f1 = 1'b0;
    selftest(1'b0, p, e0, e1);
    release dut.u_net.f1;
    expect_eq("f1 s-a-0 detected", p, 1'b0);
    expect_eq("f1 s-a-0 fails T0bar", e1, 1'b1);
    expect_eq("f1 s-a-0 passes T0", e0, 1'b0);
    if (!p) n_selftest_fail++;

    // Output of gate 1 stuck at 1: T0 gives OR(1, 0) = 1.
    force dut.u_net.f1 = 1'b1;
    selftest(1'b0, p, e0, e1);
    release dut.u_net.f1;
    expect_eq("f1 s-a-1 detected", p, 1'b0);
    expect_eq("f1 s-a-1 fails T0", e0, 1'b1);
    expect_eq("f1 s-a-1 passes T0bar", e1, 1'b0);
    if (!p) n_selftest_fail++;

    // Shared control line k1 stuck at 1: T0 lands one away from A, every
    // gate is forced to 1.
    force dut.net_k = {1'b1, dut.tst_k[2:4]};
    selftest(1'b0, p, e0, e1);
    release dut.net_k;
    expect_eq("k1 s-a-1 detected", p, 1'b0);
    expect_eq("k1 s-a-1 fails T0", e0, 1'b1);
    if (!p) n_selftest_fail++;

    // Back to normal operation after the tests.
    #1;
    k_in = 4'b1100; d_in = 4'b0011; #1;
    expect_eq("normal mode after self-test", f, 1'b1);
    k_in = 4'b1100; d_in = 4'b0110; #1;
    expect_eq("normal mode after self-test", f, 1'b0);
    selftest(1'b1, p, e0, e1);
    expect_eq("self-test pass after release", p, 1'b1);
    if (p) n_selftest_pass++;

    $display("mechanisms: normal=%0d test_or=%0d test_and=%0d force1=%0d force0=%0d selftest_pass=%0d selftest_fail=%0d input_override=%0d",
             n_normal, n_test_or, n_test_and, n_force1, n_force0,
             n_selftest_pass, n_selftest_fail, n_override);
    if (n_normal == 0)        begin failures++; $display("FAIL normal mode never used"); end
    if (n_test_or == 0)       begin failures++; $display("FAIL OR test segment never used"); end
    if (n_test_and == 0)      begin failures++; $display("FAIL AND test segment never used"); end
    if (n_force1 == 0)        begin failures++; $display("FAIL forced-1 segment never used"); end
    if (n_force0 == 0)        begin failures++; $display("FAIL forced-0 segment never used"); end
    if (n_selftest_pass == 0) begin failures++; $display("FAIL self-test never passed"); end
    if (n_selftest_fail == 0) begin failures++; $display("FAIL self-test never flagged a fault"); end
    if (n_override == 0)      begin failures++; $display("FAIL tester never took over the inputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
