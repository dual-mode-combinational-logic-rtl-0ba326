// tb_dmc_tester - self-checking testbench of the two-pattern tester.
//
// The tester drives a stand-in for a two-output DMC network. The stand-in
// answers T0 with 00 and T0bar with 11 when healthy; the testbench can make
// one output stick at 0 or 1 or invert it. For each case the testbench
// checks the patterns the tester drives in each cycle, that done comes two
// cycles after start, and the pass / fail_t0 / fail_t1 verdict. It also
// checks that start is ignored while a test is running.
module tb_dmc_tester;

  localparam logic [1:5] A = 5'b10110;

  int checks, failures;
  logic clk, rst_n, start;
  logic [1:5] net_k;
  logic [1:3] net_d;
  logic [1:0] net_f;
  logic busy, done, pass, fail_t0, fail_t1;
  int   fault;   // 0 none, 1 output 0 stuck at 0, 2 stuck at 1, 3 inverted

  dmc_tester #(.R(5), .M(3), .P(2), .A(A)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .net_k(net_k), .net_d(net_d),
    .net_f(net_f), .busy(busy), .done(done), .pass(pass),
    .fail_t0(fail_t0), .fail_t1(fail_t1)
  );

  // Stand-in network: both outputs follow the all-1 data pattern when the
  // controls equal ~A, and read 0 otherwise.
  logic good;
  assign good = (net_k == ~A) && (&net_d);
  always_comb begin
    net_f[1] = good;
    unique case (fault)
      1:       net_f[0] = 1'b0;
      2:       net_f[0] = 1'b1;
      3:       net_f[0] = ~good;
      default: net_f[0] = good;
    endcase
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (fault %0d)", what, got, exp, fault);
    end
  endtask

  task automatic run(int flt, logic exp_pass, logic exp_f0, logic exp_f1);
    int cyc;
    fault = flt;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    expect_eq("busy in T0", busy, 1'b1);
    expect_eq("T0 controls", net_k == A, 1'b1);
    expect_eq("T0 data", net_d == 3'b000, 1'b1);
    start = 1'b1;                 // must be ignored
    @(negedge clk);
    start = 1'b0;
    cyc++;
    expect_eq("busy in T1", busy, 1'b1);
    expect_eq("T1 controls", net_k == ~A, 1'b1);
    expect_eq("T1 data", net_d == 3'b111, 1'b1);
    expect_eq("no early done", done, 1'b0);
    @(negedge clk);
    cyc++;
    expect_eq("done two cycles after start", done, 1'b1);
    expect_eq("idle after test", busy, 1'b0);
    expect_eq("pass", pass, exp_pass);
    expect_eq("fail_t0", fail_t0, exp_f0);
    expect_eq("fail_t1", fail_t1, exp_f1);
    @(negedge clk);
    expect_eq("done is a pulse", done, 1'b0);
    expect_eq("pass held", pass, exp_pass);
    expect_eq("stays idle", busy, 1'b0);
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; fault = 0;
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    expect_eq("idle after reset", busy, 1'b0);
    expect_eq("no verdict after reset", pass | done, 1'b0);
    run(0, 1'b1, 1'b0, 1'b0);
    run(1, 1'b0, 1'b0, 1'b1);
    run(2, 1'b0, 1'b1, 1'b0);
    run(3, 1'b0, 1'b1, 1'b1);
    run(0, 1'b1, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
