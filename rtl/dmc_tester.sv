// dmc_tester - applies the two function-independent tests to a DMC network.
//
// A fault-free DMC network answers the test pattern T0 = (A, 0...0) with 0 on
// every output and T0bar = (~A, 1...1) with 1 on every output, whatever
// function it computes and however it is wired. This block drives those two
// patterns onto the network's control and data inputs, one clock cycle each,
// and compares the outputs with the expected constants.
//
// Interface and timing:
//   start    one-cycle request, ignored while busy
//   net_k    control vector for the network (A while idle or in T0, ~A in T1)
//   net_d    data vector for the network (0 while idle or in T0, 1 in T1)
//   net_f    network outputs, sampled at the end of each test cycle
//   busy     high during the two test cycles
//   done     one-cycle pulse with the verdict, two cycles after start
//   pass     1 when both tests gave the expected outputs (held until the
//            next start)
//   fail_t0  some output was 1 under T0 (held until the next start)
//   fail_t1  some output was 0 under T0bar (held until the next start)
// The network is combinational and must settle within one clock cycle.
//
// The patterns and expected outputs are those of the DMC scheme, which
// says nothing about how the tests are applied; the sequencer, its timing
// and its active-low synchronous reset are this implementation's choice.
module dmc_tester #(
  parameter int unsigned R = 4,       // control inputs of the network
  parameter int unsigned M = 4,       // data inputs of the network
  parameter int unsigned P = 1,       // outputs of the network
  parameter logic [1:R]  A = '0       // test vector a1..aR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic [1:R]   net_k,
  output logic [1:M]   net_d,
  input  logic [P-1:0] net_f,
  output logic         busy,
  output logic         done,
  output logic         pass,
  output logic         fail_t0,
  output logic         fail_t1
);

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_T0   = 2'd1,
    ST_T1   = 2'd2
  } state_e;

  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      done    <= 1'b0;
      pass    <= 1'b0;
      fail_t0 <= 1'b0;
      fail_t1 <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            state   <= ST_T0;
            pass    <= 1'b0;
            fail_t0 <= 1'b0;
            fail_t1 <= 1'b0;
          end
        end
        ST_T0: begin
          fail_t0 <= |net_f;
          state   <= ST_T1;
        end
        ST_T1: begin
          fail_t1 <= ~&net_f;
          pass    <= ~fail_t0 & (&net_f);
          done    <= 1'b1;
          state   <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    if (state == ST_T1) begin
      net_k = ~A;
      net_d = '1;
    end else begin
      net_k = A;
      net_d = '0;
    end
  end

  assign busy = (state != ST_IDLE);

  // The verdict is only given at the end of a test run.
  a_done_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                 done |-> state == ST_IDLE);
  // pass and a failure flag never stand together after a verdict.
  a_verdict : assert property (@(posedge clk) disable iff (!rst_n)
                               done |-> pass != (fail_t0 | fail_t1));

endmodule
