// dmc_gate - 2T(r) dual-mode logic gate.
//
// A combinational gate with R control inputs k[1:R] and N data inputs
// d[1:N]. The Hamming distance hd between k and the test vector A decides
// what the gate does:
//   hd == 0            OR of the data inputs   (test mode, pattern T0)
//   hd == R            AND of the data inputs  (test mode, pattern T0bar)
//   1 <= hd <= T       output forced to 1
//   R-T <= hd <= R-1   output forced to 0
//   otherwise            normal mode: the conventional function FN
// with T = floor((R-2)/2), the number of control-input faults per gate that
// the two tests still detect. For R = 4 (T = 1) this is the 2T(4) truth
// table: the four vectors next to A give 1, the four next to ~A give 0, and
// the six vectors at distance 2 are normal mode.
//
// Applying (A, 0...0) must give 0 and (~A, 1...1) must give 1. Any pattern of
// stuck-at faults on the data inputs and output, together with at most T
// stuck control inputs, turns one of those two results into its complement.
//
// The segment layout, the OR/AND test segments, the forced values and the
// 2T(r) generalisation follow the original DMC scheme. The scheme leaves the normal-mode
// segments open apart from one example (a NAND in segment 1100 for A = 0000);
// here every normal-mode segment realises the same function FN, and the
// defaults are that example. Purely combinational, no clock.
module dmc_gate
  import dmc_pkg::*;
#(
  parameter int unsigned R  = 4,        // number of control inputs
  parameter int unsigned N  = 2,        // number of data inputs
  parameter logic [1:R]  A  = '0,       // test vector a1..aR
  parameter dmc_fn_e     FN = FN_NAND   // normal-mode function
) (
  input  logic [1:R] k,   // control inputs, k[1] is k1
  input  logic [1:N] d,   // data inputs, d[1] is d1
  output logic       f
);

  localparam int unsigned T  = (R - 2) / 2;
  localparam int unsigned DW = $clog2(R + 1);
  localparam logic [DW-1:0] D_T     = DW'(T);
  localparam logic [DW-1:0] D_R     = DW'(R);
  localparam logic [DW-1:0] D_R_M_T = DW'(R - T);

  if (R < 4) begin : g_check_r
    $error("dmc_gate: at least four control inputs are needed (R = %0d)", R);
  end
  if (N < 1) begin : g_check_n
    $error("dmc_gate: at least one data input is needed (N = %0d)", N);
  end

  logic [DW-1:0] hd;
  dmc_seg_e      seg;
  logic          fn_out;

  // Hamming distance of the control vector from the test vector.
  always_comb begin
    hd = '0;
    for (int unsigned i = 1; i <= R; i++) begin
      hd = hd + DW'(k[i] ^ A[i]);
    end
  end

  always_comb begin
    if (hd == '0)            seg = SEG_TEST_OR;
    else if (hd == D_R)      seg = SEG_TEST_AND;
    else if (hd <= D_T)      seg = SEG_FORCE_1;
    else if (hd >= D_R_M_T)  seg = SEG_FORCE_0;
    else                       seg = SEG_NORMAL;
  end

  always_comb begin
    unique case (FN)
      FN_AND:  fn_out = &d;
      FN_OR:   fn_out = |d;
      FN_NAND: fn_out = ~&d;
      FN_NOR:  fn_out = ~|d;
      FN_XOR:  fn_out = ^d;
      FN_XNOR: fn_out = ~^d;
      default: fn_out = ~&d;
    endcase
  end

  always_comb begin
    unique case (seg)
      SEG_TEST_OR:  f = |d;
      SEG_TEST_AND: f = &d;
      SEG_FORCE_1:  f = 1'b1;
      SEG_FORCE_0:  f = 1'b0;
      default:      f = fn_out;
    endcase
  end

endmodule
