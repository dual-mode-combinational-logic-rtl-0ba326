// dmc_pkg - shared types and constants of the dual-mode combinational (DMC)
// logic family.
//
// A 2T(r) gate has r control inputs and n data inputs. The control vector
// selects one of five segment classes (see dmc_seg_e): the two test modes,
// the two "forced" classes that push the output to the complement of the
// test-mode result, and normal mode, where the gate computes its
// conventional logic function (dmc_fn_e).
//
// The Network 4 constants follow the worked example of the DMC scheme: test
// vector a = 0000 and normal-mode control vector (k1,k2,k3,k4) = (1,1,0,0),
// with NAND as the normal-mode function. Control vectors are packed [1:R], so
// k[1] is k1 and a literal 4'b1100 reads left to right as k1..k4.
package dmc_pkg;

  // Conventional function a gate realises in normal mode.
  typedef enum logic [2:0] {
    FN_AND  = 3'd0,
    FN_OR   = 3'd1,
    FN_NAND = 3'd2,
    FN_NOR  = 3'd3,
    FN_XOR  = 3'd4,
    FN_XNOR = 3'd5
  } dmc_fn_e;

  // Segment class selected by the control vector, by its Hamming distance
  // dist from the test vector a (t = floor((r-2)/2)):
  //   dist == 0          SEG_TEST_OR   output = OR of the data (test T0)
  //   dist == r          SEG_TEST_AND  output = AND of the data (test T0bar)
  //   1 <= dist <= t     SEG_FORCE_1   output = 1
  //   r-t <= dist < r    SEG_FORCE_0   output = 0
  //   otherwise          SEG_NORMAL    output = normal-mode function
  typedef enum logic [2:0] {
    SEG_TEST_OR  = 3'd0,
    SEG_TEST_AND = 3'd1,
    SEG_FORCE_1  = 3'd2,
    SEG_FORCE_0  = 3'd3,
    SEG_NORMAL   = 3'd4
  } dmc_seg_e;

  // Configuration of the 2T(4) gates of Network 4.
  localparam int unsigned NET4_R      = 4;
  localparam logic [1:4]  NET4_A      = 4'b0000;
  localparam logic [1:4]  NET4_NORMAL = 4'b1100;
  localparam dmc_fn_e     NET4_FN     = FN_NAND;

endpackage
