// gs_pkg: types and constants shared by the Gaussian-smoothing co-processor.
//
// Pixels and kernel coefficients are IEEE-754 single-precision words (fp32_t).
// GAUSS_KERNEL holds the 3x3 smoothing kernel as nine constants; element k is
// paired with input FIFO word k. Element 8 is the first (top-left) kernel
// entry and element 0 the last, so element 4 is the centre 0.3989. The values
// are the standard normal density sampled at 0, +-1, +-2, +-3 and +-4, laid out
// row by row as the design specifies them:
//   0.0001 0.0044 0.0540 / 0.2420 0.3989 0.2420 / 0.0540 0.0044 0.0001
// The kernel is wired into the multipliers as constants; it has no logic of
// its own.
//
// gs_state_e numbers the states the arbiter steps through; the spliter turns
// each into one register enable.
package gs_pkg;

  typedef logic [31:0] fp32_t;

  localparam int unsigned TAPS = 9;

  // Kernel coefficient k (k = 0..8), single-precision bit patterns.
  localparam fp32_t GAUSS_KERNEL [TAPS] = '{
    32'h38d1_b717,  // 0: 0.0001
    32'h3b90_2de0,  // 1: 0.0044
    32'h3d5d_2f1b,  // 2: 0.0540
    32'h3e77_ced9,  // 3: 0.2420
    32'h3ecc_3c9f,  // 4: 0.3989 (centre)
    32'h3e77_ced9,  // 5: 0.2420
    32'h3d5d_2f1b,  // 6: 0.0540
    32'h3b90_2de0,  // 7: 0.0044
    32'h38d1_b717   // 8: 0.0001
  };

  // Arbiter state numbers (3 bits, as in the state machine's out[2:0]).
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_ADD1   = 3'd1,
    ST_ADD2   = 3'd2,
    ST_ADD3   = 3'd3,
    ST_ADD4   = 3'd4,
    ST_RESULT = 3'd5
  } gs_state_e;

  // Register enables produced by the spliter.
  typedef struct packed {
    logic en_result;
    logic en_add4;
    logic en_add3;
    logic en_add2;
    logic en_add1;
  } gs_enables_t;

  // Canonical quiet NaN returned for invalid operations.
  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;

endpackage
