// gs_convolver: one 3x3 Gaussian convolution per start, in single precision.
//
// Nine multipliers form window[k] * KERNEL[k] in parallel. Eight adders in a
// four-level tree reduce the nine products to one sum; each level reads its
// operands from a stage register (add1..add4) and the last feeds the result
// register:
//   add1 reg (9 words)  <- the nine products
//   level 1: (0+1) (2+3) (4+5) (6+7), word 8 passed on  -> add2 reg (5 words)
//   level 2: (0+1) (2+3), word 4 passed on              -> add3 reg (3 words)
//   level 3: (0+1), word 2 passed on                    -> add4 reg (2 words)
//   level 4: (0+1)                                      -> result register
// Since the registers hold their words until the next enable, a word passed on
// needs no delay line. The arbiter counts cycles from start and the spliter
// raises each register's enable in the cycle its operands are valid.
//
// Timing: start (one cycle, window[] valid in that cycle) -> result_flag high
// MUL_LAT + 4*(ADD_LAT+1) + 1 cycles later (33 with the defaults). window[] is
// sampled in the start cycle only. One convolution runs at a time; busy is
// high while it does and a start then is ignored. result_final and
// result_flag follow the handshake of gs_result_register.
//
// The nine multipliers, eight adders, four adder registers, result register
// and the arbiter/spliter state machine follow the design, as do the kernel
// values. The pairing of words in the adder tree and the cycle count derived
// from the latencies are this implementation's.
module gs_convolver
  import gs_pkg::*;
#(
  parameter int unsigned MUL_LAT = 4,
  parameter int unsigned ADD_LAT = 6,
  parameter fp32_t       KERNEL [TAPS] = GAUSS_KERNEL
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t window [TAPS],
  input  logic  result_retrieve,
  output fp32_t result_final,
  output logic  result_flag,
  output logic  busy
);

  gs_state_e   state;
  gs_enables_t en;

  gs_arbiter #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_arbiter (
    .clk, .rst_n, .start, .state, .busy
  );

  gs_spliter u_spliter (.state, .en);

  // ---- multipliers -------------------------------------------------------
  fp32_t prod [TAPS];
  for (genvar k = 0; k < int'(TAPS); k++) begin : g_mul
    fp32_mul #(.LATENCY(MUL_LAT)) u_mul (
      .clk, .a(window[k]), .b(KERNEL[k]), .y(prod[k])
    );
  end

  // ---- level 1 -------------------------------------------------------------
  fp32_t r1 [9];
  fp32_t s1 [4];
  fp32_t d2 [5];
  fp32_t r2 [5];
  gs_stage_register #(.N(9)) u_add1_reg (
    .clk, .rst_n, .enable(en.en_add1), .d(prod), .q(r1)
  );
  for (genvar i = 0; i < 4; i++) begin : g_add_l1
    fp32_add #(.LATENCY(ADD_LAT)) u_add (
      .clk, .a(r1[2*i]), .b(r1[2*i+1]), .y(s1[i])
    );
  end
  always_comb begin
    for (int i = 0; i < 4; i++) d2[i] = s1[i];
    d2[4] = r1[8];
  end

  // ---- level 2 -------------------------------------------------------------
  fp32_t s2 [2];
  fp32_t d3 [3];
  fp32_t r3 [3];
  gs_stage_register #(.N(5)) u_add2_reg (
    .clk, .rst_n, .enable(en.en_add2), .d(d2), .q(r2)
  );
  for (genvar i = 0; i < 2; i++) begin : g_add_l2
    fp32_add #(.LATENCY(ADD_LAT)) u_add (
      .clk, .a(r2[2*i]), .b(r2[2*i+1]), .y(s2[i])
    );
  end
  assign d3 = '{s2[0], s2[1], r2[4]};

  // ---- level 3 -------------------------------------------------------------
  fp32_t s3;
  fp32_t d4 [2];
  fp32_t r4 [2];
  gs_stage_register #(.N(3)) u_add3_reg (
    .clk, .rst_n, .enable(en.en_add3), .d(d3), .q(r3)
  );
  fp32_add #(.LATENCY(ADD_LAT)) u_add_l3 (
    .clk, .a(r3[0]), .b(r3[1]), .y(s3)
  );
  assign d4 = '{s3, r3[2]};

  // ---- level 4 -------------------------------------------------------------
  fp32_t s4;
  gs_stage_register #(.N(2)) u_add4_reg (
    .clk, .rst_n, .enable(en.en_add4), .d(d4), .q(r4)
  );
  fp32_add #(.LATENCY(ADD_LAT)) u_add_l4 (
    .clk, .a(r4[0]), .b(r4[1]), .y(s4)
  );

  // ---- result --------------------------------------------------------------
  gs_result_register u_result_reg (
    .clk, .rst_n, .enable(en.en_result), .pre_result_final(s4),
    .result_retrieve, .result_final, .result_flag
  );

endmodule
