// fp32_mul: pipelined IEEE-754 single-precision multiplier.
//
// y = a * b, rounded to nearest, ties to even. The product is formed in one
// combinational step (24x24-bit significand product, normalise by at most one
// place, round) and then passes through LATENCY registers, so a result appears
// on y exactly LATENCY clock edges after its operands were on a and b. New
// operands may be applied every cycle. Synthesis may retime the registers
// into the combinational logic.
//
// Special values: subnormal inputs are read as zero and results that would be
// subnormal are flushed to a signed zero; an overflow gives a signed infinity;
// NaN operands and 0 * inf give the quiet NaN 32'h7fc00000.
//
// The design calls for a multiplier that takes 5 clock cycles counting the
// cycle in which the operands are applied, i.e. four register stages, which is
// the LATENCY default. The handling of special values and the one-step core
// followed by a register chain are choices of this implementation.
module fp32_mul
  import gs_pkg::*;
#(
  parameter int unsigned LATENCY = 4
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  function automatic fp32_t fmul(fp32_t x, fp32_t z);
    logic        s;
    logic [7:0]  ex, ez;
    logic [23:0] mx, mz;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st, up;
    logic [24:0] mr;
    logic signed [10:0] e;
    s  = x[31] ^ z[31];
    ex = x[30:23];
    ez = z[30:23];
    mx = {1'b1, x[22:0]};
    mz = {1'b1, z[22:0]};
    if ((ex == 8'hff && x[22:0] != 0) || (ez == 8'hff && z[22:0] != 0))
      return FP32_QNAN;
    if (ex == 8'hff || ez == 8'hff) begin
      if (ex == 8'h00 || ez == 8'h00) return FP32_QNAN;  // inf * 0
      return {s, 8'hff, 23'd0};
    end
    if (ex == 8'h00 || ez == 8'h00) return {s, 31'd0};
    p = mx * mz;
    e = 11'(ex) + 11'(ez) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    up = g & (st | m[0]);
    mr = {1'b0, m} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (e >= 11'sd255) return {s, 8'hff, 23'd0};
    if (e <= 11'sd0)   return {s, 31'd0};
    return {s, e[7:0], mr[22:0]};
  endfunction

  fp32_t pipe [LATENCY+1];

  assign pipe[0] = fmul(a, b);

  for (genvar i = 0; i < int'(LATENCY); i++) begin : g_stage
    always_ff @(posedge clk) pipe[i+1] <= pipe[i];
  end

  assign y = pipe[LATENCY];

endmodule
