// fp32_add: pipelined IEEE-754 single-precision adder.
//
// y = a + b, rounded to nearest, ties to even. The operand of larger magnitude
// sets the exponent; the other significand is shifted right into three extra
// bits (guard, round and a sticky bit that ORs everything shifted further),
// the two are added or subtracted, the sum is normalised by a right shift of
// one or a left shift by its leading-zero count, and rounded. This is one
// combinational step followed by LATENCY registers, so a sum appears on y
// exactly LATENCY clock edges after its operands were on a and b. New operands
// may be applied every cycle.
//
// Special values: subnormal inputs are read as zero and subnormal results are
// flushed to zero; overflow gives a signed infinity; NaN operands and
// inf + (-inf) give the quiet NaN 32'h7fc00000; an exact zero sum of operands
// of opposite sign is +0.
//
// The design calls for an adder whose result is ready 6 cycles after the
// operands are applied in cycle 0 (7 clock cycles counted inclusively), which
// is the LATENCY default of 6 register stages. The special-value handling and
// the one-step core followed by a register chain are choices of this
// implementation.
module fp32_add
  import gs_pkg::*;
#(
  parameter int unsigned LATENCY = 6
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  function automatic fp32_t fadd(fp32_t x, fp32_t z);
    fp32_t       big, sml;
    logic [7:0]  eb, es;
    logic [7:0]  d;
    logic [26:0] mb, ms, shifted;
    logic        sticky;
    logic [27:0] sum;
    logic [26:0] m;
    logic signed [10:0] e;
    int unsigned lz;
    logic        up;
    logic [24:0] mr;
    logic        sub;
    // NaN and infinity
    if ((x[30:23] == 8'hff && x[22:0] != 0) || (z[30:23] == 8'hff && z[22:0] != 0))
      return FP32_QNAN;
    if (x[30:23] == 8'hff && z[30:23] == 8'hff)
      return (x[31] == z[31]) ? x : FP32_QNAN;
    if (x[30:23] == 8'hff) return x;
    if (z[30:23] == 8'hff) return z;
    // zero / subnormal operands count as zero
    if (x[30:23] == 8'h00 && z[30:23] == 8'h00)
      return {x[31] & z[31], 31'd0};
    if (x[30:23] == 8'h00) return z;
    if (z[30:23] == 8'h00) return x;
    // order by magnitude
    if (x[30:0] >= z[30:0]) begin
      big = x; sml = z;
    end else begin
      big = z; sml = x;
    end
    eb  = big[30:23];
    es  = sml[30:23];
    mb  = {1'b1, big[22:0], 3'b000};
    ms  = {1'b1, sml[22:0], 3'b000};
    d   = eb - es;
    sub = big[31] ^ sml[31];
    if (d >= 8'd27) begin
      shifted = 27'd1;  // only the sticky bit survives
    end else begin
      shifted = ms >> d;
      sticky  = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < int'(d) && ms[i]) sticky = 1'b1;
      shifted[0] = shifted[0] | sticky;
    end
    if (sub) sum = {1'b0, mb} - {1'b0, shifted};
    else     sum = {1'b0, mb} + {1'b0, shifted};
    if (sum == 28'd0) return 32'd0;
    e = 11'(eb);
    if (sum[27]) begin
      m = {sum[27:2], sum[1] | sum[0]};
      e = e + 11'sd1;
    end else begin
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      m = sum[26:0] << lz;
      e = e - 11'(lz);
    end
    up = m[2] & (m[1] | m[0] | m[3]);
    mr = {1'b0, m[26:3]} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (e >= 11'sd255) return {big[31], 8'hff, 23'd0};
    if (e <= 11'sd0)   return {big[31], 31'd0};
    return {big[31], e[7:0], mr[22:0]};
  endfunction

  fp32_t pipe [LATENCY+1];

  assign pipe[0] = fadd(a, b);

  for (genvar i = 0; i < int'(LATENCY); i++) begin : g_stage
    always_ff @(posedge clk) pipe[i+1] <= pipe[i];
  end

  assign y = pipe[LATENCY];

endmodule
