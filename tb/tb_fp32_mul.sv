// tb_fp32_mul: checks fp32_mul against the double-precision reference.
//
// Applies a new operand pair every cycle (random normals of mixed sign and
// magnitude, overflow, underflow, zeros, infinities and NaN) and checks
// each product exactly LATENCY cycles later, so a wrong latency fails as well.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 4;
  localparam int          N   = 4000;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul #(.LATENCY(LAT)) dut (.clk, .a, .b, .y);

  always #5 clk = ~clk;

  logic [31:0] exp_q [$];
  logic [31:0] va [N], vb [N], ve [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed cases, expected values computed by hand
    va[0] = 32'h3f80_0000; vb[0] = 32'h3f80_0000; ve[0] = 32'h3f80_0000; // 1*1
    va[1] = 32'h4000_0000; vb[1] = 32'h4040_0000; ve[1] = 32'h40c0_0000; // 2*3
    va[2] = 32'h7f80_0000; vb[2] = 32'h0000_0000; ve[2] = 32'h7fc0_0000; // inf*0
    va[3] = 32'hff80_0000; vb[3] = 32'h4000_0000; ve[3] = 32'hff80_0000; // -inf*2
    va[4] = 32'h7fc0_1234; vb[4] = 32'h3f80_0000; ve[4] = 32'h7fc0_0000; // NaN
    va[5] = 32'h0000_0000; vb[5] = 32'hc0a0_0000; ve[5] = 32'h8000_0000; // 0*-5
    va[6] = 32'h3fc0_0000; vb[6] = 32'h3fc0_0000; ve[6] = 32'h4010_0000; // 1.5*1.5
    va[7] = 32'hc000_0000; vb[7] = 32'h4040_0000; ve[7] = 32'hc0c0_0000; // -2*3
    va[8] = 32'h7f7f_ffff; vb[8] = 32'h7f7f_ffff; ve[8] = 32'h7f80_0000; // overflow
    va[9] = 32'h0080_0000; vb[9] = 32'h0080_0000; ve[9] = 32'h0000_0000; // underflow
    for (int i = 10; i < N; i++) begin
      case (i % 4)
        0: begin va[i] = rand_sp(100, 154); vb[i] = rand_sp(100, 154); end
        1: begin va[i] = rand_sp(120, 134); vb[i] = rand_sp(120, 134); end
        2: begin va[i] = rand_sp(60, 190); vb[i] = rand_sp(64, 190); end
        default: begin va[i] = rand_sp(126, 128); vb[i] = rand_sp(126, 128); end
      endcase
      ve[i] = ref_mul(va[i], vb[i]);
    end
    a = '0; b = '0;
    for (int i = 0; i < N + int'(LAT); i++) begin
      @(negedge clk);
      if (i >= int'(LAT)) begin
        checks++;
        if (y !== ve[i-LAT]) begin
          failures++;
          if (failures < 10)
            $display("FAIL %h * %h: got %h expected %h", va[i-LAT], vb[i-LAT], y, ve[i-LAT]);
        end
      end
      if (i < N) begin a = va[i]; b = vb[i]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
