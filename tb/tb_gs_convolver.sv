// tb_gs_convolver: checks the 3x3 float convolution and its cycle count.
//
// Applies random windows (pixel-like values, signed derivative products and
// wide-range floats), waits for result_flag, and compares result_final with
// a reference that multiplies and adds in the same tree order with
// round-to-nearest-even, so the result must match bit for bit. The number of
// cycles from start to result_flag must be MUL_LAT + 4*(ADD_LAT+1) + 1, busy
// must cover the run, a start while busy must be ignored, and result_flag must
// drop after the retrieve handshake.
module tb_gs_convolver;
  import gs_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned ML = 4, AL = 6;
  localparam int unsigned LAT = ML + 4 * (AL + 1) + 1;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, result_retrieve = 1'b0;
  fp32_t window [TAPS];
  fp32_t result_final;
  logic  result_flag, busy;
  int checks = 0, failures = 0;

  gs_convolver #(.MUL_LAT(ML), .ADD_LAT(AL)) dut (
    .clk, .rst_n, .start, .window, .result_retrieve, .result_final, .result_flag, .busy
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic fp32_t ref_conv(fp32_t w [TAPS]);
    fp32_t p [TAPS];
    fp32_t a0, a1, a2, a3, b0, b1, c0;
    for (int k = 0; k < int'(TAPS); k++) p[k] = ref_mul(w[k], GAUSS_KERNEL[k]);
    a0 = ref_add(p[0], p[1]); a1 = ref_add(p[2], p[3]);
    a2 = ref_add(p[4], p[5]); a3 = ref_add(p[6], p[7]);
    b0 = ref_add(a0, a1);     b1 = ref_add(a2, a3);
    c0 = ref_add(b0, b1);
    return ref_add(c0, p[8]);
  endfunction

  task automatic one(int kind, bit poke_start);
    fp32_t w [TAPS], e;
    int    cyc;
    for (int k = 0; k < int'(TAPS); k++) begin
      case (kind)
        0: w[k] = real2sp(real'($urandom % 256));
        1: w[k] = real2sp(real'(int'($urandom % 20001) - 10000) / 7.0);
        default: w[k] = rand_sp(90, 160);
      endcase
    end
    e = ref_conv(w);
    window = w;
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    for (int k = 0; k < int'(TAPS); k++) window[k] = $urandom;  // sampled only at start
    cyc = 1;
    while (!result_flag && cyc < 200) begin
      check("busy while running", busy);
      if (poke_start && cyc == 7) start = 1'b1;
      if (poke_start && cyc == 8) start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    check($sformatf("latency %0d expected %0d", cyc, LAT), cyc == int'(LAT));
    check($sformatf("result %h expected %h", result_final, e), result_final == e);
    check("idle when done", !busy);
    repeat ($urandom % 4) @(negedge clk);
    result_retrieve = 1'b1;
    @(negedge clk);
    result_retrieve = 1'b0;
    @(negedge clk);
    check("flag dropped", !result_flag);
    check("ignored start left no run", !busy);
  endtask

  initial begin
    for (int k = 0; k < int'(TAPS); k++) window[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // all-ones window: result is the kernel sum
    for (int k = 0; k < int'(TAPS); k++) window[k] = 32'h3f80_0000;
    begin
      fp32_t w1 [TAPS];
      w1 = window;
      start = 1'b1; @(negedge clk); start = 1'b0;
      repeat (LAT - 1) @(negedge clk);
      check("ones: flag", result_flag);
      check("ones: sum of kernel", result_final == ref_conv(w1));
      result_retrieve = 1'b1; @(negedge clk); result_retrieve = 1'b0; @(negedge clk);
    end
    for (int i = 0; i < 150; i++) one(i % 3, i % 10 == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
