// tb_gs_arbiter: checks the state sequence and its cycle positions.
//
// Starts the arbiter, records the state number in every cycle and compares
// the cycle at which each state begins and ends with the latencies, checks
// busy, and checks that a start while busy is ignored.
module tb_gs_arbiter;
  import gs_pkg::*;

  localparam int unsigned ML = 4, AL = 6;
  localparam int unsigned STEP = AL + 1;

  logic      clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  gs_state_e state;
  logic      busy;
  int checks = 0, failures = 0;

  gs_arbiter #(.MUL_LAT(ML), .ADD_LAT(AL)) dut (.clk, .rst_n, .start, .state, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic gs_state_e expected(int c);
    if (c == int'(ML + 4 * STEP)) return ST_RESULT;
    if (c >= int'(ML + 3 * STEP) && c < int'(ML + 4 * STEP)) return ST_ADD4;
    if (c >= int'(ML + 2 * STEP) && c < int'(ML + 3 * STEP)) return ST_ADD3;
    if (c >= int'(ML + 1 * STEP) && c < int'(ML + 2 * STEP)) return ST_ADD2;
    if (c >= int'(ML) && c < int'(ML + STEP)) return ST_ADD1;
    return ST_IDLE;
  endfunction


  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check("idle after reset", state == ST_IDLE && !busy);
    for (int run = 0; run < 3; run++) begin
      start = 1'b1;                       // cycle 0
      check("idle in start cycle", state == ST_IDLE);
      @(negedge clk);
      start = 1'b0;
      for (int c = 1; c <= int'(ML + 4 * STEP) + 3; c++) begin
        check($sformatf("run %0d cycle %0d state %0d exp %0d", run, c, state, expected(c)),
              state == expected(c));
        check($sformatf("busy cycle %0d", c), busy == (c <= int'(ML + 4 * STEP)));
        if (run == 1 && c == 10) start = 1'b1;   // ignored while busy
        if (run == 1 && c == 11) start = 1'b0;
        @(negedge clk);
      end
      repeat (run) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
