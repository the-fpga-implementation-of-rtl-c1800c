// tb_gs_result_register: checks the result store and the result_flag handshake.
//
// A rising enable stores the result and raises result_flag one edge later;
// the flag stays up through a held enable and a raised result_retrieve and
// drops one edge after result_retrieve falls; result_final keeps its value.
module tb_gs_result_register;
  import gs_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, enable = 1'b0, result_retrieve = 1'b0;
  fp32_t pre_result_final = '0, result_final, expected = '0;
  logic  result_flag;
  int checks = 0, failures = 0;

  gs_result_register dut (.clk, .rst_n, .enable, .pre_result_final, .result_retrieve,
                          .result_final, .result_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("flag low after reset", !result_flag && result_final == '0);
    for (int round = 0; round < 20; round++) begin
      pre_result_final = $urandom;
      expected = pre_result_final;
      enable = 1'b1;
      check("flag still low in enable cycle", !result_flag);
      @(negedge clk);
      check("flag high after enable edge", result_flag);
      check("result stored", result_final == expected);
      pre_result_final = $urandom;   // not an edge: must not load
      @(negedge clk);
      enable = 1'b0;
      check("held enable does not reload", result_final == expected);
      repeat (2) @(negedge clk);
      result_retrieve = 1'b1;
      repeat (1 + round % 3) begin
        @(negedge clk);
        check("flag high while retrieving", result_flag);
      end
      result_retrieve = 1'b0;
      check("flag high in falling cycle", result_flag);
      @(negedge clk);
      check("flag low after retrieve falls", !result_flag);
      check("result kept", result_final == expected);
      // a second retrieve without a new result leaves the flag low
      result_retrieve = 1'b1;
      @(negedge clk);
      result_retrieve = 1'b0;
      @(negedge clk);
      check("no result, flag stays low", !result_flag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
