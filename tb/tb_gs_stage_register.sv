// tb_gs_stage_register: checks loading on the rising edge of enable only.
//
// Changes d every cycle and holds enable high for several cycles: q must take
// the words present in the cycle enable rose, keep them while enable stays
// high and after it falls, and take new words only at the next rising edge.
module tb_gs_stage_register;
  import gs_pkg::*;

  localparam int unsigned N = 5;

  logic  clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  fp32_t d [N], q [N], held [N];
  int checks = 0, failures = 0;

  gs_stage_register #(.N(N)) dut (.clk, .rst_n, .enable, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (q[i] != held[i]) begin
        failures++;
        $display("FAIL %s: q[%0d]=%h expected %h", what, i, q[i], held[i]);
      end
    end
  endtask

  task automatic new_d();
    for (int i = 0; i < int'(N); i++) d[i] = $urandom;
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) held[i] = '0;
    new_d();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare("after reset");
    for (int round = 0; round < 20; round++) begin
      repeat (2) begin new_d(); @(negedge clk); compare("idle"); end
      new_d();
      enable = 1'b1;
      held = d;                       // loaded at this edge
      @(negedge clk);
      compare("after rising edge");
      for (int c = 0; c < 1 + round % 4; c++) begin
        new_d();
        @(negedge clk);
        compare("enable held high");
      end
      enable = 1'b0;
      new_d();
      @(negedge clk);
      compare("after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
