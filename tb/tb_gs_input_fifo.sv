// tb_gs_input_fifo: checks the nine-output pixel FIFO.
//
// Pushes words by flipping data_flag (including runs of equal words), and
// after every push compares all nine outputs, done and window_valid with a
// queue model. Also checks that words shift in one cycle after the toggle,
// that nothing moves while data_flag is steady, and that sw empties the FIFO.
module tb_gs_input_fifo;
  import gs_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, sw = 1'b0, data_flag = 1'b0;
  fp32_t source_in = '0;
  fp32_t fifo [TAPS];
  logic  done, window_valid;
  int checks = 0, failures = 0;
  fp32_t model [$];
  int    wv_seen = 0;

  gs_input_fifo dut (.clk, .rst_n, .sw, .data_flag, .source_in, .fifo, .done, .window_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare_all(logic expect_wv);
    for (int k = 0; k < int'(TAPS); k++) begin
      // model: model[$] newest = No.8; missing entries are zero
      fp32_t e;
      int idx;
      idx = model.size() - int'(TAPS) + k;
      e = (idx >= 0) ? model[idx] : '0;
      check($sformatf("fifo[%0d]=%h exp %h", k, fifo[k], e), fifo[k] == e);
    end
    check("done", done == (model.size() >= int'(TAPS)));
    check($sformatf("window_valid=%0b exp %0b", window_valid, expect_wv), window_valid == expect_wv);
  endtask

  task automatic push(fp32_t v);
    source_in = v;
    data_flag = ~data_flag;
    @(negedge clk);                 // toggle seen, word shifted at this edge
    model.push_back(v);
    compare_all(model.size() >= int'(TAPS));
    if (window_valid) wv_seen++;
    @(negedge clk);                 // strobe lasts one cycle
    check("window_valid one cycle", !window_valid);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare_all(1'b0);
    for (int i = 1; i <= 12; i++) push(fp32_t'(i));
    // equal words in a row are still separate words
    push(32'h1234_5678);
    push(32'h1234_5678);
    push(32'h1234_5678);
    // a steady flag moves nothing
    repeat (5) @(negedge clk);
    compare_all(1'b0);
    // random words
    for (int i = 0; i < 40; i++) push($urandom);
    // host reset empties it
    sw = 1'b1;
    @(negedge clk);
    sw = 1'b0;
    model.delete();
    @(negedge clk);
    compare_all(1'b0);
    for (int i = 0; i < 8; i++) push($urandom);
    check("not full after 8", !done);
    push(32'hcafe_f00d);
    check("full after 9", done);
    check("window strobes", wv_seen == (12 - 8) + 3 + 40 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
