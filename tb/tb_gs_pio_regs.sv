// tb_gs_pio_regs: checks the register map, write effects and read latency.
module tb_gs_pio_regs;
  import gs_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        avs_readdatavalid;
  logic        sw_reset, result_retrieve, data_flag;
  fp32_t       source;
  logic        result_flag = 1'b0, ready = 1'b0, fifo_done = 1'b0, busy = 1'b0;
  fp32_t       result = '0;
  int checks = 0, failures = 0;

  gs_pio_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(logic [7:0] addr, logic [31:0] data);
    avs_address = addr; avs_writedata = data; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic rd(logic [7:0] addr, output logic [31:0] data);
    avs_address = addr; avs_read = 1'b1;
    check("no data before read", !avs_readdatavalid);
    @(negedge clk);
    avs_read = 1'b0;
    check("readdatavalid after one cycle", avs_readdatavalid);
    data = avs_readdata;
    @(negedge clk);
    check("readdatavalid one cycle", !avs_readdatavalid);
  endtask

  initial begin
    logic [31:0] v, r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset values", !sw_reset && !result_retrieve && !data_flag && source == '0);
    for (int i = 0; i < 30; i++) begin
      v = $urandom;
      wr(8'h40, v);
      check("source_out drives source", source == v);
      rd(8'h44, r);                               // low address bits ignored
      check("source_out reads back", r == v);
      wr(8'h30, {31'd0, v[0]});
      check("data_flag", data_flag == v[0]);
      rd(8'h30, r);
      check("data_flag reads back", r == {31'd0, v[0]});
      wr(8'h10, {31'd0, v[1]});
      check("result_retrieve", result_retrieve == v[1]);
      wr(8'h00, {31'd0, v[2]});
      check("reset", sw_reset == v[2]);
      rd(8'h00, r);
      check("reset reads back", r == {31'd0, v[2]});
      result = $urandom;
      result_flag = v[3];
      {busy, fifo_done, ready} = v[6:4];
      rd(8'h50, r);
      check("data_in", r == result);
      rd(8'h20, r);
      check("result_flag", r == {31'd0, v[3]});
      rd(8'h60, r);
      check("status", r == {29'd0, v[6:4]});
      wr(8'h50, 32'hffff_ffff);                   // read-only: ignored
      wr(8'h70, 32'hffff_ffff);                   // unused: ignored
      check("read-only writes ignored", source == v && data_flag == v[0]);
      rd(8'h70, r);
      check("unused reads zero", r == '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
