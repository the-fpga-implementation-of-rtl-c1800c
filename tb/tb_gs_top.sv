// tb_gs_top: end-to-end test of the co-processor through its bus port.
//
// A host model performs the exchange loop on the Avalon-MM port, pixel by
// pixel: poll status until ready, write the pixel and flip data_flag, poll
// result_flag, raise result_retrieve, read data_in, lower result_retrieve.
// Every result is compared bit for bit with a reference convolution of the
// last nine pixels sent (same multiply and add order, round to nearest even).
// The stream contains runs of equal pixels and is interrupted by FIFO resets.
// A monitor measures the cycles from the data_flag write to result_flag.
//
// Mechanisms that must each occur at least once (a failure is counted for
// any that does not): FIFO filling to nine words, a run of equal pixels taken
// as separate words, a FIFO reset from the host, the host finding the block
// not ready, the host polling result_flag before the result is there, and the
// host finding result_flag low when it asks again for an already taken
// result. The design runs at its default parameters.
module tb_gs_top;
  import gs_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPIX = 400;
  localparam int LAT_FROM_WRITE = 34;   // data_flag write edge -> result_flag

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        avs_readdatavalid;
  int checks = 0, failures = 0;

  int n_fill = 0, n_equal = 0, n_reset = 0, n_not_ready = 0, n_flag_wait = 0, n_stale = 0;
  int n_results = 0;

  gs_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- bus master -----------------------------------------------------------
  // A write's effects reach the status bits within two cycles; the host
  // leaves that gap after each write, as any bridge round trip does.
  task automatic wr(logic [7:0] addr, logic [31:0] data);
    avs_address = addr; avs_writedata = data; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic rd(logic [7:0] addr, output logic [31:0] data);
    avs_address = addr; avs_read = 1'b1;
    @(negedge clk);
    avs_read = 1'b0;
    while (!avs_readdatavalid) @(negedge clk);
    data = avs_readdata;
  endtask

  // ---- latency monitor ------------------------------------------------------
  int  cyc = 0, t_write = -1;
  logic flag_q = 1'b0, rflag_q = 1'b0;
  always @(posedge clk) begin
    cyc++;
    flag_q  <= dut.data_flag;
    rflag_q <= dut.result_flag;
    if (dut.data_flag != flag_q) t_write = cyc;
    if (dut.result_flag && !rflag_q) begin
      checks++;
      if (cyc - t_write != LAT_FROM_WRITE) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cyc - t_write, LAT_FROM_WRITE);
      end
    end
  end

  // ---- reference ------------------------------------------------------------
  // last nine pixels sent, newest in [TAPS-1], and how many were sent
  fp32_t hist [TAPS];
  int    nsent = 0;

  function automatic fp32_t ref_conv(fp32_t w [TAPS]);
    fp32_t p [TAPS];
    fp32_t a0, a1, a2, a3, b0, b1, c0;
    for (int k = 0; k < int'(TAPS); k++)
      p[k] = ref_mul(w[k], GAUSS_KERNEL[k]);
    a0 = ref_add(p[0], p[1]); a1 = ref_add(p[2], p[3]);
    a2 = ref_add(p[4], p[5]); a3 = ref_add(p[6], p[7]);
    b0 = ref_add(a0, a1);     b1 = ref_add(a2, a3);
    c0 = ref_add(b0, b1);
    return ref_add(c0, p[8]);
  endfunction

  // ---- host exchange loop ---------------------------------------------------
  logic host_flag = 1'b0;

  task automatic send_pixel(fp32_t px, bit eager);
    logic [31:0] r;
    int polls;
    bit was_full;
    fp32_t w [TAPS], e;
    // request / ready
    rd(8'h60, r);
    while (!r[0]) begin
      n_not_ready++;
      rd(8'h60, r);
    end
    was_full = r[1];
    wr(8'h40, px);
    host_flag = ~host_flag;
    wr(8'h30, {31'd0, host_flag});
    if (nsent > 0 && hist[TAPS-1] == px) n_equal++;
    for (int k = 0; k < int'(TAPS) - 1; k++) hist[k] = hist[k+1];
    hist[TAPS-1] = px;
    nsent++;
    if (eager) begin
      // ask again at once: a convolution is about to run or running
      rd(8'h60, r);
      if (nsent >= int'(TAPS)) begin
        check("not ready while computing", !r[0]);
        if (!r[0]) n_not_ready++;
      end
    end
    if (nsent < int'(TAPS)) begin
      rd(8'h60, r);
      check("not full yet", !r[1]);
      return;
    end
    if (!was_full) n_fill++;
    // wait for the result
    polls = 0;
    rd(8'h20, r);
    while (!r[0]) begin
      polls++;
      check("result within bound", polls < 100);
      if (polls >= 100) return;
      rd(8'h20, r);
    end
    if (polls > 0) n_flag_wait++;
    wr(8'h10, 32'd1);
    rd(8'h50, r);
    wr(8'h10, 32'd0);
    w = hist;
    e = ref_conv(w);
    checks++;
    n_results++;
    if (r != e) begin
      failures++;
      $display("FAIL result %0d: got %h expected %h", n_results, r, e);
    end
    // the same result cannot be taken twice
    rd(8'h20, r);
    check("result_flag low after retrieve", !r[0]);
    if (!r[0]) n_stale++;
  endtask

  task automatic fifo_reset();
    wr(8'h00, 32'd1);
    wr(8'h00, 32'd0);
    nsent = 0;
    n_reset++;
  endtask

  initial begin
    fp32_t px;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < NPIX; i++) begin
      if (i == 150 || i == 290) fifo_reset();
      if (i % 37 >= 30) px = real2sp(100.0);                 // flat run
      else if (i % 2 == 0) px = real2sp(real'($urandom % 256));
      else px = real2sp(real'(int'($urandom % 4001) - 2000) / 3.0);
      send_pixel(px, (i % 5) == 2);
    end
    check("results counted", n_results == NPIX - 3 * (int'(TAPS) - 1));
    check("mechanism: FIFO filled", n_fill > 0);
    check("mechanism: equal pixels", n_equal > 0);
    check("mechanism: FIFO reset", n_reset > 0);
    check("mechanism: not ready", n_not_ready > 0);
    check("mechanism: result_flag polled low", n_flag_wait > 0);
    check("mechanism: stale retrieve blocked", n_stale > 0);
    $display("fills=%0d equal=%0d resets=%0d not_ready=%0d flag_waits=%0d stale_blocked=%0d results=%0d",
             n_fill, n_equal, n_reset, n_not_ready, n_flag_wait, n_stale, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
