// tb_gs_image: smooths one whole 1330 x 1110 single-precision image.
//
// The host model streams the image row by row through the bus port, one
// pixel per exchange (status, source_out, data_flag, poll result_flag,
// retrieve, data_in), exactly as one smoothing pass over a product image.
// Every output, one per pixel from the ninth on, is compared bit for bit with
// a reference convolution of the last nine pixels sent. The image is a
// checkerboard of 40-pixel squares (levels 30 and 200) with small noise and
// signed values in every fourth row, so corners and edges of both signs pass
// through the kernel. At the end it prints the cycles the convolver was busy
// (start cycle plus busy) and the total cycles including the bus exchanges;
// the convolver time per output must be 33 cycles. The design runs at its default
// parameters.
module tb_gs_image;
  import gs_pkg::*;
  import fp_ref_pkg::*;

  localparam int W = 1330;
  localparam int H = 1110;
  localparam longint NPIX = longint'(W) * longint'(H);
  localparam int CONV_CYCLES = 33;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        avs_readdatavalid;
  int checks = 0, failures = 0;

  gs_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  longint cyc = 0, busy_cycles = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.busy || dut.window_valid) busy_cycles++;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic fp32_t pixel(int x, int y);
    real v;
    v = (((x / 40) + (y / 40)) % 2 == 1) ? 200.0 : 30.0;
    v = v + real'($urandom % 8);
    if (y % 4 == 3) v = v - 120.0;
    return real2sp(v);
  endfunction

  initial begin
    fp32_t hist [TAPS];
    fp32_t px, e;
    logic [31:0] r;
    logic flag = 1'b0;
    longint n = 0, results = 0;
    int polls;
    for (int k = 0; k < int'(TAPS); k++) hist[k] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        px = pixel(x, y);
        rd(8'h60, r);
        while (!r[0]) rd(8'h60, r);
        wr(8'h40, px);
        flag = ~flag;
        wr(8'h30, {31'd0, flag});
        for (int k = 0; k < int'(TAPS) - 1; k++) hist[k] = hist[k+1];
        hist[TAPS-1] = px;
        n++;
        if (n < longint'(TAPS)) continue;
        polls = 0;
        rd(8'h20, r);
        while (!r[0] && polls < 100) begin
          polls++;
          rd(8'h20, r);
        end
        wr(8'h10, 32'd1);
        rd(8'h50, r);
        wr(8'h10, 32'd0);
        e = ref_conv(hist);
        results++;
        checks++;
        if (r != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL pixel (%0d,%0d): got %h expected %h", x, y, r, e);
        end
      end
      if (y % 111 == 0) $display("row %0d done, %0d results", y, results);
    end
    checks++;
    if (results != NPIX - longint'(TAPS) + 1) begin
      failures++;
      $display("FAIL %0d results, expected %0d", results, NPIX - longint'(TAPS) + 1);
    end
    checks++;
    if (busy_cycles != results * CONV_CYCLES) begin
      failures++;
      $display("FAIL convolver busy %0d cycles, expected %0d", busy_cycles, results * CONV_CYCLES);
    end
    $display("outputs=%0d convolver cycles=%0d (%0.1f ms at 50 MHz) total cycles with bus=%0d",
             results, busy_cycles, real'(busy_cycles) * 20.0e-6, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
