// gs_pio_regs: host-visible parallel I/O registers of the co-processor.
//
// An Avalon-MM slave that the host reaches through the PCIe bridge's BAR
// master. Each register occupies a 16-byte slot; avs_address is the byte
// offset and bits [7:4] select the slot, the low bits are ignored. Writes take
// effect at the clock edge; a read returns its word on avs_readdata with
// avs_readdatavalid one cycle after avs_read (fixed read latency 1, no wait
// states).
//
//   0x00 reset            W/R  bit 0: soft reset of the input FIFO (sw)
//   0x10 result_retrieve  W/R  bit 0: host is reading the result
//   0x20 result_flag      R    bit 0: a new result may be read
//   0x30 data_flag        W/R  bit 0: flip to hand over the pixel in source_out
//   0x40 source_out       W/R  32-bit float pixel to the FIFO
//   0x50 data_in          R    32-bit float result from the result register
//   0x60 status           R    bit 0 ready, bit 1 FIFO full (done), bit 2 busy
//
// Writes to read-only slots and to unused slots are ignored; reads of unused
// slots return zero. The write registers reset to zero.
//
// The offsets of reset, result_retrieve, data_flag, source_out and data_in
// follow the design's PCIe system. result_flag takes the free slot 0x20, and
// the status word that answers the host's "ready?" request takes 0x60: both
// placements are this implementation's, as are the read latency and the
// status bit layout.
module gs_pio_regs
  import gs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [7:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  output logic        avs_readdatavalid,
  // to the core
  output logic        sw_reset,
  output logic        result_retrieve,
  output logic        data_flag,
  output fp32_t       source,
  // from the core
  input  logic        result_flag,
  input  fp32_t       result,
  input  logic        ready,
  input  logic        fifo_done,
  input  logic        busy
);

  localparam logic [3:0] SLOT_RESET    = 4'h0;
  localparam logic [3:0] SLOT_RETRIEVE = 4'h1;
  localparam logic [3:0] SLOT_RFLAG    = 4'h2;
  localparam logic [3:0] SLOT_DFLAG    = 4'h3;
  localparam logic [3:0] SLOT_SOURCE   = 4'h4;
  localparam logic [3:0] SLOT_DATA_IN  = 4'h5;
  localparam logic [3:0] SLOT_STATUS   = 4'h6;

  logic [3:0] slot;
  assign slot = avs_address[7:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_reset        <= 1'b0;
      result_retrieve <= 1'b0;
      data_flag       <= 1'b0;
      source          <= '0;
    end else if (avs_write) begin
      unique case (slot)
        SLOT_RESET:    sw_reset        <= avs_writedata[0];
        SLOT_RETRIEVE: result_retrieve <= avs_writedata[0];
        SLOT_DFLAG:    data_flag       <= avs_writedata[0];
        SLOT_SOURCE:   source          <= avs_writedata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        unique case (slot)
          SLOT_RESET:    avs_readdata <= {31'd0, sw_reset};
          SLOT_RETRIEVE: avs_readdata <= {31'd0, result_retrieve};
          SLOT_RFLAG:    avs_readdata <= {31'd0, result_flag};
          SLOT_DFLAG:    avs_readdata <= {31'd0, data_flag};
          SLOT_SOURCE:   avs_readdata <= source;
          SLOT_DATA_IN:  avs_readdata <= result;
          SLOT_STATUS:   avs_readdata <= {29'd0, busy, fifo_done, ready};
          default:       avs_readdata <= '0;
        endcase
      end
    end
  end

  // The bus never reads and writes in the same cycle.
  a_no_rw_overlap: assert property (@(posedge clk)
                                    !(avs_read && avs_write));

endmodule
