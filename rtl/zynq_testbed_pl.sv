// zynq_testbed_pl: programmable-logic side of a testbed that measures how fast a
// hash core really runs on the chip.
//
// The hash core under test sits between two dual-clock FIFOs, so that it can be
// clocked by a variable UUT clock while everything that talks to the processor
// (the DMA engine, the timer, the configuration bus) stays on a fixed system
// clock. Software raises or lowers the UUT clock between runs and compares the
// digest with its own, searching for the highest frequency that still hashes
// correctly.
//
//   DMA MM2S --AXI4-Stream--> Input FIFO --FWFT read--> [hash core]
//   [hash core] --FIFO write--> Output FIFO --AXI4-Stream--> DMA S2MM
//   DMA mm2s/s2mm interrupts --> Concat --> processor interrupt
//
// This module holds the Input FIFO (s_axis_to_fwft_fifo), the Output FIFO
// (fwft_fifo_to_m_axis, with its AXI4-Lite transfer-length / start-delay
// registers) and the interrupt Concat (irq_concat). The parts that are not logic
// of this design are outside it and meet it at ports: the hash core (hc_* ports,
// any core with a FWFT-FIFO interface fits), the AXI DMA (the two streams and
// its two interrupt outputs), the AXI interconnect (the s_axi_* configuration
// port) and the clock generator (uut_clk).
//
// Clocks: sys_clk clocks the two AXI4-Stream ports and the AXI4-Lite port;
// uut_clk clocks all hc_* ports. sys_aresetn is the one active-low reset; each
// FIFO synchronises it into the UUT domain. The clock split and the block
// partition follow the testbed; widths, depths and the register map are this
// design's choices (64-bit data bus, 512-word FIFOs).
module zynq_testbed_pl
  import testbed_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 64,
  parameter int unsigned IN_DEPTH   = 512,
  parameter int unsigned OUT_DEPTH  = 512
) (
  input  logic                   sys_clk,
  input  logic                   sys_aresetn,
  input  logic                   uut_clk,
  // from the DMA MM2S channel: message words
  input  logic [DATA_WIDTH-1:0]  s_axis_mm2s_tdata,
  input  logic                   s_axis_mm2s_tvalid,
  output logic                   s_axis_mm2s_tready,
  // to the DMA S2MM channel: digest words
  output logic [DATA_WIDTH-1:0]  m_axis_s2mm_tdata,
  output logic                   m_axis_s2mm_tlast,
  output logic                   m_axis_s2mm_tvalid,
  input  logic                   m_axis_s2mm_tready,
  // hash core input side (core's FIFO_In), UUT clock
  output logic [DATA_WIDTH-1:0]  hc_din,
  output logic                   hc_src_empty,
  input  logic                   hc_src_read,
  // hash core output side (core's FIFO_Out), UUT clock
  input  logic [DATA_WIDTH-1:0]  hc_dout,
  input  logic                   hc_dst_write,
  output logic                   hc_dst_full,
  // Output FIFO configuration, AXI4-Lite, system clock
  input  logic [AXIL_ADDR_W-1:0] s_axi_awaddr,
  input  logic                   s_axi_awvalid,
  output logic                   s_axi_awready,
  input  logic [AXIL_DATA_W-1:0] s_axi_wdata,
  input  logic [3:0]             s_axi_wstrb,
  input  logic                   s_axi_wvalid,
  output logic                   s_axi_wready,
  output logic [1:0]             s_axi_bresp,
  output logic                   s_axi_bvalid,
  input  logic                   s_axi_bready,
  input  logic [AXIL_ADDR_W-1:0] s_axi_araddr,
  input  logic                   s_axi_arvalid,
  output logic                   s_axi_arready,
  output logic [AXIL_DATA_W-1:0] s_axi_rdata,
  output logic [1:0]             s_axi_rresp,
  output logic                   s_axi_rvalid,
  input  logic                   s_axi_rready,
  // DMA completion interrupts in, processor interrupt out
  input  logic                   mm2s_introut,
  input  logic                   s2mm_introut,
  output logic                   irq_f2p
);

  s_axis_to_fwft_fifo #(.DATA_WIDTH(DATA_WIDTH), .DEPTH(IN_DEPTH)) u_input_fifo (
    .s_axis_aclk   (sys_clk),
    .s_axis_aresetn(sys_aresetn),
    .s_axis_tdata  (s_axis_mm2s_tdata),
    .s_axis_tvalid (s_axis_mm2s_tvalid),
    .s_axis_tready (s_axis_mm2s_tready),
    .fifo_aclk     (uut_clk),
    .fifo_dout     (hc_din),
    .fifo_read     (hc_src_read),
    .fifo_empty    (hc_src_empty)
  );

  fwft_fifo_to_m_axis #(.DATA_WIDTH(DATA_WIDTH), .DEPTH(OUT_DEPTH)) u_output_fifo (
    .fifo_aclk     (uut_clk),
    .fifo_din      (hc_dout),
    .fifo_write    (hc_dst_write),
    .fifo_full     (hc_dst_full),
    .m_axis_aclk   (sys_clk),
    .m_axis_aresetn(sys_aresetn),
    .m_axis_tdata  (m_axis_s2mm_tdata),
    .m_axis_tlast  (m_axis_s2mm_tlast),
    .m_axis_tvalid (m_axis_s2mm_tvalid),
    .m_axis_tready (m_axis_s2mm_tready),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata,  .s_axi_wstrb,   .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp,  .s_axi_bvalid,  .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata,  .s_axi_rresp,   .s_axi_rvalid, .s_axi_rready
  );

  irq_concat u_concat (
    .in0 (s2mm_introut),
    .in1 (mm2s_introut),
    .dout(irq_f2p)
  );

endmodule
