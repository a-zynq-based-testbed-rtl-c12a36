// s_axis_to_fwft_fifo: the testbed's Input FIFO.
//
// The AXI DMA (MM2S channel) pushes the message into this FIFO through an AXI4-
// Stream slave port clocked by the system clock; the hash core under test pops it
// through a first-word-fall-through FIFO port clocked by the variable UUT clock.
// The two clocks are independent, so the hash core can be run at any frequency
// while the DMA side stays at its fixed rate.
//
// Interface (port names as in the testbed's Input FIFO symbol):
//   s_axis_aclk, s_axis_aresetn   system clock and active-low reset; the reset is
//                                 also synchronised into fifo_aclk for the read side
//   s_axis_tdata/tvalid/tready    AXI4-Stream slave; a beat is taken when tvalid and
//                                 tready are both high; tready is low while full or
//                                 in reset. The stream has no TLAST: the hash core
//                                 finds message boundaries from the data itself.
//   fifo_aclk                     UUT clock
//   fifo_dout/fifo_empty/fifo_read  FWFT read port: fifo_dout is valid whenever
//                                 fifo_empty is low, fifo_read pops it.
//
// The port list and the two clock domains follow the testbed; the depth and the
// Gray-pointer crossing inside async_fwft_fifo are this design's choice.
module s_axis_to_fwft_fifo #(
  parameter int unsigned DATA_WIDTH = 64,
  parameter int unsigned DEPTH      = 512
) (
  // AXI4-Stream slave, system clock domain
  input  logic                  s_axis_aclk,
  input  logic                  s_axis_aresetn,
  input  logic [DATA_WIDTH-1:0] s_axis_tdata,
  input  logic                  s_axis_tvalid,
  output logic                  s_axis_tready,
  // FWFT read port, UUT clock domain
  input  logic                  fifo_aclk,
  output logic [DATA_WIDTH-1:0] fifo_dout,
  input  logic                  fifo_read,
  output logic                  fifo_empty
);
  logic wr_rst_n, rd_rst_n, full;

  reset_sync u_wr_rst (.clk(s_axis_aclk), .rst_ni(s_axis_aresetn), .rst_no(wr_rst_n));
  reset_sync u_rd_rst (.clk(fifo_aclk),   .rst_ni(s_axis_aresetn), .rst_no(rd_rst_n));

  async_fwft_fifo #(.WIDTH(DATA_WIDTH), .DEPTH(DEPTH)) u_fifo (
    .wclk   (s_axis_aclk),
    .wrst_ni(wr_rst_n),
    .wr_en  (s_axis_tvalid && s_axis_tready),
    .wdata  (s_axis_tdata),
    .full   (full),
    .rclk   (fifo_aclk),
    .rrst_ni(rd_rst_n),
    .rd_en  (fifo_read),
    .rdata  (fifo_dout),
    .empty  (fifo_empty)
  );

  assign s_axis_tready = wr_rst_n && !full;
endmodule
