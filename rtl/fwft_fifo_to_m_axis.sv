// fwft_fifo_to_m_axis: the testbed's Output FIFO.
//
// The hash core under test writes its digest words through a FIFO write port
// clocked by the UUT clock; this block returns them to the processor as AXI4-
// Stream packets on the system clock, for the AXI DMA's S2MM channel. Two values
// set over AXI4-Lite (see axil_cfg_regs) control the stream:
//   transfer length  words per packet; TLAST is raised on the last one
//   start delay      clock cycles (m_axis_aclk) to wait before a packet starts
//
// Sequencer (m_axis_aclk domain):
//   IDLE   waits until the FIFO holds a word ("output ready to send"); it then
//          latches both registers and goes to SEND if the delay is 0, else to WAIT
//   WAIT   counts the delay down; with delay D the first TVALID comes D cycles
//          later than it would with delay 0
//   SEND   presents the FIFO head on m_axis_tdata, TVALID while the FIFO is not
//          empty, and counts accepted beats; the beat numbered length-1 carries
//          TLAST and returns the sequencer to IDLE, so every packet waits again.
// A transfer length of 0 is treated as 1. TVALID drops only when the UUT has not
// yet written the next word, never while a beat is waiting for TREADY.
//
// Clocks and reset: fifo_aclk is the UUT clock; m_axis_aclk is the system clock,
// which also clocks the AXI4-Lite port. m_axis_aresetn is the only reset; it is
// synchronised into fifo_aclk for the write side. fifo_full is high while the
// FIFO cannot take a word; writes while full are dropped.
//
// The ports, the two registers and the meaning of the delay follow the testbed;
// the register layout, the depth, the length-0 rule and "ready" meaning
// "at least one word present" are this design's choices.
module fwft_fifo_to_m_axis
  import testbed_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 64,
  parameter int unsigned DEPTH      = 512
) (
  // FIFO write port, UUT clock domain
  input  logic                   fifo_aclk,
  input  logic [DATA_WIDTH-1:0]  fifo_din,
  input  logic                   fifo_write,
  output logic                   fifo_full,
  // AXI4-Stream master, system clock domain
  input  logic                   m_axis_aclk,
  input  logic                   m_axis_aresetn,
  output logic [DATA_WIDTH-1:0]  m_axis_tdata,
  output logic                   m_axis_tlast,
  output logic                   m_axis_tvalid,
  input  logic                   m_axis_tready,
  // AXI4-Lite configuration port (S_AXI Lite), system clock domain
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
  input  logic                   s_axi_rready
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SEND} state_e;

  logic                   wr_rst_n, rd_rst_n;
  logic                   empty, full, pop;
  logic [DATA_WIDTH-1:0]  head;
  logic [AXIL_DATA_W-1:0] transfer_length, start_delay;

  state_e                 state_q;
  logic [AXIL_DATA_W-1:0] delay_q, beat_q, last_beat_q;

  reset_sync u_wr_rst (.clk(fifo_aclk),   .rst_ni(m_axis_aresetn), .rst_no(wr_rst_n));
  reset_sync u_rd_rst (.clk(m_axis_aclk), .rst_ni(m_axis_aresetn), .rst_no(rd_rst_n));

  async_fwft_fifo #(.WIDTH(DATA_WIDTH), .DEPTH(DEPTH)) u_fifo (
    .wclk   (fifo_aclk),
    .wrst_ni(wr_rst_n),
    .wr_en  (fifo_write),
    .wdata  (fifo_din),
    .full   (full),
    .rclk   (m_axis_aclk),
    .rrst_ni(rd_rst_n),
    .rd_en  (pop),
    .rdata  (head),
    .empty  (empty)
  );

  assign fifo_full = full || !wr_rst_n;

  axil_cfg_regs u_regs (
    .aclk           (m_axis_aclk),
    .aresetn        (rd_rst_n),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata,  .s_axi_wstrb,   .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp,  .s_axi_bvalid,  .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata,  .s_axi_rresp,   .s_axi_rvalid, .s_axi_rready,
    .transfer_length,
    .start_delay
  );

  assign m_axis_tvalid = (state_q == S_SEND) && !empty;
  assign m_axis_tdata  = head;
  assign m_axis_tlast  = m_axis_tvalid && (beat_q == last_beat_q);
  assign pop           = m_axis_tvalid && m_axis_tready;

  always_ff @(posedge m_axis_aclk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      state_q     <= S_IDLE;
      delay_q     <= '0;
      beat_q      <= '0;
      last_beat_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (!empty) begin
          last_beat_q <= (transfer_length == '0) ? '0 : transfer_length - 1'b1;
          beat_q      <= '0;
          if (start_delay == '0) begin
            state_q <= S_SEND;
          end else begin
            delay_q <= start_delay - 1'b1;
            state_q <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (delay_q == '0) state_q <= S_SEND;
          else               delay_q <= delay_q - 1'b1;
        end
        S_SEND: if (pop) begin
          if (m_axis_tlast) begin
            state_q <= S_IDLE;
            beat_q  <= '0;
          end else begin
            beat_q  <= beat_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AXI4-Stream rule: an offered beat stays, unchanged, until it is accepted
  a_axis_hold: assert property (@(posedge m_axis_aclk) disable iff (!rd_rst_n)
                                m_axis_tvalid && !m_axis_tready |=>
                                m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));
endmodule
