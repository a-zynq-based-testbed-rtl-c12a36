// axil_cfg_regs: AXI4-Lite slave holding the Output FIFO's two configuration
// registers, transfer length and start delay.
//
// Register map (byte offsets, 32-bit registers, byte strobes honoured):
//   0x0  TRANSFER_LENGTH  number of words the Output FIFO sends per AXI4-Stream
//                         packet; TLAST marks the last one
//   0x4  START_DELAY      clock cycles the Output FIFO waits, once output is ready,
//                         before it starts sending
// Any other offset reads as zero and answers SLVERR; writes to it are dropped.
//
// Handshake: a write is taken in the cycle in which AWVALID and WVALID are both
// high and no write response is pending (AWREADY and WREADY rise together in that
// cycle); BVALID follows one cycle later and stays until BREADY. A read address is
// taken whenever no read data is pending; RVALID follows one cycle later and stays
// until RREADY. The register map, reset values and handshake style are this
// design's choice: the testbed names the two registers but not their layout.
module axil_cfg_regs
  import testbed_pkg::*;
(
  input  logic                   aclk,
  input  logic                   aresetn,
  // write address / data / response
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
  // read address / data
  input  logic [AXIL_ADDR_W-1:0] s_axi_araddr,
  input  logic                   s_axi_arvalid,
  output logic                   s_axi_arready,
  output logic [AXIL_DATA_W-1:0] s_axi_rdata,
  output logic [1:0]             s_axi_rresp,
  output logic                   s_axi_rvalid,
  input  logic                   s_axi_rready,
  // register values
  output logic [AXIL_DATA_W-1:0] transfer_length,
  output logic [AXIL_DATA_W-1:0] start_delay
);
  logic wr_fire, rd_fire;

  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_wready  = s_axi_awready;
  assign wr_fire       = s_axi_awready;
  assign s_axi_arready = !s_axi_rvalid;
  assign rd_fire       = s_axi_arvalid && s_axi_arready;

  function automatic logic [AXIL_DATA_W-1:0] merge(input logic [AXIL_DATA_W-1:0] old_v,
                                                   input logic [AXIL_DATA_W-1:0] new_v,
                                                   input logic [3:0]             strb);
    logic [AXIL_DATA_W-1:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  function automatic logic addr_hit(input logic [AXIL_ADDR_W-1:0] a);
    return (a == REG_TRANSFER_LENGTH) || (a == REG_START_DELAY);
  endfunction

  // write channel
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      transfer_length <= RST_TRANSFER_LENGTH;
      start_delay     <= RST_START_DELAY;
      s_axi_bvalid    <= 1'b0;
      s_axi_bresp     <= AXI_RESP_OKAY;
    end else begin
      if (wr_fire) begin
        unique case (s_axi_awaddr)
          REG_TRANSFER_LENGTH: transfer_length <= merge(transfer_length, s_axi_wdata, s_axi_wstrb);
          REG_START_DELAY:     start_delay     <= merge(start_delay, s_axi_wdata, s_axi_wstrb);
          default: ;
        endcase
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= addr_hit(s_axi_awaddr) ? AXI_RESP_OKAY : AXI_RESP_SLVERR;
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // read channel
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= AXI_RESP_OKAY;
    end else begin
      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= addr_hit(s_axi_araddr) ? AXI_RESP_OKAY : AXI_RESP_SLVERR;
        unique case (s_axi_araddr)
          REG_TRANSFER_LENGTH: s_axi_rdata <= transfer_length;
          REG_START_DELAY:     s_axi_rdata <= start_delay;
          default:             s_axi_rdata <= '0;
        endcase
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a response, once valid, stays valid until accepted
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
