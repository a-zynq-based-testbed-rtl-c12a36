// testbed_pkg: constants shared by the programmable-logic side of the hash-core
// testbed. It holds the AXI4-Lite response codes and the register map of the
// Output FIFO's configuration port. The two registers (transfer length and start
// delay) are the ones the testbed defines; their offsets, widths and reset values
// are this design's choice.
package testbed_pkg;

  // AXI4 response encoding (AMBA AXI specification)
  typedef enum logic [1:0] {
    AXI_RESP_OKAY   = 2'b00,
    AXI_RESP_EXOKAY = 2'b01,
    AXI_RESP_SLVERR = 2'b10,
    AXI_RESP_DECERR = 2'b11
  } axi_resp_e;

  // Output FIFO configuration registers, byte offsets on the AXI4-Lite port
  localparam int unsigned AXIL_ADDR_W       = 4;
  localparam int unsigned AXIL_DATA_W       = 32;
  localparam logic [AXIL_ADDR_W-1:0] REG_TRANSFER_LENGTH = 4'h0;  // words per packet
  localparam logic [AXIL_ADDR_W-1:0] REG_START_DELAY     = 4'h4;  // cycles before sending

  // Reset values: one 256-bit digest on a 64-bit bus, no delay
  localparam logic [AXIL_DATA_W-1:0] RST_TRANSFER_LENGTH = 32'd4;
  localparam logic [AXIL_DATA_W-1:0] RST_START_DELAY     = 32'd0;

endpackage
