// Shared types and constants of the multi-protocol RFID reader.
//
// The processor reaches every IP core through an AXI4-Lite slave port; the
// request and response halves of that port are the packed structs below, so
// that the top level can expose each slave port as two plain struct ports.
// The block memories are reached by the processor through a simple
// synchronous port (bram_req_t plus a 32-bit read-data word, one cycle of
// read latency). Register offsets follow the register tables of each core;
// the field positions of the decoder registers are given as constants too.
package rfid_pkg;

  localparam int AXI_AW = 4;   // each core decodes 4 registers (byte offsets 0x0..0xC)
  localparam int AXI_DW = 32;

  typedef struct packed {
    logic              awvalid;
    logic [AXI_AW-1:0] awaddr;
    logic              wvalid;
    logic [AXI_DW-1:0] wdata;
    logic [3:0]        wstrb;
    logic              bready;
    logic              arvalid;
    logic [AXI_AW-1:0] araddr;
    logic              rready;
  } axil_req_t;

  typedef struct packed {
    logic              awready;
    logic              wready;
    logic              bvalid;
    logic [1:0]        bresp;
    logic              arready;
    logic              rvalid;
    logic [AXI_DW-1:0] rdata;
    logic [1:0]        rresp;
  } axil_rsp_t;

  // Processor side of a block memory (word addressed)
  localparam int BRAM_AW = 10;
  typedef struct packed {
    logic               en;
    logic               we;
    logic [BRAM_AW-1:0] addr;
    logic [31:0]        wdata;
  } bram_req_t;

  // ADRxTx register 0x04 bit positions
  localparam int ADR_EN_RX_BRAM = 0;
  localparam int ADR_EN_TX_BRAM = 1;
  localparam int ADR_RST_RX_MGT = 2;
  localparam int ADR_RST_TX_MGT = 3;
  localparam int ADR_CDR_HOLD   = 4;
  localparam int ADR_EN_DDS     = 5;
  localparam int ADR_RX_SEL_MGT = 7;

  // Word index of each register (byte offset / 4)
  localparam logic [1:0] REG_0 = 2'd0;
  localparam logic [1:0] REG_4 = 2'd1;
  localparam logic [1:0] REG_8 = 2'd2;
  localparam logic [1:0] REG_C = 2'd3;

endpackage
