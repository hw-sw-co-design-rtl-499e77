// rsoc_pkg: definitions specific to the RSoC Framework: the framework
// version reported by RSoC Info, the 32-byte information vector every
// accelerator presents, the controller types the bridge can generate, and
// the register map that all controllers share (the first 32 bytes mirror
// the accelerator's information vector; controller registers start at 0x20).
// The region INFO encoding and the register order inside each controller are
// this design's choice.
package rsoc_pkg;
  localparam logic [31:0] RSOC_VERSION = 32'h0000_0001;   // version 0.1
  localparam int unsigned INFO_BYTES   = 32;
  localparam int unsigned INFO_WORDS   = INFO_BYTES / 4;
  typedef logic [INFO_BYTES*8-1:0] info_vec_t;

  typedef enum logic [7:0] {
    CTRL_NONE = 8'd0,
    CTRL_FIFO = 8'd1,
    CTRL_SDMA = 8'd2
  } ctrl_type_e;

  // INFO(i) of an RSoC Info region descriptor:
  // [7:0] kind, [15:8] slot index, [23:16] controller type for controllers.
  localparam logic [7:0] REGION_ACCEL = 8'h01;
  localparam logic [7:0] REGION_CTRL  = 8'h02;

  // Word indices of the controller registers (byte offset = 4 * index).
  localparam int unsigned CTRL_REG_BASE = INFO_WORDS;   // 0x20

  // FIFO Interface
  localparam int unsigned FIFO_STATUS = CTRL_REG_BASE + 0;   // 0x20
  localparam int unsigned FIFO_DATA   = CTRL_REG_BASE + 1;   // 0x24
  localparam int unsigned FIFO_KEEP   = CTRL_REG_BASE + 2;   // 0x28
  localparam int unsigned FIFO_USER   = CTRL_REG_BASE + 3;   // 0x2C
  localparam int unsigned FIFO_NREGS  = CTRL_REG_BASE + 4;
  localparam int unsigned FIFO_KEEP_LAST_BIT = 8;

  // Simple DMA Interface
  localparam int unsigned SDMA_STATUS      = CTRL_REG_BASE + 0;   // 0x20
  localparam int unsigned SDMA_REQ_SADDR   = CTRL_REG_BASE + 1;   // 0x24
  localparam int unsigned SDMA_REQ_SSIZE   = CTRL_REG_BASE + 2;   // 0x28
  localparam int unsigned SDMA_REQ_SID     = CTRL_REG_BASE + 3;   // 0x2C
  localparam int unsigned SDMA_RES_SSTATUS = CTRL_REG_BASE + 4;   // 0x30
  localparam int unsigned SDMA_RES_SID     = CTRL_REG_BASE + 5;   // 0x34
  localparam int unsigned SDMA_REQ_DADDR   = CTRL_REG_BASE + 6;   // 0x38
  localparam int unsigned SDMA_REQ_DSIZE   = CTRL_REG_BASE + 7;   // 0x3C
  localparam int unsigned SDMA_REQ_DID     = CTRL_REG_BASE + 8;   // 0x40
  localparam int unsigned SDMA_RES_DSTATUS = CTRL_REG_BASE + 9;   // 0x44
  localparam int unsigned SDMA_RES_DSIZE   = CTRL_REG_BASE + 10;  // 0x48
  localparam int unsigned SDMA_RES_DID     = CTRL_REG_BASE + 11;  // 0x4C
  localparam int unsigned SDMA_NREGS       = CTRL_REG_BASE + 12;
  localparam int unsigned SDMA_TRUNC_BIT   = 16;

  // Transfer requests and responses between SDMA Control and SDMA Engine
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] size;
    logic [31:0] id;
  } dma_req_t;

  typedef struct packed {
    logic [31:0] status;
    logic [31:0] size;
    logic [31:0] id;
  } dma_res_t;

  // Loopback accelerator registers
  localparam int unsigned LOOP_FRAMES = 0;
  localparam int unsigned LOOP_BEATS  = 1;
endpackage
