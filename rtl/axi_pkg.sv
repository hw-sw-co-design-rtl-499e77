// axi_pkg: AMBA AXI4, AXI4-Lite and AXI4-Stream bundles used throughout the
// RSoC Bridge. Every bus is a pair of packed structs: a request travelling
// from master to slave (addresses, write data, VALIDs and the master's READYs)
// and a response travelling back. The data path is 32 bits wide (the GP
// ports are 32-bit and the HP ports can be configured 32-bit); bursts use
// the AXI3 length limit of 16 beats the Zynq PS ports impose. The stream
// bundle carries TDATA, TKEEP, TLAST, TUSER and TVALID, the subset the
// framework's streams use; TREADY travels as a separate signal.
package axi_pkg;
  import plat_pkg::*;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned ID_W   = 4;
  localparam int unsigned USER_W = 32;   // TUSER carries the frame size
  localparam int unsigned MAX_BURST = 16; // AXI3 AxLEN is 4 bits

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam logic [1:0] BURST_INCR  = 2'b01;

  // AXI4-Lite
  typedef struct packed {
    addr_t              aw_addr;
    logic               aw_valid;
    logic [DATA_W-1:0]  w_data;
    logic [STRB_W-1:0]  w_strb;
    logic               w_valid;
    logic               b_ready;
    addr_t              ar_addr;
    logic               ar_valid;
    logic               r_ready;
  } axil_req_t;

  typedef struct packed {
    logic               aw_ready;
    logic               w_ready;
    logic [1:0]         b_resp;
    logic               b_valid;
    logic               ar_ready;
    logic [DATA_W-1:0]  r_data;
    logic [1:0]         r_resp;
    logic               r_valid;
  } axil_resp_t;

  // AXI4 (full), burst capable
  typedef struct packed {
    logic [ID_W-1:0]    aw_id;
    addr_t              aw_addr;
    logic [7:0]         aw_len;
    logic [2:0]         aw_size;
    logic [1:0]         aw_burst;
    logic [3:0]         aw_cache;
    logic [2:0]         aw_prot;
    logic               aw_user;
    logic               aw_valid;
    logic [DATA_W-1:0]  w_data;
    logic [STRB_W-1:0]  w_strb;
    logic               w_last;
    logic               w_valid;
    logic               b_ready;
    logic [ID_W-1:0]    ar_id;
    addr_t              ar_addr;
    logic [7:0]         ar_len;
    logic [2:0]         ar_size;
    logic [1:0]         ar_burst;
    logic [3:0]         ar_cache;
    logic [2:0]         ar_prot;
    logic               ar_user;
    logic               ar_valid;
    logic               r_ready;
  } axi_req_t;

  typedef struct packed {
    logic               aw_ready;
    logic               w_ready;
    logic [ID_W-1:0]    b_id;
    logic [1:0]         b_resp;
    logic               b_valid;
    logic               ar_ready;
    logic [ID_W-1:0]    r_id;
    logic [DATA_W-1:0]  r_data;
    logic [1:0]         r_resp;
    logic               r_last;
    logic               r_valid;
  } axi_resp_t;

  // AXI4-Stream (TREADY is carried separately)
  typedef struct packed {
    logic [DATA_W-1:0]  tdata;
    logic [STRB_W-1:0]  tkeep;
    logic               tlast;
    logic [USER_W-1:0]  tuser;
    logic               tvalid;
  } axis_t;

  // The worse of two AXI responses (DECERR > SLVERR > EXOKAY/OKAY).
  function automatic logic [1:0] worse_resp(logic [1:0] a, logic [1:0] b);
    return (a > b) ? a : b;
  endfunction
endpackage
