// cache_pkg: types and constants shared by the accelerator cache modules.
//
// The caches sit between an HLS-generated accelerator and external memory.
// Towards memory each cache is an AXI4 master; the AXI channel bundles are
// modelled as packed structs (one request struct driven by the master, one
// response struct driven by the slave) so that a whole port can be passed
// around and arrayed at the top level. Address and data widths are fixed to
// 32 bits: the evaluated kernels use 4-byte memory words. The single AXI ID
// bit is always 0, so write responses return in issue order.
package cache_pkg;

  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 32;
  localparam int unsigned AXI_STRB_W = AXI_DATA_W / 8;
  localparam int unsigned AXI_ID_W   = 1;

  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [2:0] AXI_SIZE_WORD  = 3'b010;  // 4 bytes per beat
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

  // Write policy of a cache, chosen per cache instance.
  typedef enum logic {
    WRITE_THROUGH = 1'b0,
    WRITE_BACK    = 1'b1
  } write_policy_e;

  typedef logic [AXI_ADDR_W-1:0] addr_t;
  typedef logic [AXI_DATA_W-1:0] word_t;
  typedef logic [AXI_STRB_W-1:0] strb_t;

  // AW and AR address channel payload.
  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    addr_t               addr;
    logic [7:0]          len;    // beats - 1
    logic [2:0]          size;
    logic [1:0]          burst;
  } axi_ax_t;

  typedef struct packed {
    word_t data;
    strb_t strb;
    logic  last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [1:0]          resp;
  } axi_b_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    word_t               data;
    logic [1:0]          resp;
    logic                last;
  } axi_r_t;

  // Everything the master drives.
  typedef struct packed {
    logic    aw_valid;
    axi_ax_t aw;
    logic    w_valid;
    axi_w_t  w;
    logic    b_ready;
    logic    ar_valid;
    axi_ax_t ar;
    logic    r_ready;
  } axi_req_t;

  // Everything the slave drives.
  typedef struct packed {
    logic   aw_ready;
    logic   w_ready;
    logic   b_valid;
    axi_b_t b;
    logic   ar_ready;
    logic   r_valid;
    axi_r_t r;
  } axi_rsp_t;

  // Accelerator-side memory request (one word, byte address).
  typedef struct packed {
    logic  we;
    addr_t addr;
    word_t wdata;
    strb_t wstrb;
  } fe_req_t;

endpackage
