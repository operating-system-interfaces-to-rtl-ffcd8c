// saif_pkg: types and constants shared by the switchable-interconnect accelerator
// framework.
//
// A reconfigurable frame talks to its neighbours over one stream channel in and one
// out. The forward half of a channel (stream_t) carries a 16-bit data word, its 9-bit
// buffer address, a valid (new_data) qualifier, a start flag marking the first word of
// a block and a done flag marking the last word. The backward half is a single
// ready-for-data (RFD) bit. A word moves in a cycle where valid and RFD are both high;
// while RFD is low the source holds every forward signal. 28 forward bits plus RFD is
// 29 signals per side, 58 per frame, the count the framework is built around.
//
// Frames reach system memory through the accelerator MMU over a side path: a read or
// write request with a 32-bit virtual address (side_req_t), answered by a one-cycle
// acknowledge that may carry an error (side_rsp_t).
//
// The DCR register offsets and the bit layout of each register are this design's own
// choice; the register set (start, status, routing, per-frame control, two-write TLB
// fill) follows the framework description.
package saif_pkg;

  localparam int unsigned DATA_W  = 16;  // stream data width
  localparam int unsigned SADDR_W = 9;   // stream address width (512 words)
  localparam int unsigned VADDR_W = 32;  // side-path virtual / physical address width
  localparam int unsigned AID_W   = 3;   // accelerator identification number
  localparam int unsigned BLOCK_WORDS = 64;  // one 8x8 macroblock

  typedef struct packed {
    logic                      start;  // first word of a block
    logic                      valid;  // new_data: data/addr are meaningful
    logic                      done;   // last word of a block
    logic [DATA_W-1:0]         data;
    logic [SADDR_W-1:0]        addr;
  } stream_t;

  localparam stream_t STREAM_IDLE = '0;

  typedef struct packed {
    logic                      rd_req;  // ReadRequest
    logic                      wr_req;  // WriteRequest
    logic [VADDR_W-1:0]        vaddr;
    logic [DATA_W-1:0]         wdata;
  } side_req_t;

  typedef struct packed {
    logic                      ack;     // one-cycle acknowledge
    logic                      err;     // with ack: translation or permission fault
    logic [DATA_W-1:0]         rdata;   // with ack of a read
  } side_rsp_t;

  localparam side_req_t SIDE_REQ_IDLE = '0;

  // DCR register offsets from the framework's DCR base.
  localparam logic [3:0] DCR_CTRL   = 4'h0;  // W: [0] start, [1] column-major, [6:4] blocks-1
  localparam logic [3:0] DCR_STATUS = 4'h1;  // R: [0] busy, [1] sticky side-path fault
  localparam logic [3:0] DCR_ROUTE  = 4'h2;  // R/W: 4-bit source select per sink
  localparam logic [3:0] DCR_TLB_A  = 4'h3;  // W: [31:12] VPN, [6:4] AID, [1] writable, [0] valid
  localparam logic [3:0] DCR_TLB_B  = 4'h4;  // W: [31:12] PPN; commits the fill
  localparam logic [3:0] DCR_FRAME0 = 4'h8;  // R/W: frame i at 8+i: [15:0] control, [18:16] AID, [31] isolate

  // One TLB entry as the fill registers deliver it.
  typedef struct packed {
    logic                 valid;
    logic                 writable;
    logic [AID_W-1:0]     aid;
    logic [19:0]          vpn;
    logic [19:0]          ppn;
  } tlb_fill_t;

endpackage
