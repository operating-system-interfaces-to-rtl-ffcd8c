// accel_framework: the switchable-interconnect accelerator framework.
//
// The framework is the fixed shell around NUM_FRAMES reconfigurable frames, the slots
// into which accelerator blocks are loaded. It gives every frame the same small
// interface (one stream channel in, one out, a 16-bit control word, a side path to
// memory) and supplies everything an accelerator would otherwise have to build against
// the system bus:
//   - an input and an output buffer (dual_port_buffer), reachable from the 64-bit bus
//     through buffer_bus_port, so a DMA engine or the host can fill and drain them;
//   - a feeder (stream_feeder) that streams the input buffer into the head accelerator
//     in row- or column-major 8x8 order;
//   - a collector (stream_collector) that writes the tail accelerator's words back into
//     the output buffer and detects the end of the transaction;
//   - the interconnect switch, which chains feeder, frames and collector in any order
//     chosen by a DCR;
//   - the accelerator MMU (ammu) for protected, translated access to system memory;
//   - the DCR register block (dcr_regs) through which the host configures and polls.
//
// A transaction: the host writes the input buffer over the bus, sets the route, writes
// CTRL.start, polls STATUS.busy until it clears, then reads the output buffer. Feeder
// and collector are started together by the start pulse; the number of 8x8 blocks
// comes from CTRL.
//
// Isolation: FRAMEi[31] cuts frame i off while it is being reloaded. Its stream and
// side-path outputs are replaced by idle values and its inputs are held idle, so a
// half-configured frame cannot inject words or requests; a chain through it simply
// stalls until the bit is cleared. Set it only while the frame has no side-path
// request outstanding.
//
// Timing: single clock (the accelerator clock, also the bus clock). The switch adds no
// register stage between frames.
//
// Source: the set of parts (buffers reachable from the bus, push feeder, DCR-switched
// interconnect, aMMU, DCR control, per-frame 16-bit control word) follows the thesis's
// framework chapter. Own choices: buffer size of 512 words each (the reach of the
// 9-bit stream address; the size is not stated), a separate collector block writing
// the output buffer, completion detected from the done flags, the frame count of three
// (the text says two regions, the framework figure draws three frames), a single
// clock for bus, DCR and accelerators, and the form of the isolation (the thesis only
// states that the framework isolates frames for runtime reconfiguration).
//
// Circuit note: Verilator reports UNOPTFLAT on frame_in_rfd / frame_out_rfd. It treats
// each unpacked array as one variable, so the RFD of one frame appears to depend on the
// RFD of another element of the same array. There is no real combinational loop: a
// loop would need a route that feeds a frame's output back to its own input, which
// dcr_regs asserts against (each source drives at most one sink, no ring of frames).
module accel_framework
  import saif_pkg::*;
#(
  parameter int unsigned NUM_FRAMES  = 3,
  parameter int unsigned BUF_WORDS   = 512,    // 16-bit words per buffer
  parameter int unsigned TLB_ENTRIES = 4,
  parameter logic [9:0]  DCR_BASE    = 10'h080
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // DCR slave
  input  logic                 dcr_read,
  input  logic                 dcr_write,
  input  logic [9:0]           dcr_abus,
  input  logic [31:0]          dcr_wdata,
  output logic [31:0]          dcr_rdata,
  output logic                 dcr_ack,
  // 64-bit bus slave onto the buffers
  input  logic                 bus_en,
  input  logic                 bus_we,
  input  logic [7:0]           bus_be,
  input  logic [$clog2(4*BUF_WORDS)-1:0] bus_addr,
  input  logic [63:0]          bus_wdata,
  output logic [63:0]          bus_rdata,
  output logic                 bus_rvalid,
  // aMMU memory master
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [VADDR_W-1:0]   mem_addr,
  output logic [DATA_W-1:0]    mem_wdata,
  input  logic                 mem_ack,
  input  logic [DATA_W-1:0]    mem_rdata,
  // status
  output logic                 busy,
  // reconfigurable frames
  output stream_t              frame_in      [NUM_FRAMES],
  input  logic                 frame_in_rfd  [NUM_FRAMES],
  input  stream_t              frame_out     [NUM_FRAMES],
  output logic                 frame_out_rfd [NUM_FRAMES],
  output logic [15:0]          frame_ctrl    [NUM_FRAMES],
  input  side_req_t            frame_side_req[NUM_FRAMES],
  output side_rsp_t            frame_side_rsp[NUM_FRAMES]
);

  localparam int unsigned NP  = NUM_FRAMES + 1;
  localparam int unsigned AW  = $clog2(BUF_WORDS);
  localparam int unsigned LW  = $clog2(BUF_WORDS / 4);

  // control
  logic        start, col_major, complete, fault, tlb_fill_we;
  logic [2:0]  nblocks_m1;
  logic [31:0] route;
  logic [AID_W-1:0] frame_aid [NUM_FRAMES];
  logic        frame_iso [NUM_FRAMES];
  side_req_t   amm_req [NUM_FRAMES];
  side_rsp_t   amm_rsp [NUM_FRAMES];
  tlb_fill_t   tlb_fill;
  logic        feed_busy, coll_busy;
  logic [AW-1:0] words_seen;

  // buffer ports
  logic          ia_en, ia_we, oa_en, oa_we;
  logic [7:0]    ia_be, oa_be;
  logic [LW-1:0] ia_addr, oa_addr;
  logic [63:0]   ia_wdata, ia_rdata, oa_wdata, oa_rdata;
  logic          ib_en, ob_en, ob_we;
  logic [AW-1:0] ib_addr, ob_addr;
  logic [15:0]   ib_rdata, ob_wdata, ob_rdata;

  // switch endpoints
  stream_t src_fwd  [NP];
  logic    src_rfd  [NP];
  stream_t sink_fwd [NP];
  logic    sink_rfd [NP];

  dcr_regs #(.NUM_FRAMES(NUM_FRAMES), .DCR_BASE(DCR_BASE)) u_dcr (
    .clk, .rst_n,
    .dcr_read, .dcr_write, .dcr_abus, .dcr_wdata, .dcr_rdata, .dcr_ack,
    .complete, .fault,
    .start, .col_major, .nblocks_m1, .busy, .route,
    .frame_ctrl, .frame_aid, .frame_iso, .tlb_fill_we, .tlb_fill
  );

  buffer_bus_port #(.BUF_BYTES(2 * BUF_WORDS)) u_busport (
    .clk, .rst_n,
    .bus_en, .bus_we, .bus_be, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .in_en(ia_en), .in_we(ia_we), .in_be(ia_be), .in_addr(ia_addr),
    .in_wdata(ia_wdata), .in_rdata(ia_rdata),
    .out_en(oa_en), .out_we(oa_we), .out_be(oa_be), .out_addr(oa_addr),
    .out_wdata(oa_wdata), .out_rdata(oa_rdata)
  );

  dual_port_buffer #(.WORDS(BUF_WORDS)) u_inbuf (
    .clk,
    .a_en(ia_en), .a_we(ia_we), .a_be(ia_be), .a_addr(ia_addr),
    .a_wdata(ia_wdata), .a_rdata(ia_rdata),
    .b_en(ib_en), .b_we(1'b0), .b_addr(ib_addr), .b_wdata(16'd0), .b_rdata(ib_rdata)
  );

  dual_port_buffer #(.WORDS(BUF_WORDS)) u_outbuf (
    .clk,
    .a_en(oa_en), .a_we(oa_we), .a_be(oa_be), .a_addr(oa_addr),
    .a_wdata(oa_wdata), .a_rdata(oa_rdata),
    .b_en(ob_en), .b_we(ob_we), .b_addr(ob_addr), .b_wdata(ob_wdata), .b_rdata(ob_rdata)
  );

  stream_feeder #(.WORDS(BUF_WORDS)) u_feeder (
    .clk, .rst_n,
    .start, .col_major, .nblocks_m1(nblocks_m1[$clog2(BUF_WORDS/BLOCK_WORDS)-1:0]),
    .busy(feed_busy),
    .buf_en(ib_en), .buf_addr(ib_addr), .buf_rdata(ib_rdata),
    .out(src_fwd[0]), .out_rfd(src_rfd[0])
  );

  stream_collector #(.WORDS(BUF_WORDS)) u_collector (
    .clk, .rst_n,
    .start, .nblocks_m1(nblocks_m1[$clog2(BUF_WORDS/BLOCK_WORDS)-1:0]),
    .busy(coll_busy), .complete, .words_seen,
    .in(sink_fwd[NUM_FRAMES]), .in_rfd(sink_rfd[NUM_FRAMES]),
    .buf_en(ob_en), .buf_we(ob_we), .buf_addr(ob_addr), .buf_wdata(ob_wdata)
  );

  // frame boundary: an isolated frame is cut off from the switch and the aMMU; the
  // framework sees it as an idle source and a sink that is never ready
  always_comb begin
    for (int i = 0; i < NUM_FRAMES; i++) begin
      src_fwd[i+1]      = frame_iso[i] ? STREAM_IDLE : frame_out[i];
      frame_out_rfd[i]  = frame_iso[i] ? 1'b0 : src_rfd[i+1];
      frame_in[i]       = frame_iso[i] ? STREAM_IDLE : sink_fwd[i];
      sink_rfd[i]       = frame_iso[i] ? 1'b0 : frame_in_rfd[i];
      amm_req[i]        = frame_iso[i] ? SIDE_REQ_IDLE : frame_side_req[i];
      frame_side_rsp[i] = frame_iso[i] ? '0 : amm_rsp[i];
    end
  end

  interconnect_switch #(.NUM_FRAMES(NUM_FRAMES)) u_switch (
    .route, .src_fwd, .src_rfd, .sink_fwd, .sink_rfd
  );

  ammu #(.NUM_REQ(NUM_FRAMES), .TLB_ENTRIES(TLB_ENTRIES)) u_ammu (
    .clk, .rst_n,
    .fill_we(tlb_fill_we), .fill(tlb_fill),
    .aid(frame_aid), .req(amm_req), .rsp(amm_rsp),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .fault
  );

  initial assert (BUF_WORDS == (1 << SADDR_W))
    else $error("accel_framework: BUF_WORDS must equal the stream address space");

endmodule
