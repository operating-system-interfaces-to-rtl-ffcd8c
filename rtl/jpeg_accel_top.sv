// jpeg_accel_top: the accelerator framework loaded for JPEG encoding.
//
// Three reconfigurable frames: frame 0 holds the DCT accelerator, frame 1 the
// quantizer, and frame 2 is left open, its stream, control and side-path signals
// brought out to ports so that a further accelerator can be attached outside. After
// reset the interconnect chains feeder -> DCT -> quantizer -> frame 2 -> collector;
// the host normally routes feeder -> DCT -> quantizer -> collector for JPEG, and can
// reroute at any transaction boundary (for example to run the quantizer alone, or to
// send the stream through frame 2).
//
// The host side is three plain ports: the DCR slave for control and polling, the
// 64-bit bus slave onto the input and output buffers (where the DMA engine writes
// macroblocks and reads results), and the aMMU's request/acknowledge memory master.
// The DCT and quantizer do not use the side path; only frame 2 can.
//
// Source: the DCT-then-quantize chain in the framework follows the thesis's JPEG
// example. Own choices: three frames (the text says two regions, the framework figure
// draws three frames; the figure is followed so a side-path accelerator can be
// attached), frame 2 brought out as ports, and plain request/acknowledge ports in
// place of the vendor processor bus.
//
// Circuit note: Verilator reports UNOPTFLAT on the frame RFD arrays because it treats
// each array as one variable; there is no real loop unless a route sent a frame's
// output back into its own input, which the DCR block asserts against.
module jpeg_accel_top
  import saif_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // DCR slave
  input  logic                 dcr_read,
  input  logic                 dcr_write,
  input  logic [9:0]           dcr_abus,
  input  logic [31:0]          dcr_wdata,
  output logic [31:0]          dcr_rdata,
  output logic                 dcr_ack,
  // 64-bit bus slave: input buffer at 0x000-0x3FF, output buffer at 0x400-0x7FF
  input  logic                 bus_en,
  input  logic                 bus_we,
  input  logic [7:0]           bus_be,
  input  logic [10:0]          bus_addr,
  input  logic [63:0]          bus_wdata,
  output logic [63:0]          bus_rdata,
  output logic                 bus_rvalid,
  // aMMU memory master
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [31:0]          mem_addr,
  output logic [15:0]          mem_wdata,
  input  logic                 mem_ack,
  input  logic [15:0]          mem_rdata,
  output logic                 busy,
  // open frame 2
  output stream_t              x_in,
  input  logic                 x_in_rfd,
  input  stream_t              x_out,
  output logic                 x_out_rfd,
  output logic [15:0]          x_ctrl,
  input  side_req_t            x_side_req,
  output side_rsp_t            x_side_rsp
);

  localparam int unsigned NF = 3;

  stream_t   frame_in       [NF];
  logic      frame_in_rfd   [NF];
  stream_t   frame_out      [NF];
  logic      frame_out_rfd  [NF];
  logic [15:0] frame_ctrl   [NF];
  side_req_t frame_side_req [NF];
  side_rsp_t frame_side_rsp [NF];

  accel_framework #(.NUM_FRAMES(NF)) u_fw (
    .clk, .rst_n,
    .dcr_read, .dcr_write, .dcr_abus, .dcr_wdata, .dcr_rdata, .dcr_ack,
    .bus_en, .bus_we, .bus_be, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .busy,
    .frame_in, .frame_in_rfd, .frame_out, .frame_out_rfd, .frame_ctrl,
    .frame_side_req, .frame_side_rsp
  );

  // frame 0: DCT
  dct8x8_accel u_dct (
    .clk, .rst_n, .ctrl(frame_ctrl[0]),
    .in(frame_in[0]), .in_rfd(frame_in_rfd[0]),
    .out(frame_out[0]), .out_rfd(frame_out_rfd[0])
  );

  // frame 1: quantizer
  quant_accel u_quant (
    .clk, .rst_n, .ctrl(frame_ctrl[1]),
    .in(frame_in[1]), .in_rfd(frame_in_rfd[1]),
    .out(frame_out[1]), .out_rfd(frame_out_rfd[1])
  );

  // frame 2: open
  always_comb begin
    frame_side_req[0] = SIDE_REQ_IDLE;
    frame_side_req[1] = SIDE_REQ_IDLE;
    frame_side_req[2] = x_side_req;
    x_side_rsp        = frame_side_rsp[2];
    x_in              = frame_in[2];
    frame_in_rfd[2]   = x_in_rfd;
    frame_out[2]      = x_out;
    x_out_rfd         = frame_out_rfd[2];
    x_ctrl            = frame_ctrl[2];
  end

endmodule
