// buffer_bus_port: the framework's slave port on the 64-bit system bus.
//
// The input and output buffers are physically addressable, so that the DMA engine can
// burst macroblocks in and results out, and so that the host can map them straight
// into an application (direct access). This port decodes a bus access by address:
// the lower half of the window selects the input buffer, the upper half the output
// buffer, each BUF_BYTES long. One 64-bit word moves per cycle; reads return data the
// cycle after the address (bus_rvalid marks it). The window layout is this design's
// own choice.
module buffer_bus_port #(
  parameter int unsigned BUF_BYTES = 1024
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // bus side (byte address within the framework window, 64-bit aligned)
  input  logic                              bus_en,
  input  logic                              bus_we,
  input  logic [7:0]                        bus_be,
  input  logic [$clog2(2*BUF_BYTES)-1:0]    bus_addr,
  input  logic [63:0]                       bus_wdata,
  output logic [63:0]                       bus_rdata,
  output logic                              bus_rvalid,
  // input buffer port A
  output logic                              in_en,
  output logic                              in_we,
  output logic [7:0]                        in_be,
  output logic [$clog2(BUF_BYTES/8)-1:0]    in_addr,
  output logic [63:0]                       in_wdata,
  input  logic [63:0]                       in_rdata,
  // output buffer port A
  output logic                              out_en,
  output logic                              out_we,
  output logic [7:0]                        out_be,
  output logic [$clog2(BUF_BYTES/8)-1:0]    out_addr,
  output logic [63:0]                       out_wdata,
  input  logic [63:0]                       out_rdata
);

  localparam int unsigned AW = $clog2(2 * BUF_BYTES);

  logic hi, rd_hi;

  assign hi        = bus_addr[AW-1];
  assign in_en     = bus_en && !hi;
  assign out_en    = bus_en &&  hi;
  assign in_we     = bus_we;
  assign out_we    = bus_we;
  assign in_be     = bus_be;
  assign out_be    = bus_be;
  assign in_addr   = bus_addr[AW-2:3];
  assign out_addr  = bus_addr[AW-2:3];
  assign in_wdata  = bus_wdata;
  assign out_wdata = bus_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_hi      <= 1'b0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_en && !bus_we;
      if (bus_en) rd_hi <= hi;
    end
  end

  assign bus_rdata = rd_hi ? out_rdata : in_rdata;

endmodule
