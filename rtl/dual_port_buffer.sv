// dual_port_buffer: framework local store, one block RAM with two ports.
//
// Port A faces the system bus: 64 bits wide so that a burst can move one bus word per
// cycle, with a byte enable per lane. Port B faces the accelerator frames: 16 bits
// wide, addressed in 16-bit words. The default 512 x 16 bits (1 KB) matches the 9-bit
// stream address of the frame interface.
//
// Byte order is big-endian, as on the host processor: 16-bit word w sits in 64-bit
// word w/4, and word w%4 == 0 occupies the most significant lane [63:48]. Byte lane
// a_be[7] is the byte at the lowest address.
//
// Timing: both ports are synchronous; read data appears the cycle after the address.
// A write and a read of the same port in one cycle return the old contents. Writes to
// the same location from both ports in one cycle are not resolved (port B wins); the
// framework never does this, since the bus fills a buffer only while no stream uses it.
//
// Source: a dual-ported block RAM with a 64-bit bus port and big-endian 16-bit values
// follows the thesis. Own choices: 512 words, the 16-bit framework port, byte enables,
// one-cycle synchronous reads, and read-old-data on a same-port write.
module dual_port_buffer #(
  parameter int unsigned WORDS = 512  // 16-bit words; multiple of 4
) (
  input  logic                         clk,
  // port A: system bus, 64-bit
  input  logic                         a_en,
  input  logic                         a_we,
  input  logic [7:0]                   a_be,
  input  logic [$clog2(WORDS/4)-1:0]   a_addr,
  input  logic [63:0]                  a_wdata,
  output logic [63:0]                  a_rdata,
  // port B: framework, 16-bit
  input  logic                         b_en,
  input  logic                         b_we,
  input  logic [$clog2(WORDS)-1:0]     b_addr,
  input  logic [15:0]                  b_wdata,
  output logic [15:0]                  b_rdata
);

  localparam int unsigned LINES = WORDS / 4;

  logic [63:0] mem [LINES];

  logic [$clog2(LINES)-1:0] b_line;
  logic [1:0]               b_lane;
  assign b_line = b_addr[$clog2(WORDS)-1:2];
  assign b_lane = b_addr[1:0];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        for (int i = 0; i < 8; i++)
          if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      end
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_line][48 - 16*b_lane +: 16] <= b_wdata;
      b_rdata <= mem[b_line][48 - 16*b_lane +: 16];
    end
  end

endmodule
