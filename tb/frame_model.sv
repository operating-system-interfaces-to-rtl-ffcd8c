// frame_model: behavioural accelerator for testbenches, plugged into a reconfigurable
// frame. It speaks the frame stream protocol and, optionally, the aMMU side path.
//   ctrl[15] = 0: each word leaves one cycle after it arrives with ctrl[7:0] added to
//                 its data. With STALL_PCT > 0 the model randomly withholds its output
//                 (valid low) and its RFD, to provoke stalls and backpressure.
//   ctrl[15] = 1: for each word it accesses memory through the side path at virtual
//                 address VBASE + 2*addr: with ctrl[14] = 0 it reads and adds the value
//                 read to the word; with ctrl[14] = 1 it writes the word there and
//                 passes it on unchanged. A refused access turns the word into 16'hDEAD.
//                 RFD stays low while an access is outstanding.
module frame_model
  import saif_pkg::*;
#(
  parameter logic [31:0] VBASE     = 32'h4000_0000,
  parameter int          STALL_PCT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] ctrl,
  input  stream_t     in,
  output logic        in_rfd,
  output stream_t     out,
  input  logic        out_rfd,
  output side_req_t   side_req,
  input  side_rsp_t   side_rsp
);
  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_DONE} mstate_t;
  mstate_t state;
  stream_t oreg, word, res;
  logic    hiccup;
  logic    free;

  always @(posedge clk) hiccup <= (STALL_PCT > 0) && ($urandom_range(0, 99) < STALL_PCT);

  assign free   = !oreg.valid || (out_rfd && !hiccup);
  assign in_rfd = (state == M_IDLE) && free && !hiccup;
  assign out    = hiccup ? STREAM_IDLE : oreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; oreg <= STREAM_IDLE; word <= STREAM_IDLE; res <= STREAM_IDLE;
      side_req <= SIDE_REQ_IDLE;
    end else begin
      if (oreg.valid && out_rfd && !hiccup) oreg.valid <= 1'b0;
      case (state)
        M_IDLE: if (in.valid && in_rfd) begin
          if (!ctrl[15]) begin
            oreg <= in;
            oreg.data <= in.data + 16'(ctrl[7:0]);
          end else begin
            word <= in;
            side_req.rd_req <= !ctrl[14];
            side_req.wr_req <= ctrl[14];
            side_req.vaddr  <= VBASE + 32'(in.addr) * 2;
            side_req.wdata  <= in.data;
            state <= M_WAIT;
          end
        end
        M_WAIT: if (side_rsp.ack) begin
          side_req <= SIDE_REQ_IDLE;
          res <= word;
          res.data <= side_rsp.err ? 16'hDEAD : ctrl[14] ? word.data : word.data + side_rsp.rdata;
          state <= M_DONE;
        end
        M_DONE: if (free) begin
          oreg  <= res;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
