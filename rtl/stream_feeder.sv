// stream_feeder: pushes the contents of the input buffer into the head accelerator.
//
// On a start pulse the feeder walks `nblocks` 8x8 macroblocks of the input buffer and
// presents one 16-bit word per cycle on its stream output. Within a block it visits
// the samples in row-major or, with col_major set, column-major order; the address sent
// with each word is always the word's own buffer address (block*64 + row*8 + col), so
// the sink knows where the value belongs whatever the order. start marks word 0 and
// done word 63 of each block.
//
// Timing: the buffer's registered read port is the feeder's output register. The read
// address is issued one cycle ahead; when the sink drops RFD the read enable is held
// low, so the word, its address and valid stay put until RFD returns. Sustained rate is
// one word per cycle; the first word appears the cycle after start. busy falls in the
// cycle after the last word is taken.
//
// Source: the push state machine feeding 8x8 blocks in row- or column-major order
// follows the thesis. Own choices: one to eight blocks per transaction, the address
// carried with each word, start/done per block. The thesis's pull mode, where the
// accelerator addresses the buffer itself, is not built.
module stream_feeder
  import saif_pkg::*;
#(
  parameter int unsigned WORDS = 512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,      // one-cycle pulse, ignored while busy
  input  logic                        col_major,
  input  logic [$clog2(WORDS/BLOCK_WORDS)-1:0] nblocks_m1,  // blocks to send, minus one
  output logic                        busy,
  // input buffer, framework port (read only)
  output logic                        buf_en,
  output logic [$clog2(WORDS)-1:0]    buf_addr,
  input  logic [DATA_W-1:0]           buf_rdata,
  // stream to the head accelerator
  output stream_t                     out,
  input  logic                        out_rfd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic          ovalid;
  logic [AW-1:0] cnt;        // index, in feed order, of the word on the output
  logic [AW-1:0] last_cnt;
  logic          mode_col;
  logic          take;

  function automatic logic [AW-1:0] walk(input logic [AW-1:0] i, input logic col);
    // i = {block, major, minor}; column-major swaps the row and column fields
    return col ? {i[AW-1:6], i[2:0], i[5:3]} : i;
  endfunction

  assign take = ovalid && out_rfd;

  always_comb begin
    buf_en   = 1'b0;
    buf_addr = walk(cnt, mode_col);
    if (!busy && start) begin
      buf_en   = 1'b1;
      buf_addr = '0;
    end else if (take && cnt != last_cnt) begin
      buf_en   = 1'b1;
      buf_addr = walk(cnt + 1'b1, mode_col);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      ovalid   <= 1'b0;
      cnt      <= '0;
      last_cnt <= '0;
      mode_col <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        ovalid   <= 1'b1;
        cnt      <= '0;
        last_cnt <= {nblocks_m1, 6'h3f};
        mode_col <= col_major;
      end
    end else if (take) begin
      if (cnt == last_cnt) begin
        busy   <= 1'b0;
        ovalid <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    out       = STREAM_IDLE;
    out.valid = ovalid;
    out.start = ovalid && (cnt[5:0] == 6'd0);
    out.done  = ovalid && (cnt[5:0] == 6'd63);
    out.data  = buf_rdata;
    out.addr  = SADDR_W'(walk(cnt, mode_col));
  end

  // The feeder's address space is the stream address space.
  initial assert (AW == SADDR_W) else $error("stream_feeder: WORDS must match SADDR_W");

endmodule
