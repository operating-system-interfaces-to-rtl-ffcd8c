// stream_collector: the sink at the tail of the accelerator chain.
//
// Every word that arrives is written into the output buffer at the stream address it
// carries, so an accelerator may emit its results in any order. The collector is
// always ready (RFD high): the buffer takes one write per cycle. A transaction is armed
// with a start pulse and the number of blocks to expect; each word flagged done closes
// one block, and when the last expected block has closed, complete pulses for one
// cycle and busy falls. The framework's status register is cleared from this.
//
// Timing: a word is written in the cycle it is presented; complete is registered and
// appears the cycle after the final done word.
//
// Source: the tail of the chain writes to the output buffer and the host polls a DCR
// that clears on completion, as in the thesis. Own choices: a separate collector
// block, always-ready input, writing at the stream address, and completion taken from
// the done flag of the last block.
module stream_collector
  import saif_pkg::*;
#(
  parameter int unsigned WORDS = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,       // arm for a new transaction
  input  logic [$clog2(WORDS/BLOCK_WORDS)-1:0] nblocks_m1,
  output logic                         busy,
  output logic                         complete,    // one-cycle pulse
  output logic [$clog2(WORDS)-1:0]     words_seen,  // words written in this transaction
  // stream from the tail accelerator
  input  stream_t                      in,
  output logic                         in_rfd,
  // output buffer, framework port (write only)
  output logic                         buf_en,
  output logic                         buf_we,
  output logic [$clog2(WORDS)-1:0]     buf_addr,
  output logic [DATA_W-1:0]            buf_wdata
);

  localparam int unsigned BW = $clog2(WORDS/BLOCK_WORDS);

  logic [BW:0] blocks_left;
  logic        take;

  assign in_rfd    = 1'b1;
  assign take      = in.valid;
  assign buf_en    = take;
  assign buf_we    = take;
  assign buf_addr  = in.addr[$clog2(WORDS)-1:0];
  assign buf_wdata = in.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      complete    <= 1'b0;
      blocks_left <= '0;
      words_seen  <= '0;
    end else begin
      complete <= 1'b0;
      if (!busy && start) begin
        busy        <= 1'b1;
        blocks_left <= {1'b0, nblocks_m1} + 1'b1;
        words_seen  <= '0;
      end else if (busy && take) begin
        words_seen <= words_seen + 1'b1;
        if (in.done) begin
          blocks_left <= blocks_left - 1'b1;
          if (blocks_left == 1) begin
            busy     <= 1'b0;
            complete <= 1'b1;
          end
        end
      end
    end
  end

endmodule
