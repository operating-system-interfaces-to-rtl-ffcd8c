// dct8x8_accel: framework DCT accelerator, a 2-D 8x8 forward DCT of each macroblock.
//
// Function: for every 64-sample block it computes the JPEG forward DCT
//   F(u,v) = 1/4 C(u) C(v) sum_{x,y} f(x,y) cos((2x+1)u pi/16) cos((2y+1)v pi/16),
//   C(0) = 1/sqrt(2), C(k) = 1 otherwise,
// on 16-bit signed samples (12-bit samples sign-extended by the host) and emits 64
// signed 16-bit coefficients, saturated.
//
// How: row-column decomposition with eight multipliers per pass. The block is first
// collected into a sample array; each arriving word is stored at the position its
// stream address gives, so the feeder may send rows or columns. A row pass then
// produces one intermediate value per cycle (8 multiply-adds in parallel), kept with
// 3 extra fraction bits, and a column pass produces one coefficient per cycle, which
// is sent on at once. The cosine basis is held as Q15 integers derived from the
// nine values cos(k pi/16), k = 0..8, by symmetry.
//
// Interface: framework stream in/out (saif_pkg::stream_t with RFD). Coefficients leave
// in row-major order, u*8+v, with addresses block*64 + u*8 + v; start marks the first,
// done the last. The frame control word is not used.
//
// Timing: 64 cycles to collect, 64 for the row pass, then 64 cycles (one coefficient
// per cycle while the sink takes them) for the column pass: the first coefficient is
// on the output 65 clock edges after the edge that took the last sample. While it
// computes, the accelerator drops its RFD: the framework's backpressure holds the
// feeder. The 2-D DCT function follows
// the document; this micro-architecture and its 192-cycle block period are this
// design's own (the original used a pipelined vendor core, about 100 cycles deep).
module dct8x8_accel
  import saif_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  ctrl,     // frame control word, unused
  input  stream_t      in,
  output logic         in_rfd,
  output stream_t      out,
  input  logic         out_rfd
);

  typedef enum logic [1:0] {S_COLLECT, S_ROWS, S_COLS} state_t;

  // cos(k*pi/16) * 16384, k = 0..8
  localparam logic signed [15:0] COS_Q14 [9] =
    '{16'sd16384, 16'sd16069, 16'sd15137, 16'sd13623, 16'sd11585,
      16'sd9102,  16'sd6270,  16'sd3196,  16'sd0};

  // Q15 basis a(k,n) = 0.5 * C(k) * cos((2n+1) k pi / 16)
  function automatic logic signed [15:0] basis(input int unsigned k, input int unsigned n);
    int unsigned m;
    if (k == 0) return 16'sd11585;   // 0.5 / sqrt(2) * 32768
    m = ((2 * n + 1) * k) % 32;
    if (m <= 8)       return  COS_Q14[m];
    else if (m <= 16) return -COS_Q14[16 - m];
    else if (m <= 24) return -COS_Q14[m - 16];
    else              return  COS_Q14[32 - m];
  endfunction

  state_t                state;
  logic signed [15:0]    xs [64];   // samples, row-major
  logic signed [23:0]    ts [64];   // row-pass results T[r][k], Q3, row-major
  logic [5:0]            idx;       // position within the current pass
  logic [5:0]            got;       // samples collected
  logic [2:0]            blk;       // block number taken from the stream address
  stream_t               oreg;

  logic                  take_in, out_free;
  logic signed [39:0]    row_acc;
  logic signed [47:0]    col_acc;
  logic signed [23:0]    row_val;
  logic signed [15:0]    col_val;

  assign in_rfd   = (state == S_COLLECT);
  assign take_in  = in_rfd && in.valid;
  assign out_free = !oreg.valid || out_rfd;

  // row pass: T[r][k] = sum_n x[r][n] a(k,n), r = idx[5:3], k = idx[2:0]
  always_comb begin
    row_acc = '0;
    for (int n = 0; n < 8; n++)
      row_acc += 40'(xs[{idx[5:3], 3'(n)}]) * 40'(basis(idx[2:0], n));
    row_val = 24'((row_acc + 40'sd2048) >>> 12);
  end

  // column pass: F[u][v] = sum_r T[r][v] a(u,r), u = idx[5:3], v = idx[2:0]
  always_comb begin
    logic signed [47:0] r;
    col_acc = '0;
    for (int rr = 0; rr < 8; rr++)
      col_acc += 48'(ts[{3'(rr), idx[2:0]}]) * 48'(basis(idx[5:3], rr));
    r = (col_acc + 48'sd131072) >>> 18;
    if (r > 48'sd32767)       col_val = 16'sh7fff;
    else if (r < -48'sd32768) col_val = 16'sh8000;
    else                      col_val = 16'(r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_COLLECT;
      idx   <= '0;
      got   <= '0;
      blk   <= '0;
      oreg  <= STREAM_IDLE;
    end else begin
      if (out_rfd) oreg.valid <= 1'b0;
      unique case (state)
        S_COLLECT: if (take_in) begin
          xs[in.addr[5:0]] <= in.data;
          blk <= in.addr[8:6];
          got <= in.start ? 6'd1 : got + 1'b1;
          if (in.done || (!in.start && got == 6'd63)) begin
            state <= S_ROWS;
            idx   <= '0;
          end
        end
        S_ROWS: begin
          ts[idx] <= row_val;
          idx     <= idx + 1'b1;
          if (idx == 6'd63) state <= S_COLS;
        end
        S_COLS: if (out_free) begin
          oreg.valid <= 1'b1;
          oreg.start <= (idx == 6'd0);
          oreg.done  <= (idx == 6'd63);
          oreg.data  <= col_val;
          oreg.addr  <= {blk, idx};
          idx        <= idx + 1'b1;
          if (idx == 6'd63) begin
            state <= S_COLLECT;
            got   <= '0;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  assign out = oreg;

  // The source holds its word while the sink withholds RFD.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out.valid && !out_rfd |=> out.valid && $stable(out.data) && $stable(out.addr))
    else $error("dct8x8_accel: output changed under backpressure");

endmodule
