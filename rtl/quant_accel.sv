// quant_accel: framework quantizer, the fine-grained accelerator of the JPEG chain.
//
// Function: divides each DCT coefficient by the entry of an 8x8 quantization table at
// the coefficient's position, rounding to the nearest integer with ties away from
// zero, as JPEG encoders do: q = sign(x) * floor((|x| + Q/2) / Q).
//
// The table is the standard JPEG luminance table scaled to the encoder's default
// quality of 75 (entries halved, rounded: Q = max(1, (base*S + 50) / 100) with
// S = 200 - 2*QUALITY for QUALITY >= 50, S = 5000 / QUALITY below). It is computed at
// elaboration from the QUALITY parameter; QUALITY = 100 gives the all-ones table,
// which turns quantization into a pass-through (lossless). The position is the low six
// bits of the stream address (row*8 + col), so coefficients may arrive in any order.
//
// Interface and timing: framework stream in/out. One pipeline register: a coefficient
// leaves the cycle after it arrives, one per cycle. RFD is passed back as
// "output register empty or being taken", so backpressure from the sink reaches the
// source in the same cycle, and a stall of the input (valid low) shows as valid low at
// the output. start, done and the address travel with the data. The frame control
// word is not used.
//
// Source: quantization as a per-element divide by a table, used in the framework's
// JPEG chain at the encoder's default quality, follows the thesis. Own choices: the
// standard luminance table scaled to quality 75 (the thesis names no table), the
// rounding rule and the one-register pipeline.
module quant_accel
  import saif_pkg::*;
#(
  parameter int unsigned QUALITY = 75   // 1..100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  ctrl,     // frame control word, unused
  input  stream_t      in,
  output logic         in_rfd,
  output stream_t      out,
  input  logic         out_rfd
);

  // JPEG standard luminance quantization table, natural (row-major) order
  localparam logic [7:0] BASE [64] = '{
     8'd16,  8'd11,  8'd10,  8'd16,  8'd24,  8'd40,  8'd51,  8'd61,
     8'd12,  8'd12,  8'd14,  8'd19,  8'd26,  8'd58,  8'd60,  8'd55,
     8'd14,  8'd13,  8'd16,  8'd24,  8'd40,  8'd57,  8'd69,  8'd56,
     8'd14,  8'd17,  8'd22,  8'd29,  8'd51,  8'd87,  8'd80,  8'd62,
     8'd18,  8'd22,  8'd37,  8'd56,  8'd68,  8'd109, 8'd103, 8'd77,
     8'd24,  8'd35,  8'd55,  8'd64,  8'd81,  8'd104, 8'd113, 8'd92,
     8'd49,  8'd64,  8'd78,  8'd87,  8'd103, 8'd121, 8'd120, 8'd101,
     8'd72,  8'd92,  8'd95,  8'd98,  8'd112, 8'd100, 8'd103, 8'd99};

  function automatic logic [7:0] qentry(input int unsigned pos);
    int unsigned s, q;
    s = (QUALITY < 50) ? 5000 / QUALITY : 200 - 2 * QUALITY;
    q = (int'(BASE[pos]) * s + 50) / 100;
    if (q < 1)   q = 1;
    if (q > 255) q = 255;
    return 8'(q);
  endfunction

  logic [7:0]  qtab [64];
  always_comb
    for (int p = 0; p < 64; p++) qtab[p] = qentry(p);

  stream_t      oreg;
  logic [7:0]   qv;
  logic [15:0]  mag, quot;
  logic signed [15:0] qval;

  assign in_rfd = !oreg.valid || out_rfd;
  assign qv     = qtab[in.addr[5:0]];

  always_comb begin
    mag  = in.data[15] ? 16'(-in.data) : in.data;
    quot = 16'((17'(mag) + 17'(qv >> 1)) / 17'(qv));
    qval = in.data[15] ? -$signed(quot) : $signed(quot);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oreg <= STREAM_IDLE;
    end else if (in_rfd) begin
      oreg      <= in;
      oreg.data <= qval;
      if (!in.valid) oreg <= STREAM_IDLE;
    end
  end

  assign out = oreg;

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out.valid && !out_rfd |=> out.valid && $stable(out.data) && $stable(out.addr))
    else $error("quant_accel: output changed under backpressure");

  initial assert (QUALITY >= 1 && QUALITY <= 100) else $error("quant_accel: QUALITY out of range");

endmodule
