// interconnect_switch: the switchable interconnect between the framework's stream
// endpoints.
//
// Sources are the feeder (index 0) and the output side of each frame (index 1+i).
// Sinks are the input side of each frame (index i) and the collector (index
// NUM_FRAMES). Each sink has a 4-bit field in the route word, set from a DCR, that names
// the source it listens to; a value above NUM_FRAMES leaves the sink unconnected, so it
// sees an idle channel. RFD travels the other way: a source sees the RFD of the sink
// that selected it, and RFD low if no sink did, so an unrouted source stalls instead of
// losing data.
//
// The switch is purely combinational: a new route takes effect in the cycle after the
// route register is written, and there is no storage in the channels. Switching is
// meant to happen between transactions, when every frame is idle. Two sinks must not
// select the same source, and frames must not form a ring; dcr_regs asserts both.
//
// Source: channels redirected by a DCR, without state in the channel, with the
// backpressure (RFD) signal carried back, follow the thesis. Own choices: the 4-bit
// per-sink route encoding, idle channel for an unrouted sink and RFD low for an
// unrouted source.
module interconnect_switch
  import saif_pkg::*;
#(
  parameter int unsigned NUM_FRAMES = 3   // at most 7
) (
  input  logic [31:0]  route,
  input  stream_t      src_fwd  [NUM_FRAMES+1],
  output logic         src_rfd  [NUM_FRAMES+1],
  output stream_t      sink_fwd [NUM_FRAMES+1],
  input  logic         sink_rfd [NUM_FRAMES+1]
);

  localparam int unsigned NP = NUM_FRAMES + 1;

  logic [3:0] sel [NP];

  always_comb begin
    for (int k = 0; k < NP; k++) begin
      sel[k] = route[4*k +: 4];
      sink_fwd[k] = STREAM_IDLE;
      for (int s = 0; s < NP; s++)
        if (sel[k] == 4'(s)) sink_fwd[k] = src_fwd[s];
    end
    for (int s = 0; s < NP; s++) begin
      src_rfd[s] = 1'b0;
      for (int k = 0; k < NP; k++)
        if (sel[k] == 4'(s)) src_rfd[s] = sink_rfd[k];
    end
  end

  initial assert (NUM_FRAMES >= 1 && NUM_FRAMES <= 7)
    else $error("interconnect_switch: NUM_FRAMES out of range");

endmodule
