// dcr_regs: the framework's device control registers.
//
// All control of the framework, apart from the DMA engine, goes over the processor's
// DCR bus, which is separate from the data bus so that polling never competes with
// data transfers. Registers, at DCR_BASE + offset (offsets in saif_pkg):
//   CTRL   (W)   [0] start a transaction, [1] feed in column-major order,
//                [6:4] number of 8x8 blocks minus one. Ignored while busy.
//   STATUS (R)   [0] busy: set by start, cleared when the collector has received every
//                block; the driver polls this. [1] sticky side-path fault, cleared by
//                the next start.
//   ROUTE  (R/W) interconnect configuration, 4 bits per sink (see
//                interconnect_switch). Takes effect at once; write it between
//                transactions.
//   TLB_A  (W)   first half of a TLB fill: VPN, AID, writable, valid.
//   TLB_B  (W)   second half: PPN; this write installs the entry.
//   FRAME0+i (R/W) per-frame [15:0] control word, [18:16] AID, [31] isolate: while
//                set, the framework ignores the frame's outputs (for reloading it).
//
// Bus handshake: a read or write is acknowledged by dcr_ack one cycle later; read data
// is valid with dcr_ack. Addresses outside the block are not acknowledged and read 0.
// The register layout is this design's own choice.
module dcr_regs
  import saif_pkg::*;
#(
  parameter int unsigned NUM_FRAMES = 3,
  parameter logic [9:0]  DCR_BASE   = 10'h080
) (
  input  logic              clk,
  input  logic              rst_n,
  // DCR slave
  input  logic              dcr_read,
  input  logic              dcr_write,
  input  logic [9:0]        dcr_abus,
  input  logic [31:0]       dcr_wdata,
  output logic [31:0]       dcr_rdata,
  output logic              dcr_ack,
  // status inputs
  input  logic              complete,     // collector: all blocks received
  input  logic              fault,        // aMMU refused an access
  // control outputs
  output logic              start,        // one-cycle pulse
  output logic              col_major,
  output logic [2:0]        nblocks_m1,
  output logic              busy,
  output logic [31:0]       route,
  output logic [15:0]       frame_ctrl [NUM_FRAMES],
  output logic [AID_W-1:0]  frame_aid  [NUM_FRAMES],
  output logic              frame_iso  [NUM_FRAMES],
  output logic              tlb_fill_we,
  output tlb_fill_t         tlb_fill
);

  // Default chain: feeder -> frame 0 -> frame 1 -> ... -> frame N-1 -> collector.
  function automatic logic [31:0] default_route();
    logic [31:0] r;
    r = '1;
    for (int k = 0; k < NUM_FRAMES + 1; k++) r[4*k +: 4] = 4'(k);
    return r;
  endfunction

  logic       sel;
  logic [3:0] off;
  logic       fault_sticky;
  tlb_fill_t  fill_hold;

  assign sel = (dcr_abus[9:4] == DCR_BASE[9:4]);
  assign off = dcr_abus[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcr_ack      <= 1'b0;
      dcr_rdata    <= '0;
      start        <= 1'b0;
      col_major    <= 1'b0;
      nblocks_m1   <= '0;
      busy         <= 1'b0;
      fault_sticky <= 1'b0;
      route        <= default_route();
      tlb_fill_we  <= 1'b0;
      tlb_fill     <= '0;
      fill_hold    <= '0;
      for (int i = 0; i < NUM_FRAMES; i++) begin
        frame_ctrl[i] <= '0;
        frame_aid[i]  <= '0;
        frame_iso[i]  <= 1'b0;
      end
    end else begin
      start       <= 1'b0;
      tlb_fill_we <= 1'b0;
      dcr_ack     <= sel && (dcr_read || dcr_write);
      if (complete) busy <= 1'b0;
      if (fault) fault_sticky <= 1'b1;

      if (sel && dcr_write) begin
        unique case (off)
          DCR_CTRL: if (!busy && dcr_wdata[0]) begin
            start        <= 1'b1;
            busy         <= 1'b1;
            col_major    <= dcr_wdata[1];
            nblocks_m1   <= dcr_wdata[6:4];
            fault_sticky <= 1'b0;
          end
          DCR_ROUTE: route <= dcr_wdata;
          DCR_TLB_A: begin
            fill_hold.vpn      <= dcr_wdata[31:12];
            fill_hold.aid      <= dcr_wdata[6:4];
            fill_hold.writable <= dcr_wdata[1];
            fill_hold.valid    <= dcr_wdata[0];
          end
          DCR_TLB_B: begin
            tlb_fill     <= fill_hold;
            tlb_fill.ppn <= dcr_wdata[31:12];
            tlb_fill_we  <= 1'b1;
          end
          default: begin
            for (int i = 0; i < NUM_FRAMES; i++)
              if (int'(off) == int'(DCR_FRAME0) + i) begin
                frame_ctrl[i] <= dcr_wdata[15:0];
                frame_aid[i]  <= dcr_wdata[18:16];
                frame_iso[i]  <= dcr_wdata[31];
              end
          end
        endcase
      end

      if (sel && dcr_read) begin
        dcr_rdata <= '0;
        unique case (off)
          DCR_STATUS: dcr_rdata <= {30'd0, fault_sticky, busy};
          DCR_ROUTE:  dcr_rdata <= route;
          default: begin
            for (int i = 0; i < NUM_FRAMES; i++)
              if (int'(off) == int'(DCR_FRAME0) + i)
                dcr_rdata <= {frame_iso[i], 12'd0, frame_aid[i], frame_ctrl[i]};
          end
        endcase
      end
    end
  end

  // A route may not give one source to two sinks,
  function automatic logic route_ok(input logic [31:0] r);
    for (int a = 0; a < NUM_FRAMES + 1; a++)
      for (int b = a + 1; b < NUM_FRAMES + 1; b++)
        if (int'(r[4*a +: 4]) <= NUM_FRAMES && r[4*a +: 4] == r[4*b +: 4]) return 1'b0;
    // nor close a ring of frames: walk upstream from each frame input
    for (int s = 0; s < NUM_FRAMES; s++) begin
      int unsigned cur;
      cur = s;
      for (int step = 0; step < NUM_FRAMES; step++) begin
        int unsigned src;
        src = 32'(r[4*cur +: 4]);
        if (src == 0 || src > NUM_FRAMES) break;
        cur = src - 1;
        if (cur == s) return 1'b0;
      end
    end
    return 1'b1;
  endfunction

  a_route: assert property (@(posedge clk) disable iff (!rst_n) route_ok(route))
    else $error("dcr_regs: route %h shares a source or forms a ring", route);

  initial assert (NUM_FRAMES >= 1 && NUM_FRAMES <= 7)
    else $error("dcr_regs: NUM_FRAMES out of range");

endmodule
