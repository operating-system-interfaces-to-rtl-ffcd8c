// ammu: accelerator memory management unit.
//
// Gives the accelerator frames protected access to system memory outside their data
// stream (the "side path"), addressed in the virtual address space of the application
// that owns the accelerator. Translation uses a small software-filled TLB:
// TLB_ENTRIES (default 4) direct-mapped entries, each mapping one 4 KB page and tagged
// with the 3-bit accelerator ID (AID) of its owner, a valid bit and a write-permission
// bit. The entry is chosen by the low bits of the virtual page number (virtual address
// bits 13:12 for four entries); a request succeeds if the entry is valid, its page
// number and AID match, and, for a write, it is writable. The physical address is the
// entry's page number joined to the low 12 bits of the virtual address. Anything else
// is answered with an error acknowledge and no memory access.
//
// Frames request with ReadRequest or WriteRequest held high, together with the
// virtual address and, for a write, the data, until they see ack. Requests from
// several frames are served one at a time in round-robin order.
//
// The host fills an entry through two DCR writes; the second delivers fill_we with the
// assembled entry. Writing an entry with valid clear revokes a mapping.
//
// Memory side: a simple request/acknowledge master (mem_req held until mem_ack) that a
// bus bridge turns into bus transactions; 16-bit data, byte address.
//
// Timing: one cycle to arbitrate, one for the TLB lookup, then the memory access of
// whatever latency the memory has, then one cycle of ack. A refused request is
// acknowledged (with err) two cycles after it is raised. A frame drops its request at
// the clock edge where it samples ack; a request still high one cycle later is a new one.
//
// Source: four direct-mapped entries, the 3-bit AID, valid and write bits, 4 KB pages,
// the two-write fill and the index from the low page-number bits follow the thesis.
// Own choices: the round-robin arbitration (the thesis leaves arbitration open), the
// 16-bit side-path data width, error acknowledge on a fault, and the generic memory
// master in place of a processor-bus master.
module ammu
  import saif_pkg::*;
#(
  parameter int unsigned NUM_REQ     = 3,
  parameter int unsigned TLB_ENTRIES = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // TLB fill from the DCR block
  input  logic                     fill_we,
  input  tlb_fill_t                fill,
  // accelerator frames
  input  logic [AID_W-1:0]         aid  [NUM_REQ],
  input  side_req_t                req  [NUM_REQ],
  output side_rsp_t                rsp  [NUM_REQ],
  // system memory master
  output logic                     mem_req,
  output logic                     mem_we,
  output logic [VADDR_W-1:0]       mem_addr,
  output logic [DATA_W-1:0]        mem_wdata,
  input  logic                     mem_ack,
  input  logic [DATA_W-1:0]        mem_rdata,
  // one-cycle pulse on every refused access
  output logic                     fault
);

  localparam int unsigned IW = (TLB_ENTRIES > 1) ? $clog2(TLB_ENTRIES) : 1;
  localparam int unsigned RW = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1;

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_MEM, S_RESP} state_t;

  tlb_fill_t        tlb [TLB_ENTRIES];
  state_t           state;
  logic [RW-1:0]    cur, rr_ptr;
  logic             cur_we;
  logic [VADDR_W-1:0] cur_vaddr;
  logic [DATA_W-1:0]  cur_wdata;
  logic [AID_W-1:0]   cur_aid;
  logic             resp_err;
  logic [DATA_W-1:0] resp_data;

  // round-robin pick among pending requests
  logic          pick_valid;
  logic [RW-1:0] pick;
  always_comb begin
    pick_valid = 1'b0;
    pick       = '0;
    for (int k = NUM_REQ - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(rr_ptr) + k) % NUM_REQ;
      if (req[idx].rd_req || req[idx].wr_req) begin
        pick_valid = 1'b1;
        pick       = RW'(idx);
      end
    end
  end

  // TLB lookup of the held request
  tlb_fill_t     ent;
  logic          hit, allowed;
  always_comb begin
    ent     = tlb[cur_vaddr[12 +: IW]];
    hit     = ent.valid && ent.vpn == cur_vaddr[31:12] && ent.aid == cur_aid;
    allowed = hit && (!cur_we || ent.writable);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < TLB_ENTRIES; e++) tlb[e] <= '0;
    end else if (fill_we) begin
      tlb[fill.vpn[IW-1:0]] <= fill;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      rr_ptr    <= '0;
      cur_we    <= 1'b0;
      cur_vaddr <= '0;
      cur_wdata <= '0;
      cur_aid   <= '0;
      resp_err  <= 1'b0;
      resp_data <= '0;
      mem_req   <= 1'b0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      fault     <= 1'b0;
    end else begin
      fault <= 1'b0;
      unique case (state)
        S_IDLE: if (pick_valid) begin
          cur       <= pick;
          cur_we    <= req[pick].wr_req;
          cur_vaddr <= req[pick].vaddr;
          cur_wdata <= req[pick].wdata;
          cur_aid   <= aid[pick];
          state     <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (allowed) begin
            mem_req   <= 1'b1;
            mem_we    <= cur_we;
            mem_addr  <= {ent.ppn, cur_vaddr[11:0]};
            mem_wdata <= cur_wdata;
            state     <= S_MEM;
          end else begin
            resp_err  <= 1'b1;
            resp_data <= '0;
            fault     <= 1'b1;
            state     <= S_RESP;
          end
        end
        S_MEM: if (mem_ack) begin
          mem_req   <= 1'b0;
          resp_err  <= 1'b0;
          resp_data <= cur_we ? '0 : mem_rdata;
          state     <= S_RESP;
        end
        S_RESP: begin
          rr_ptr <= (int'(cur) == NUM_REQ - 1) ? '0 : cur + 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < NUM_REQ; k++) begin
      rsp[k].ack   = (state == S_RESP) && (cur == RW'(k));
      rsp[k].err   = rsp[k].ack && resp_err;
      rsp[k].rdata = resp_data;
    end
  end

  // A frame keeps its request steady until it is acknowledged.
  property p_req_held(int k);
    @(posedge clk) disable iff (!rst_n)
      (req[k].rd_req || req[k].wr_req) && !rsp[k].ack |=> (req[k].rd_req || req[k].wr_req);
  endproperty
  for (genvar k = 0; k < NUM_REQ; k++) begin : g_chk
    a_req_held: assert property (p_req_held(k))
      else $error("ammu: frame %0d dropped its side-path request before ack", k);
  end

endmodule
