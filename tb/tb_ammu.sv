// tb_ammu: fills the four-entry TLB with mappings for different accelerator IDs, then
// has three requesters issue random reads and writes, some to mapped pages and some
// not. A memory model with random latency answers the aMMU's master port. Checks:
// translated physical address and data of every access, an error acknowledge (and no
// memory access) for unmapped pages, wrong AID, invalidated entries and writes to
// read-only pages, service of all three requesters, and the two-cycle latency of a fault.
module tb_ammu;
  import saif_pkg::*;
  localparam int NR = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, fill_we, mem_req, mem_we, mem_ack, fault;
  tlb_fill_t fill;
  logic [2:0] aid [NR];
  side_req_t req [NR];
  side_rsp_t rsp [NR];
  logic [31:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;

  ammu #(.NUM_REQ(NR), .TLB_ENTRIES(4)) dut (.*);

  int checks = 0, failures = 0;

  // reference TLB
  tlb_fill_t ref_tlb [4];

  // memory model: halfword store keyed by physical address
  logic [15:0] pmem [int];
  int mem_accesses = 0;
  initial begin
    mem_ack = 0; mem_rdata = 0;
    forever begin
      @(posedge clk);
      if (mem_req && !mem_ack) begin
        repeat ($urandom_range(0, 4)) @(posedge clk);
        mem_accesses++;
        if (mem_we) pmem[int'(mem_addr)] = mem_wdata;
        mem_rdata <= pmem.exists(int'(mem_addr)) ? pmem[int'(mem_addr)] : 16'(mem_addr ^ 32'h5a5a);
        mem_ack <= 1;
        @(posedge clk);
        mem_ack <= 0;
      end
    end
  end

  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_fill(input logic [19:0] vpn, input logic [19:0] ppn, input logic [2:0] a,
                         input logic w, input logic v);
    @(negedge clk);
    fill_we = 1; fill = '{valid: v, writable: w, aid: a, vpn: vpn, ppn: ppn};
    ref_tlb[vpn[1:0]] = fill;
    @(negedge clk);
    fill_we = 0;
  endtask

  // reference memory
  logic [15:0] shadow [int];
  int served [NR];
  int faults_seen = 0, ok_seen = 0;

  task automatic requester(input int r, input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] va;
      logic we, okexp;
      logic [31:0] pa;
      tlb_fill_t e;
      logic [15:0] wd, expd;
      int lat;
      // pick a page: mostly ones in the TLB, sometimes random
      va = {($urandom_range(0, 3) == 0) ? 20'($urandom) : ref_tlb[$urandom_range(0, 3)].vpn,
            11'($urandom), 1'b0};
      we = 1'($urandom);
      wd = 16'($urandom);
      @(negedge clk);
      req[r] = '{rd_req: !we, wr_req: we, vaddr: va, wdata: wd};
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!rsp[r].ack);
      e = ref_tlb[va[13:12]];
      okexp = e.valid && e.vpn == va[31:12] && e.aid == aid[r] && (!we || e.writable);
      pa = {e.ppn, va[11:0]};
      checks++;
      if (rsp[r].err !== !okexp) begin
        failures++; $display("req %0d va %h we %b: err %b expected %b", r, va, we, rsp[r].err, !okexp);
      end
      if (okexp) begin
        ok_seen++;
        if (we) shadow[int'(pa)] = wd;
        else begin
          expd = shadow.exists(int'(pa)) ? shadow[int'(pa)] : 16'(pa ^ 32'h5a5a);
          checks++;
          if (rsp[r].rdata !== expd) begin
            failures++; $display("req %0d read va %h pa %h got %h exp %h", r, va, pa, rsp[r].rdata, expd);
          end
        end
      end else faults_seen++;
      served[r]++;
      @(posedge clk); #1;   // a registered requester drops the request after seeing ack
      req[r] = SIDE_REQ_IDLE;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 0; fill_we = 0; fill = '0;
    aid = '{3'd1, 3'd2, 3'd5};
    for (int r = 0; r < NR; r++) req[r] = SIDE_REQ_IDLE;
    for (int e = 0; e < 4; e++) ref_tlb[e] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // an unfilled TLB refuses everything; a fault is acknowledged at the second clock edge after the request
    begin
      int lat;
      @(negedge clk);
      req[0] = '{rd_req: 1, wr_req: 0, vaddr: 32'h0000_1000, wdata: 0};
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!rsp[0].ack);
      checks++;
      if (!rsp[0].err || lat != 2) begin failures++; $display("empty TLB: err %b latency %0d", rsp[0].err, lat); end
      @(posedge clk); #1; req[0] = SIDE_REQ_IDLE;
    end
    do_fill(20'h10000, 20'h00100, 3'd1, 1, 1);
    do_fill(20'h10001, 20'h00200, 3'd2, 0, 1);   // read-only for AID 2
    do_fill(20'h20002, 20'h00300, 3'd5, 1, 1);
    do_fill(20'h30003, 20'h00400, 3'd1, 1, 1);
    fork
      requester(0, 150);
      requester(1, 150);
      requester(2, 150);
    join
    // revoke entry 0 and check it is refused
    do_fill(20'h10000, 20'h00100, 3'd1, 1, 0);
    requester(0, 20);
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (served[r] < 150) begin failures++; $display("requester %0d starved", r); end
    end
    checks++;
    if (faults_seen == 0 || ok_seen == 0) begin failures++; $display("faults %0d ok %0d", faults_seen, ok_seen); end
    checks++;
    if (mem_accesses != ok_seen) begin failures++; $display("memory accesses %0d, allowed %0d", mem_accesses, ok_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
