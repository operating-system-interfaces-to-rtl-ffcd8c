// tb_accel_framework: the framework with behavioural accelerators in its three frames
// (frame 0 adds a constant and stalls at random, frame 1 adds a constant, frame 2 uses
// the aMMU side path). A host model fills the input buffer over the 64-bit bus, sets
// routes, per-frame control and AIDs, TLB entries and CTRL over DCR, polls STATUS and
// reads the output buffer back. Every output word is checked against a model of the
// chain chosen by the route. Transactions cover: several chain orders, a single frame,
// row- and column-major feeding, 1 to 8 blocks, side-path reads and writes through the
// TLB, a refused side-path access (fault bit), a revoked mapping, and an isolated
// frame that stalls its chain until released.
module tb_accel_framework;
  import saif_pkg::*;
  localparam int NF = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic dcr_read, dcr_write, dcr_ack;
  logic [9:0] dcr_abus;
  logic [31:0] dcr_wdata, dcr_rdata;
  logic bus_en, bus_we, bus_rvalid;
  logic [7:0] bus_be;
  logic [10:0] bus_addr;
  logic [63:0] bus_wdata, bus_rdata;
  logic mem_req, mem_we, mem_ack, busy;
  logic [31:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  stream_t   frame_in [NF], frame_out [NF];
  logic      frame_in_rfd [NF], frame_out_rfd [NF];
  logic [15:0] frame_ctrl [NF];
  side_req_t frame_side_req [NF];
  side_rsp_t frame_side_rsp [NF];

  accel_framework #(.NUM_FRAMES(NF)) dut (.*);

  frame_model #(.STALL_PCT(20)) f0 (.clk, .rst_n, .ctrl(frame_ctrl[0]), .in(frame_in[0]),
    .in_rfd(frame_in_rfd[0]), .out(frame_out[0]), .out_rfd(frame_out_rfd[0]),
    .side_req(frame_side_req[0]), .side_rsp(frame_side_rsp[0]));
  frame_model f1 (.clk, .rst_n, .ctrl(frame_ctrl[1]), .in(frame_in[1]),
    .in_rfd(frame_in_rfd[1]), .out(frame_out[1]), .out_rfd(frame_out_rfd[1]),
    .side_req(frame_side_req[1]), .side_rsp(frame_side_rsp[1]));
  frame_model #(.VBASE(32'h4000_0000)) f2 (.clk, .rst_n, .ctrl(frame_ctrl[2]), .in(frame_in[2]),
    .in_rfd(frame_in_rfd[2]), .out(frame_out[2]), .out_rfd(frame_out_rfd[2]),
    .side_req(frame_side_req[2]), .side_rsp(frame_side_rsp[2]));

  int checks = 0, failures = 0;
  int n_isolated_cycles = 0;

  // system memory behind the aMMU
  logic [15:0] pmem [int];
  initial begin
    mem_ack = 0; mem_rdata = 0;
    forever begin
      @(posedge clk);
      if (mem_req && !mem_ack) begin
        repeat ($urandom_range(0, 5)) @(posedge clk);
        if (mem_we) pmem[int'(mem_addr)] = mem_wdata;
        mem_rdata <= pmem.exists(int'(mem_addr)) ? pmem[int'(mem_addr)] : 16'hBAD0;
        mem_ack <= 1;
        @(posedge clk);
        mem_ack <= 0;
      end
    end
  end

  initial begin
    #200000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dcr_wr(input logic [3:0] off, input logic [31:0] d);
    @(negedge clk); dcr_write = 1; dcr_abus = 10'h080 + 10'(off); dcr_wdata = d;
    @(negedge clk); dcr_write = 0;
  endtask

  task automatic dcr_rd(input logic [3:0] off, output logic [31:0] d);
    @(negedge clk); dcr_read = 1; dcr_abus = 10'h080 + 10'(off);
    @(negedge clk); dcr_read = 0; d = dcr_rdata;
  endtask

  logic [15:0] inbuf [512];
  logic [15:0] outbuf [512];

  task automatic load_input(input int nwords);
    for (int l = 0; l < nwords / 4; l++) begin
      @(negedge clk);
      bus_en = 1; bus_we = 1; bus_be = 8'hff; bus_addr = 11'(l * 8);
      bus_wdata = {inbuf[4*l], inbuf[4*l + 1], inbuf[4*l + 2], inbuf[4*l + 3]};
    end
    @(negedge clk); bus_en = 0; bus_we = 0;
  endtask

  task automatic read_output(input int nwords);
    for (int l = 0; l < nwords / 4; l++) begin
      @(negedge clk);
      bus_en = 1; bus_we = 0; bus_addr = 11'(1024 + l * 8);
      @(negedge clk);
      bus_en = 0;
      {outbuf[4*l], outbuf[4*l + 1], outbuf[4*l + 2], outbuf[4*l + 3]} = bus_rdata;
    end
  endtask

  // run one transaction and return the cycles from start to busy clear
  task automatic transact(input int nb, input logic col, output int cycles, output logic fault);
    logic [31:0] st;
    dcr_wr(DCR_CTRL, {25'd0, 3'(nb - 1), 2'b00, col, 1'b1});
    cycles = 0;
    do begin dcr_rd(DCR_STATUS, st); cycles += 2; end while (st[0] && cycles < 200000);
    chk(!st[0], "transaction finished");
    fault = st[1];
  endtask

  initial begin
    int cyc;
    logic flt;
    rst_n = 0; dcr_read = 0; dcr_write = 0; dcr_abus = 0; dcr_wdata = 0;
    bus_en = 0; bus_we = 0; bus_be = 0; bus_addr = 0; bus_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. feeder -> f0(+3) -> f1(+16) -> collector, 8 blocks, row-major
    for (int i = 0; i < 512; i++) inbuf[i] = 16'($urandom);
    load_input(512);
    dcr_wr(DCR_ROUTE, 32'hFFFF_2F10);
    dcr_wr(DCR_FRAME0 + 0, 32'h0000_0003);
    dcr_wr(DCR_FRAME0 + 1, 32'h0000_0010);
    transact(8, 0, cyc, flt);
    read_output(512);
    for (int i = 0; i < 512; i++) chk(outbuf[i] == inbuf[i] + 16'd19, $sformatf("chain f0,f1 word %0d", i));

    // 2. quantizer-like single frame f1 alone, 3 blocks, column-major
    for (int i = 0; i < 192; i++) inbuf[i] = 16'($urandom);
    load_input(192);
    dcr_wr(DCR_ROUTE, 32'hFFFF_2F0F);
    dcr_wr(DCR_FRAME0 + 1, 32'h0000_0005);
    transact(3, 1, cyc, flt);
    read_output(192);
    for (int i = 0; i < 192; i++) chk(outbuf[i] == inbuf[i] + 16'd5, $sformatf("f1 alone word %0d", i));

    // 3. side path: feeder -> f2 (read memory, add) -> f0 (+1) -> collector
    dcr_wr(DCR_FRAME0 + 2, {13'd0, 3'd5, 16'h8000});      // AID 5, read mode
    dcr_wr(DCR_FRAME0 + 0, 32'h0000_0001);
    dcr_wr(DCR_TLB_A, {20'h40000, 5'd0, 3'd5, 2'd0, 1'b1, 1'b1});
    dcr_wr(DCR_TLB_B, {20'h00123, 12'd0});
    for (int i = 0; i < 128; i++) begin
      inbuf[i] = 16'($urandom);
      pmem[int'({20'h00123, 12'(2 * i)})] = 16'($urandom);
    end
    load_input(128);
    dcr_wr(DCR_ROUTE, 32'hFFFF_10F3);
    transact(2, 0, cyc, flt);
    chk(!flt, "no fault with a valid mapping");
    read_output(128);
    for (int i = 0; i < 128; i++)
      chk(outbuf[i] == inbuf[i] + pmem[int'({20'h00123, 12'(2 * i)})] + 16'd1, $sformatf("side read word %0d", i));

    // 4. side-path writes: feeder -> f2 (write) -> collector
    dcr_wr(DCR_FRAME0 + 2, {13'd0, 3'd5, 16'hC000});
    dcr_wr(DCR_ROUTE, 32'hFFFF_30FF);                      // f2 <- feeder, collector <- f2
    for (int i = 0; i < 64; i++) inbuf[i] = 16'($urandom);
    load_input(64);
    transact(1, 1, cyc, flt);
    for (int i = 0; i < 64; i++)
      chk(pmem[int'({20'h00123, 12'(2 * i)})] == inbuf[i], $sformatf("side write word %0d", i));

    // 5. wrong AID: every access refused, fault reported
    dcr_wr(DCR_FRAME0 + 2, {13'd0, 3'd2, 16'h8000});
    transact(1, 0, cyc, flt);
    chk(flt, "fault bit on refused access");
    read_output(64);
    for (int i = 0; i < 64; i++) chk(outbuf[i] == 16'hDEAD, $sformatf("refused word %0d marked: %h cycles %0d", i, outbuf[i], cyc));

    // 6. revoked mapping
    dcr_wr(DCR_FRAME0 + 2, {13'd0, 3'd5, 16'h8000});
    dcr_wr(DCR_TLB_A, {20'h40000, 5'd0, 3'd5, 2'd0, 1'b1, 1'b0});
    dcr_wr(DCR_TLB_B, {20'h00123, 12'd0});
    transact(1, 0, cyc, flt);
    chk(flt, "fault after mapping revoked");

    // 7. isolation: f1 isolated, as while it is reloaded; the chain through it stalls
    //    with nothing reaching f1 or the collector, then completes once released
    dcr_wr(DCR_ROUTE, 32'hFFFF_2F10);
    dcr_wr(DCR_FRAME0 + 0, 32'h0000_0002);
    dcr_wr(DCR_FRAME0 + 1, 32'h8000_0007);
    for (int i = 0; i < 128; i++) inbuf[i] = 16'($urandom);
    load_input(128);
    dcr_wr(DCR_CTRL, {25'd0, 3'd1, 2'b00, 1'b0, 1'b1});
    begin
      int leaks;
      logic [31:0] st;
      leaks = 0;
      repeat (400) begin
        @(posedge clk);
        if (frame_in[1].valid || dut.sink_fwd[NF].valid || frame_in_rfd[1] && dut.sink_rfd[1]) leaks++;
      end
      chk(leaks == 0, $sformatf("isolated frame: %0d words leaked", leaks));
      n_isolated_cycles += 400;
      dcr_rd(DCR_STATUS, st);
      chk(st[0], "transaction held while the frame is isolated");
      dcr_rd(DCR_FRAME0 + 1, st);
      chk(st == 32'h8000_0007, "isolate bit reads back");
    end
    dcr_wr(DCR_FRAME0 + 1, 32'h0000_0007);
    begin
      logic [31:0] st;
      int polls;
      polls = 0;
      do begin dcr_rd(DCR_STATUS, st); polls++; end while (st[0] && polls < 100000);
      chk(!st[0], "transaction finished after release");
    end
    read_output(128);
    for (int i = 0; i < 128; i++) chk(outbuf[i] == inbuf[i] + 16'd9, $sformatf("after isolation word %0d", i));
    chk(n_isolated_cycles > 0, "isolation exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
