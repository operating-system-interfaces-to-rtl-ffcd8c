// tb_jpeg_accel_top: end-to-end test of the JPEG accelerator framework at its default
// size (8-block buffers, three frames, four-entry TLB). A host model drives the DCR and
// bus ports; a behavioural accelerator (frame_model) sits in the open frame 2 and a
// memory model answers the aMMU. Transactions:
//   T1  DCT -> quantizer chain on 8 macroblocks fed column-major: every quantized
//       coefficient within 1 of a double-precision DCT followed by quantization;
//   T2  DCT alone on the same blocks, row-major: coefficients within 1 of the reference,
//       and the transaction time checked against the DCT's 192-cycle block period;
//   T3  quantizer alone on T2's coefficients: exact against an integer model;
//   T4  DCT -> quantizer -> frame 2, which adds a value it reads through the aMMU;
//   T5  the same with frame 2 under a wrong AID: refused accesses and the fault bit.
// Mechanisms counted, each must occur: backpressure (RFD low against a valid word),
// stall (valid low inside a block), route switch, column-major feed, multi-block
// transaction, TLB fill, translated side-path access, refused side-path access.
module tb_jpeg_accel_top;
  import saif_pkg::*;
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
  stream_t x_in, x_out;
  logic x_in_rfd, x_out_rfd;
  logic [15:0] x_ctrl;
  side_req_t x_side_req;
  side_rsp_t x_side_rsp;

  jpeg_accel_top dut (.*);

  frame_model #(.VBASE(32'h1000_0000)) xacc (.clk, .rst_n, .ctrl(x_ctrl), .in(x_in),
    .in_rfd(x_in_rfd), .out(x_out), .out_rfd(x_out_rfd), .side_req(x_side_req), .side_rsp(x_side_rsp));

  int checks = 0, failures = 0;

  // ---- memory behind the aMMU
  logic [15:0] pmem [int];
  initial begin
    mem_ack = 0; mem_rdata = 0;
    forever begin
      @(posedge clk);
      if (mem_req && !mem_ack) begin
        repeat ($urandom_range(1, 6)) @(posedge clk);
        if (mem_we) pmem[int'(mem_addr)] = mem_wdata;
        mem_rdata <= pmem.exists(int'(mem_addr)) ? pmem[int'(mem_addr)] : 16'h0;
        mem_ack <= 1;
        @(posedge clk);
        mem_ack <= 0;
      end
    end
  end

  // ---- mechanism monitors
  int n_backpressure = 0, n_stall = 0, n_route_switch = 0, n_colmajor = 0, n_multiblock = 0;
  int n_tlb_fill = 0, n_side_ok = 0, n_side_fault = 0;
  logic in_block = 0;
  logic [31:0] last_route;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fw.src_fwd[0].valid && !dut.u_fw.src_rfd[0]) n_backpressure++;
    if (dut.u_fw.sink_fwd[3].valid && dut.u_fw.sink_fwd[3].done) in_block <= 0;
    else if (dut.u_fw.sink_fwd[3].valid && dut.u_fw.sink_fwd[3].start) in_block <= 1;
    if (in_block && !dut.u_fw.sink_fwd[3].valid) n_stall++;
    if (dut.u_fw.route != last_route) n_route_switch++;
    last_route <= dut.u_fw.route;
    if (dut.u_fw.start && dut.u_fw.col_major) n_colmajor++;
    if (dut.u_fw.start && dut.u_fw.nblocks_m1 != 0) n_multiblock++;
    if (dut.u_fw.tlb_fill_we) n_tlb_fill++;
    if (x_side_rsp.ack && !x_side_rsp.err) n_side_ok++;
    if (x_side_rsp.ack && x_side_rsp.err) n_side_fault++;
  end

  initial begin
    #400000000 failures++;
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

  task automatic load_input();
    for (int l = 0; l < 128; l++) begin
      @(negedge clk);
      bus_en = 1; bus_we = 1; bus_be = 8'hff; bus_addr = 11'(l * 8);
      bus_wdata = {inbuf[4*l], inbuf[4*l + 1], inbuf[4*l + 2], inbuf[4*l + 3]};
    end
    @(negedge clk); bus_en = 0; bus_we = 0;
  endtask

  task automatic read_output();
    for (int l = 0; l < 128; l++) begin
      @(negedge clk);
      bus_en = 1; bus_we = 0; bus_addr = 11'(1024 + l * 8);
      @(negedge clk);
      bus_en = 0;
      {outbuf[4*l], outbuf[4*l + 1], outbuf[4*l + 2], outbuf[4*l + 3]} = bus_rdata;
    end
  endtask

  // start, then poll STATUS; cycles from the start pulse to the completion pulse
  time t_start, t_done;
  always @(posedge clk) begin
    if (dut.u_fw.start) t_start = $time;
    if (dut.u_fw.complete) t_done = $time;
  end

  task automatic transact(input logic col, output logic fault);
    logic [31:0] st;
    int polls;
    dcr_wr(DCR_CTRL, {25'd0, 3'd7, 2'b00, col, 1'b1});
    polls = 0;
    do begin dcr_rd(DCR_STATUS, st); polls++; end while (st[0] && polls < 20000);
    chk(!st[0], "transaction finished");
    fault = st[1];
  endtask

  // ---- reference model
  int  samp [512];
  real dct_ref [512];

  function automatic real cc(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  task automatic make_ref();
    real pi, s;
    pi = 3.14159265358979323846;
    for (int b = 0; b < 8; b++)
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          s = 0.0;
          for (int x = 0; x < 8; x++)
            for (int y = 0; y < 8; y++)
              s += samp[b*64 + x*8 + y] * $cos((2*x + 1) * u * pi / 16.0) * $cos((2*y + 1) * v * pi / 16.0);
          dct_ref[b*64 + u*8 + v] = 0.25 * cc(u) * cc(v) * s;
        end
  endtask

  int lum [64] = '{16, 11, 10, 16, 24, 40, 51, 61, 12, 12, 14, 19, 26, 58, 60, 55,
                   14, 13, 16, 24, 40, 57, 69, 56, 14, 17, 22, 29, 51, 87, 80, 62,
                   18, 22, 37, 56, 68, 109, 103, 77, 24, 35, 55, 64, 81, 104, 113, 92,
                   49, 64, 78, 87, 103, 121, 120, 101, 72, 92, 95, 98, 112, 100, 103, 99};

  function automatic int quant(int x, int pos);
    int q, a;
    q = (lum[pos] * 50 + 50) / 100;       // quality 75
    a = (x < 0) ? -x : x;
    a = (a + q / 2) / q;
    return (x < 0) ? -a : a;
  endfunction

  function automatic int rnd(real r);
    return int'($rtoi(r + (r >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic int sx(logic [15:0] v);
    return int'($signed(v));
  endfunction

  initial begin
    logic flt;
    int exact, period;
    int dct_out [512];
    rst_n = 0; dcr_read = 0; dcr_write = 0; dcr_abus = 0; dcr_wdata = 0;
    bus_en = 0; bus_we = 0; bus_be = 0; bus_addr = 0; bus_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    last_route = dut.u_fw.route;

    // image-like 12-bit samples: a smooth ramp per block plus noise, level-shifted
    for (int b = 0; b < 8; b++)
      for (int i = 0; i < 64; i++) begin
        samp[b*64 + i] = (b * 37 + (i / 8) * 9 + (i % 8) * (b - 3) * 3) % 1200 - 600
                         + $urandom_range(0, 200) - 100;
        inbuf[b*64 + i] = 16'(samp[b*64 + i]);
      end
    make_ref();
    load_input();

    // T1: JPEG chain, column-major feed
    dcr_wr(DCR_ROUTE, 32'hFFFF_2F10);
    transact(1'b1, flt);
    read_output();
    exact = 0;
    for (int i = 0; i < 512; i++) begin
      int r, g, d;
      r = quant(rnd(dct_ref[i]), i % 64);
      g = sx(outbuf[i]);
      d = (g > r) ? g - r : r - g;
      if (d == 0) exact++;
      chk(d <= 1, $sformatf("T1 coefficient %0d: %0d, reference %0d", i, g, r));
    end
    chk(exact >= 500, $sformatf("T1 exact matches %0d of 512", exact));

    // T2: DCT alone
    dcr_wr(DCR_ROUTE, 32'hFFFF_1FF0);
    transact(1'b0, flt);
    period = int'((t_done - t_start) / 10);
    chk(period >= 8 * 192 && period <= 8 * 192 + 4, $sformatf("T2 took %0d cycles for 8 blocks", period));
    read_output();
    for (int i = 0; i < 512; i++) begin
      int d;
      dct_out[i] = sx(outbuf[i]);
      d = dct_out[i] - rnd(dct_ref[i]);
      chk(d >= -1 && d <= 1, $sformatf("T2 coefficient %0d: %0d, reference %f", i, dct_out[i], dct_ref[i]));
    end

    // T3: quantizer alone on the DCT output
    for (int i = 0; i < 512; i++) inbuf[i] = 16'(dct_out[i]);
    load_input();
    dcr_wr(DCR_ROUTE, 32'hFFFF_2F0F);
    transact(1'b0, flt);
    read_output();
    for (int i = 0; i < 512; i++)
      chk(sx(outbuf[i]) == quant(dct_out[i], i % 64), $sformatf("T3 word %0d", i));

    // T4: DCT -> quantizer -> frame 2 adding a value read through the aMMU
    for (int i = 0; i < 512; i++) inbuf[i] = 16'(samp[i]);
    load_input();
    dcr_wr(DCR_TLB_A, {20'h10000, 5'd0, 3'd3, 2'd0, 1'b0, 1'b1});   // read-only, AID 3
    dcr_wr(DCR_TLB_B, {20'h00777, 12'd0});
    for (int i = 0; i < 512; i++) pmem[int'({20'h00777, 12'(2 * i)})] = 16'($urandom_range(0, 999));
    dcr_wr(DCR_FRAME0 + 2, {13'd0, 3'd3, 16'h8000});
    dcr_wr(DCR_ROUTE, 32'hFFFF_3210);
    transact(1'b0, flt);
    chk(!flt, "T4 no fault");
    read_output();
    for (int i = 0; i < 512; i++) begin
      int r, g, d;
      r = quant(rnd(dct_ref[i]), i % 64) + int'(pmem[int'({20'h00777, 12'(2 * i)})]);
      g = sx(outbuf[i]);
      d = (g > r) ? g - r : r - g;
      chk(d <= 1, $sformatf("T4 word %0d: %0d, reference %0d", i, g, r));
    end

    // T5: wrong AID
    dcr_wr(DCR_FRAME0 + 2, {13'd0, 3'd4, 16'h8000});
    transact(1'b0, flt);
    chk(flt, "T5 fault reported");
    read_output();
    for (int i = 0; i < 512; i++) chk(outbuf[i] == 16'hDEAD, $sformatf("T5 word %0d refused", i));

    $display("mechanisms: backpressure %0d, stall %0d, route switch %0d, column-major %0d, multi-block %0d, TLB fill %0d, side-path ok %0d, side-path fault %0d",
             n_backpressure, n_stall, n_route_switch, n_colmajor, n_multiblock, n_tlb_fill, n_side_ok, n_side_fault);
    chk(n_backpressure > 0, "backpressure occurred");
    chk(n_stall > 0, "stall occurred");
    chk(n_route_switch > 0, "route switch occurred");
    chk(n_colmajor > 0, "column-major feed occurred");
    chk(n_multiblock > 0, "multi-block transaction occurred");
    chk(n_tlb_fill > 0, "TLB fill occurred");
    chk(n_side_ok > 0, "translated side-path access occurred");
    chk(n_side_fault > 0, "refused side-path access occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
