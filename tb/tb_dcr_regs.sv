// tb_dcr_regs: exercises the DCR register block through its bus: acknowledge timing,
// decode of the base address, route and per-frame register read-back, the start pulse
// with its mode and block-count fields, busy set by start and cleared by complete,
// start ignored while busy, the sticky fault bit, and the two-write TLB fill; then
// random register traffic checked against a register model (including the isolate bit).
module tb_dcr_regs;
  import saif_pkg::*;
  localparam int NF = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, dcr_read, dcr_write, dcr_ack, complete, fault, start, col_major, busy, tlb_fill_we;
  logic [9:0] dcr_abus;
  logic [31:0] dcr_wdata, dcr_rdata, route;
  logic [2:0] nblocks_m1;
  logic [15:0] frame_ctrl [NF];
  logic [2:0] frame_aid [NF];
  logic frame_iso [NF];
  tlb_fill_t tlb_fill;

  dcr_regs #(.NUM_FRAMES(NF), .DCR_BASE(10'h080)) dut (.*);

  int checks = 0, failures = 0;
  int starts = 0, fills = 0;
  always @(posedge clk) begin
    if (start) starts++;
    if (tlb_fill_we) fills++;
  end

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dwr(input logic [9:0] a, input logic [31:0] d);
    @(negedge clk); dcr_write = 1; dcr_abus = a; dcr_wdata = d;
    @(negedge clk); dcr_write = 0;
    chk(dcr_ack == (a[9:4] == 6'h08), $sformatf("write ack at %h", a));
  endtask

  task automatic drd(input logic [9:0] a, output logic [31:0] d);
    @(negedge clk); dcr_read = 1; dcr_abus = a;
    @(negedge clk); dcr_read = 0;
    chk(dcr_ack == (a[9:4] == 6'h08), $sformatf("read ack at %h", a));
    d = dcr_rdata;
  endtask

  initial begin
    logic [31:0] d;
    rst_n = 0; dcr_read = 0; dcr_write = 0; dcr_abus = 0; dcr_wdata = 0; complete = 0; fault = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(route == 32'hFFFF_3210, "reset route chains feeder-frames-collector");
    drd(10'h081, d); chk(d[0] == 0, "idle after reset");
    // route register
    dwr(10'h082, 32'hFFFF_F130);
    chk(route == 32'hFFFF_F130, "route written");
    drd(10'h082, d); chk(d == 32'hFFFF_F130, "route read back");
    // other base is ignored
    dwr(10'h0C2, 32'h0);
    chk(route == 32'hFFFF_F130, "foreign address ignored");
    // per-frame control and AID
    for (int i = 0; i < NF; i++) dwr(10'h088 + 10'(i), {13'd0, 3'(i + 4), 16'hA000 + 16'(i)});
    for (int i = 0; i < NF; i++) begin
      chk(frame_ctrl[i] == 16'hA000 + 16'(i) && frame_aid[i] == 3'(i + 4), "frame ctrl/aid outputs");
      drd(10'h088 + 10'(i), d); chk(d == {13'd0, 3'(i + 4), 16'hA000 + 16'(i)}, "frame register read back");
    end
    // start: 5 blocks, column-major
    fault = 0;
    dwr(10'h080, 32'h0000_0043);
    chk(start && starts == 0 && col_major && nblocks_m1 == 3'd4 && busy, "start with mode and count");
    drd(10'h081, d); chk(d[0] == 1, "status busy");
    dwr(10'h080, 32'h0000_0001);
    chk(!start && starts == 1 && col_major, "start ignored while busy");
    @(negedge clk); fault = 1; @(negedge clk); fault = 0;
    @(negedge clk); complete = 1; @(negedge clk); complete = 0;
    drd(10'h081, d); chk(d[1:0] == 2'b10, "busy cleared by complete, fault sticky");
    dwr(10'h080, 32'h0000_0001);
    chk(start && starts == 1 && !col_major && nblocks_m1 == 0, "second start");
    drd(10'h081, d); chk(d[1:0] == 2'b01, "fault cleared by start");
    @(negedge clk); complete = 1; @(negedge clk); complete = 0;
    // TLB fill: first write holds, second installs
    dwr(10'h083, {20'hABCDE, 5'd0, 3'd6, 2'd0, 1'b1, 1'b1});
    chk(!tlb_fill_we && fills == 0, "no fill after first half");
    dwr(10'h084, {20'h12345, 12'd0});
    chk(tlb_fill_we && fills == 0, "fill after second half");
    chk(tlb_fill.vpn == 20'hABCDE && tlb_fill.ppn == 20'h12345 && tlb_fill.aid == 3'd6
        && tlb_fill.writable && tlb_fill.valid, "fill contents");
    // random register traffic against a model: legal chain routes, frame registers,
    // TLB fills with random contents, reads of every register and of foreign addresses
    begin
      logic [31:0] m_route, m_frame [NF];
      int nf0;
      m_route = route;
      for (int i = 0; i < NF; i++) m_frame[i] = {frame_iso[i], 12'd0, frame_aid[i], frame_ctrl[i]};
      for (int it = 0; it < 400; it++) begin
        case ($urandom_range(0, 4))
          0: begin   // a chain through a random ordered subset of the frames
            int ord [NF];
            int n, tmp, j, prev;
            for (int i = 0; i < NF; i++) ord[i] = i;
            for (int i = NF - 1; i > 0; i--) begin
              j = $urandom_range(0, i); tmp = ord[i]; ord[i] = ord[j]; ord[j] = tmp;
            end
            n = $urandom_range(0, NF);
            m_route = 32'hFFFF_FFFF;
            prev = 0;                                  // feeder
            for (int k = 0; k < n; k++) begin
              m_route[4*ord[k] +: 4] = 4'(prev);
              prev = ord[k] + 1;
            end
            m_route[4*NF +: 4] = 4'(prev);             // collector
            dwr(10'h082, m_route);
          end
          1: begin
            int f;
            f = $urandom_range(0, NF - 1);
            d = $urandom;
            m_frame[f] = {d[31], 12'd0, d[18:0]};
            dwr(10'h088 + 10'(f), d);
          end
          2: begin
            logic [31:0] a, b;
            int f0;
            a = $urandom; b = $urandom;
            f0 = fills;
            dwr(10'h083, a);
            chk(!tlb_fill_we && fills == f0, "random fill: nothing after first half");
            dwr(10'h084, b);
            chk(tlb_fill_we && tlb_fill.vpn == a[31:12] && tlb_fill.aid == a[6:4]
                && tlb_fill.writable == a[1] && tlb_fill.valid == a[0] && tlb_fill.ppn == b[31:12],
                "random fill contents");
          end
          3: begin
            int f;
            f = $urandom_range(0, NF - 1);
            drd(10'h088 + 10'(f), d);
            chk(d == m_frame[f], $sformatf("frame %0d register read", f));
          end
          default: begin
            logic [9:0] a;
            a = 10'($urandom);
            if (a[9:4] == 6'h08) a[9:4] = 6'h09;
            drd(a, d);
            chk(d == 0, "foreign read returns 0");
          end
        endcase
        chk(route == m_route, "route output follows model");
        for (int i = 0; i < NF; i++)
          chk(frame_ctrl[i] == m_frame[i][15:0] && frame_aid[i] == m_frame[i][18:16]
              && frame_iso[i] == m_frame[i][31], "frame outputs follow model");
        drd(10'h082, d); chk(d == m_route, "route read back");
        drd(10'h081, d); chk(d[0] == 0, "stays idle");
      end
      nf0 = starts;
      chk(nf0 == 2, "no stray start pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
