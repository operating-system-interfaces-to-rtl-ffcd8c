// tb_jpeg_workload: the JPEG encoding workload, one macroblock per accelerator call,
// plus the host-to-buffer transfer sweep, on the top at its default size.
//
// Part A: 11,900 calls, the number a 1.4 MB test bitmap needs. Each call writes one
// 8x8 block of level-shifted 8-bit samples (a synthetic 800-pixel-wide image: smooth
// shading, edges and noise) into the input buffer, runs the DCT -> quantizer chain
// for one block, polls until idle and reads the 64 quantized coefficients back. Every
// coefficient is compared with a double-precision DCT followed by quality-75
// quantization (within 1). The accelerator time of every call, start pulse to
// completion pulse, is checked against the DCT's 3 x 64-cycle block period.
//
// Part B: transfers of 4 to 512 bytes in 4-byte steps through the 64-bit bus window
// into the input buffer, using byte enables for a final half word, each read back
// and compared, with the bytes past the end checked to be untouched.
module tb_jpeg_workload;
  import saif_pkg::*;
  localparam int NCALLS = 11900;
  localparam int WIDTH_BLOCKS = 100;    // 800-pixel-wide image

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

  // frame 2 is not on the route here; it stays idle
  assign x_in_rfd   = 1'b0;
  assign x_out      = STREAM_IDLE;
  assign x_side_req = SIDE_REQ_IDLE;
  assign mem_ack    = 1'b0;
  assign mem_rdata  = '0;

  int checks = 0, failures = 0;

  initial begin
    #200000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic dcr_wr(input logic [3:0] off, input logic [31:0] d);
    @(negedge clk); dcr_write = 1; dcr_abus = 10'h080 + 10'(off); dcr_wdata = d;
    @(negedge clk); dcr_write = 0;
  endtask

  task automatic dcr_rd(input logic [3:0] off, output logic [31:0] d);
    @(negedge clk); dcr_read = 1; dcr_abus = 10'h080 + 10'(off);
    @(negedge clk); dcr_read = 0; d = dcr_rdata;
  endtask

  task automatic bus_write(input logic [10:0] a, input logic [7:0] be, input logic [63:0] d);
    @(negedge clk); bus_en = 1; bus_we = 1; bus_be = be; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_en = 0; bus_we = 0;
  endtask

  task automatic bus_read(input logic [10:0] a, output logic [63:0] d);
    @(negedge clk); bus_en = 1; bus_we = 0; bus_addr = a;
    @(negedge clk); bus_en = 0; d = bus_rdata;
  endtask

  // accelerator time per call
  time t_start, t_done;
  always @(posedge clk) begin
    if (dut.u_fw.start) t_start = $time;
    if (dut.u_fw.complete) t_done = $time;
  end

  // ---- reference: separable double-precision DCT and quality-75 quantization
  real ctab [8][8];   // ctab[k][n] = 0.5 C(k) cos((2n+1) k pi / 16)
  int lum [64] = '{16, 11, 10, 16, 24, 40, 51, 61, 12, 12, 14, 19, 26, 58, 60, 55,
                   14, 13, 16, 24, 40, 57, 69, 56, 14, 17, 22, 29, 51, 87, 80, 62,
                   18, 22, 37, 56, 68, 109, 103, 77, 24, 35, 55, 64, 81, 104, 113, 92,
                   49, 64, 78, 87, 103, 121, 120, 101, 72, 92, 95, 98, 112, 100, 103, 99};

  function automatic int quant(real x, int pos);
    int q, a, r;
    r = int'($rtoi(x + (x >= 0 ? 0.5 : -0.5)));
    q = (lum[pos] * 50 + 50) / 100;
    a = (r < 0) ? -r : r;
    a = (a + q / 2) / q;
    return (r < 0) ? -a : a;
  endfunction

  // synthetic image sample at pixel (px, py), 0..255
  function automatic int pixel(int px, int py);
    int v;
    v = 40 + (px * 3) / 5 + (py * 2) / 5;               // shading
    if (((px / 37) + (py / 29)) % 5 == 0) v += 70;      // patches with sharp edges
    v += ((px * 7 + py * 13) % 17) - 8;                 // fine texture
    v += int'($urandom_range(0, 10)) - 5;               // noise
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  int  samp [64];
  real tmp [64];
  real ref_dct [64];
  logic [15:0] blk_out [64];

  initial begin
    int bx, by, exact, dmax, period, pmin, pmax, polls;
    logic [31:0] st;
    logic [63:0] d;
    logic [7:0] shadow [1024];
    real pi;

    pi = 3.14159265358979323846;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        ctab[k][n] = 0.5 * ((k == 0) ? 1.0 / $sqrt(2.0) : 1.0) * $cos((2*n + 1) * k * pi / 16.0);

    rst_n = 0; dcr_read = 0; dcr_write = 0; dcr_abus = 0; dcr_wdata = 0;
    bus_en = 0; bus_we = 0; bus_be = 0; bus_addr = 0; bus_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- Part A: JPEG, one macroblock per call
    dcr_wr(DCR_ROUTE, 32'hFFFF_2F10);
    exact = 0; dmax = 0; pmin = 1 << 30; pmax = 0;
    for (int c = 0; c < NCALLS; c++) begin
      bx = c % WIDTH_BLOCKS;
      by = c / WIDTH_BLOCKS;
      for (int i = 0; i < 64; i++) samp[i] = pixel(bx * 8 + i % 8, by * 8 + i / 8) - 128;
      for (int l = 0; l < 16; l++)
        bus_write(11'(l * 8), 8'hff, {16'(samp[4*l]), 16'(samp[4*l + 1]),
                                      16'(samp[4*l + 2]), 16'(samp[4*l + 3])});
      dcr_wr(DCR_CTRL, 32'h1);
      polls = 0;
      do begin dcr_rd(DCR_STATUS, st); polls++; end while (st[0] && polls < 1000);
      chk(!st[0], $sformatf("call %0d finished", c));
      period = int'((t_done - t_start) / 10);
      if (period < pmin) pmin = period;
      if (period > pmax) pmax = period;
      chk(period >= 192 && period <= 196, $sformatf("call %0d took %0d cycles", c, period));
      for (int l = 0; l < 16; l++) begin
        bus_read(11'(1024 + l * 8), d);
        {blk_out[4*l], blk_out[4*l + 1], blk_out[4*l + 2], blk_out[4*l + 3]} = d;
      end
      // reference
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) begin
          tmp[r*8 + k] = 0.0;
          for (int n = 0; n < 8; n++) tmp[r*8 + k] += samp[r*8 + n] * ctab[k][n];
        end
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          ref_dct[u*8 + v] = 0.0;
          for (int r = 0; r < 8; r++) ref_dct[u*8 + v] += tmp[r*8 + v] * ctab[u][r];
        end
      for (int i = 0; i < 64; i++) begin
        int g, rq, df;
        g  = int'($signed(blk_out[i]));
        rq = quant(ref_dct[i], i);
        df = (g > rq) ? g - rq : rq - g;
        if (df == 0) exact++;
        if (df > dmax) dmax = df;
        chk(df <= 1, $sformatf("call %0d coefficient %0d: %0d, reference %0d", c, i, g, rq));
      end
    end
    $display("JPEG workload: %0d calls, %0d of %0d coefficients exact, largest difference %0d, %0d..%0d accelerator cycles per call",
             NCALLS, exact, NCALLS * 64, dmax, pmin, pmax);
    chk(exact >= NCALLS * 64 * 98 / 100, "at least 98% of coefficients exact");

    // ---- Part B: transfer sizes 4..512 bytes
    for (int n = 4; n <= 512; n += 4) begin
      // background pattern over the first 1 KB
      for (int l = 0; l < 128; l++) begin
        d = {$urandom, $urandom};
        bus_write(11'(l * 8), 8'hff, d);
        for (int b = 0; b < 8; b++) shadow[l*8 + b] = d[63 - 8*b -: 8];
      end
      // the transfer itself
      for (int l = 0; l * 8 < n; l++) begin
        logic [7:0] be;
        d = {$urandom, $urandom};
        be = (n - l * 8 >= 8) ? 8'hff : 8'hf0;     // a final 4-byte word uses the low addresses
        bus_write(11'(l * 8), be, d);
        for (int b = 0; b < 8; b++) if (be[7 - b]) shadow[l*8 + b] = d[63 - 8*b -: 8];
      end
      // read back the transfer and the rest of its 64-bit line and the next line
      for (int l = 0; l * 8 < n + 8 && l < 128; l++) begin
        bus_read(11'(l * 8), d);
        for (int b = 0; b < 8; b++)
          chk(d[63 - 8*b -: 8] == shadow[l*8 + b], $sformatf("transfer %0d bytes: byte %0d", n, l*8 + b));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
