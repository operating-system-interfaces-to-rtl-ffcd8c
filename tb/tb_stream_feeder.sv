// tb_stream_feeder: drives the feeder against a model of the input buffer's registered
// read port. Each transaction picks a block count, an order (row- or column-major) and
// an RFD pattern; every word the sink takes is checked for data, address, start and done
// flags and position in the expected walk, words held under backpressure are checked
// to stay put, and a transaction with RFD always high must take exactly 64 cycles per
// block.
module tb_stream_feeder;
  import saif_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, col_major, busy, buf_en, out_rfd;
  logic [2:0] nblocks_m1;
  logic [8:0] buf_addr;
  logic [15:0] buf_rdata;
  stream_t out;

  stream_feeder dut (.*);

  logic [15:0] mem [512];
  always_ff @(posedge clk) if (buf_en) buf_rdata <= mem[buf_addr];

  int checks = 0, failures = 0;

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nb, input logic col, input int rfd_pct);
    int k, cycles, stalls;
    stream_t held;
    logic was_stalled;
    k = 0; cycles = 0; stalls = 0; was_stalled = 0;
    @(negedge clk);
    start = 1; col_major = col; nblocks_m1 = 3'(nb - 1);
    @(negedge clk);
    start = 0;
    while (k < nb * 64) begin
      out_rfd = ($urandom_range(0, 99) < rfd_pct);
      #1;
      if (was_stalled) begin
        checks++;
        if (out !== held) begin failures++; $display("word changed under backpressure"); end
      end
      if (out.valid && out_rfd) begin
        int b, r, c, a;
        b = k / 64; r = (k % 64) / 8; c = k % 8;
        a = col ? b*64 + c*8 + r : b*64 + r*8 + c;
        checks++;
        if (out.addr !== 9'(a) || out.data !== mem[a] || out.start !== (k % 64 == 0)
            || out.done !== (k % 64 == 63)) begin
          failures++;
          $display("word %0d: addr %0d data %h start %b done %b, expected addr %0d data %h",
                   k, out.addr, out.data, out.start, out.done, a, mem[a]);
        end
        k++;
      end
      was_stalled = out.valid && !out_rfd;
      held = out;
      if (was_stalled) stalls++;
      @(negedge clk);
      cycles++;
      if (cycles > 100000) break;
    end
    #1;
    checks++;
    if (busy || out.valid) begin failures++; $display("feeder still busy after last word"); end
    if (rfd_pct == 100) begin
      checks++;
      if (cycles != nb * 64) begin failures++; $display("rate: %0d words took %0d cycles", nb*64, cycles); end
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) mem[i] = 16'($urandom);
    rst_n = 0; start = 0; col_major = 0; nblocks_m1 = 0; out_rfd = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 0, 100);
    run(8, 1, 100);
    run(3, 0, 60);
    run(2, 1, 30);
    for (int t = 0; t < 6; t++) run($urandom_range(1, 8), 1'($urandom), $urandom_range(20, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
