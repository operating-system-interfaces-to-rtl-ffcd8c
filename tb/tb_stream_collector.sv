// tb_stream_collector: streams blocks with random addresses and gaps into the
// collector, checks each buffer write (address, data), that RFD stays high, and that
// complete pulses exactly once, in the cycle after the last expected done word.
module tb_stream_collector;
  import saif_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, complete, in_rfd, buf_en, buf_we;
  logic [2:0] nblocks_m1;
  logic [8:0] words_seen, buf_addr;
  logic [15:0] buf_wdata;
  stream_t in;

  stream_collector dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nb);
    int completes;
    completes = 0;
    @(negedge clk);
    start = 1; nblocks_m1 = 3'(nb - 1);
    @(negedge clk);
    start = 0;
    for (int k = 0; k < nb * 64; k++) begin
      while ($urandom_range(0, 3) == 0) begin
        in = STREAM_IDLE; #1;
        checks++; if (buf_en) begin failures++; $display("write without valid"); end
        @(negedge clk);
        if (complete) completes++;
      end
      in.valid = 1; in.start = (k % 64 == 0); in.done = (k % 64 == 63);
      in.addr = 9'($urandom); in.data = 16'($urandom);
      #1;
      checks++;
      if (!in_rfd || !buf_en || !buf_we || buf_addr !== in.addr || buf_wdata !== in.data) begin
        failures++; $display("word %0d not written as presented", k);
      end
      @(negedge clk);
      if (complete) completes++;
      if (k == nb * 64 - 1) begin
        checks++;
        if (!complete) begin failures++; $display("complete missing after last word"); end
      end
    end
    in = STREAM_IDLE;
    repeat (3) begin @(negedge clk); if (complete) completes++; end
    checks++;
    if (completes != 1 || busy) begin failures++; $display("completes=%0d busy=%b", completes, busy); end
    checks++;
    if (words_seen !== 9'(nb * 64)) begin failures++; $display("words_seen %0d", words_seen); end
  endtask

  initial begin
    rst_n = 0; start = 0; nblocks_m1 = 0; in = STREAM_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1); run(8); run(3);
    for (int t = 0; t < 5; t++) run($urandom_range(1, 7));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
