// tb_quant_accel: streams random coefficients (full 16-bit range, small values near
// the rounding points, and the extremes) at random positions through the quantizer
// with random input gaps and random RFD. Each result is compared with an integer model
// built here from the JPEG luminance table at quality 75; the test also checks the
// one-cycle latency, that start/done/address travel with the data, that nothing is
// lost or repeated under backpressure, and a second instance at QUALITY = 100 that must
// pass values through unchanged, and a seven-word block with a stall and two cycles
// of backpressure as in the framework's reference timing diagram.
module tb_quant_accel;
  import saif_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_rfd, out_rfd, in_rfd100, out_rfd100;
  logic [15:0] ctrl;
  stream_t in, out, in100, out100;

  quant_accel dut (.clk, .rst_n, .ctrl, .in, .in_rfd, .out, .out_rfd);
  quant_accel #(.QUALITY(100)) dut100 (.clk, .rst_n, .ctrl, .in(in100), .in_rfd(in_rfd100),
                                       .out(out100), .out_rfd(out_rfd100));

  int checks = 0, failures = 0;

  initial begin
    #50000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Annex K luminance table, scaled for quality 75 (scale factor 50 %)
  int lum [64] = '{16, 11, 10, 16, 24, 40, 51, 61, 12, 12, 14, 19, 26, 58, 60, 55,
                   14, 13, 16, 24, 40, 57, 69, 56, 14, 17, 22, 29, 51, 87, 80, 62,
                   18, 22, 37, 56, 68, 109, 103, 77, 24, 35, 55, 64, 81, 104, 113, 92,
                   49, 64, 78, 87, 103, 121, 120, 101, 72, 92, 95, 98, 112, 100, 103, 99};

  function automatic int qref(int x, int pos);
    int q, a;
    q = (lum[pos] * 50 + 50) / 100;
    a = (x < 0) ? -x : x;
    a = (a + q / 2) / q;
    return (x < 0) ? -a : a;
  endfunction

  stream_t sent [$];
  int n_sent = 0, n_got = 0;

  initial begin
    rst_n = 0; in = STREAM_IDLE; out_rfd = 1; ctrl = 0; in100 = STREAM_IDLE; out_rfd100 = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // quality 100 is a pass-through, one cycle later
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in100.valid = 1; in100.data = 16'($urandom); in100.addr = 9'($urandom);
      in100.start = 1'($urandom); in100.done = 1'($urandom);
      begin
        stream_t prev;
        prev = in100;
        @(negedge clk);
        checks++;
        if (out100 !== prev) begin failures++; $display("QUALITY 100 did not pass through"); end
      end
    end
    in100 = STREAM_IDLE;
    // a seven-word block as in the framework's reference timing diagram: the source
    // stalls (valid low) in cycle 4, the sink withholds RFD in cycles 6 and 7; every
    // word must arrive once, in order, with start on the first and done on the last,
    // and the backpressure must reach the source through the quantizer
    begin
      int k, rfd_low;
      logic [15:0] got [$];
      logic got_start [$], got_done [$];
      k = 0; rfd_low = 0;
      for (int c = 1; c <= 16; c++) begin
        @(negedge clk);
        out_rfd100 = !(c == 6 || c == 7);
        if (k < 7) begin
          in100.valid = (c != 4); in100.data = 16'h0100 + 16'(k); in100.addr = 9'(k);
          in100.start = (k == 0); in100.done = (k == 6);
        end else in100 = STREAM_IDLE;
        @(posedge clk);
        if (!in_rfd100) rfd_low++;
        if (out100.valid && out_rfd100) begin
          got.push_back(out100.data); got_start.push_back(out100.start); got_done.push_back(out100.done);
        end
        if (in100.valid && in_rfd100) k++;
      end
      @(negedge clk); in100 = STREAM_IDLE; out_rfd100 = 1;
      checks++;
      if (got.size() != 7) begin failures++; $display("timing diagram: %0d words arrived", got.size()); end
      for (int i = 0; i < got.size() && i < 7; i++) begin
        checks++;
        if (got[i] != 16'h0100 + 16'(i) || got_start[i] != (i == 0) || got_done[i] != (i == 6)) begin
          failures++; $display("timing diagram: word %0d wrong", i);
        end
      end
      checks++;
      if (rfd_low == 0) begin failures++; $display("timing diagram: backpressure did not reach the source"); end
    end
    // quality 75 under random gaps and backpressure
    fork
      begin : send
        for (int i = 0; i < 6000; i++) begin
          stream_t w;
          int kind;
          while ($urandom_range(0, 3) == 0) begin @(negedge clk); in = STREAM_IDLE; end
          @(negedge clk);
          kind = $urandom_range(0, 9);
          w.valid = 1; w.addr = 9'($urandom);
          w.start = (w.addr[5:0] == 0); w.done = (w.addr[5:0] == 63);
          w.data = (kind < 4) ? 16'($urandom) : (kind < 9) ? 16'($urandom_range(0, 200) - 100)
                 : ($urandom_range(0, 1) ? 16'h8000 : 16'h7fff);
          in = w;
          do @(posedge clk); while (!in_rfd);
          sent.push_back(w);
          n_sent++;
        end
        @(negedge clk); in = STREAM_IDLE;
      end
      begin : recv
        while (n_got < 6000) begin
          @(negedge clk);
          out_rfd = ($urandom_range(0, 99) < 70);
          @(posedge clk);
          if (out.valid && out_rfd) begin
            stream_t e;
            int r;
            e = sent.pop_front();
            r = qref(int'($signed(e.data)), int'(e.addr[5:0]));
            checks++;
            if (int'($signed(out.data)) != r || out.addr !== e.addr || out.start !== e.start
                || out.done !== e.done) begin
              failures++;
              $display("x=%0d pos=%0d got %0d expected %0d", $signed(e.data), e.addr[5:0],
                       $signed(out.data), r);
            end
            n_got++;
          end
        end
      end
    join
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d words lost", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
