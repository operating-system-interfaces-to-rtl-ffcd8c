// tb_dct8x8_accel: sends random 8x8 blocks of 12-bit signed samples (plus all-maximum
// and all-minimum blocks) in row- or column-major order with random gaps, and takes
// the coefficients under a random RFD pattern. Each coefficient is compared with a
// double-precision evaluation of the DCT formula (tolerance 2). Also checked: output
// order, addresses, start/done flags, that RFD is low while the block is computed,
// and, with no gaps, the 65-cycle delay from the last sample to the first coefficient
// and the 64-cycle coefficient burst.
module tb_dct8x8_accel;
  import saif_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_rfd, out_rfd;
  logic [15:0] ctrl;
  stream_t in, out;

  dct8x8_accel dut (.*);

  int checks = 0, failures = 0, maxerr = 0, bp_cycles = 0;
  always @(posedge clk) if (rst_n && in.valid && !in_rfd) bp_cycles++;

  initial begin
    #50000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cc(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  localparam int NB = 40;
  int  blk [NB][64];
  real ref_c [NB][64];
  int  bnum [NB];
  logic bcol [NB];
  int  gap_pct, rfd_pct;

  task automatic ref_dct(input int n);
    real pi, s;
    pi = 3.14159265358979323846;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        s = 0.0;
        for (int x = 0; x < 8; x++)
          for (int y = 0; y < 8; y++)
            s += blk[n][x*8 + y] * $cos((2*x + 1) * u * pi / 16.0) * $cos((2*y + 1) * v * pi / 16.0);
        ref_c[n][u*8 + v] = 0.25 * cc(u) * cc(v) * s;
      end
  endtask

  // Blocks first..last are sent back to back while the coefficients are taken.
  task automatic run(input int first, input int last);
    fork
      begin : send
        for (int n = first; n <= last; n++)
          for (int k = 0; k < 64; k++) begin
            int p;
            p = bcol[n] ? (k % 8) * 8 + k / 8 : k;
            while ($urandom_range(0, 99) < gap_pct) begin
              @(negedge clk); in = STREAM_IDLE;
            end
            @(negedge clk);
            in.valid = 1; in.start = (k == 0); in.done = (k == 63);
            in.addr = 9'(bnum[n] * 64 + p); in.data = 16'(blk[n][p]);
            do @(posedge clk); while (!in_rfd);
            if (k == 63) t_last_in = $time;
          end
        @(negedge clk); in = STREAM_IDLE;
      end
      begin : recv
        for (int n = first; n <= last; n++) begin
          int got;
          time t_first;
          got = 0;
          while (got < 64) begin
            @(negedge clk);
            out_rfd = ($urandom_range(0, 99) < rfd_pct);
            @(posedge clk);
            if (out.valid && out_rfd) begin
              int err, r;
              logic signed [15:0] q;
              q = out.data;
              r = int'($rtoi(ref_c[n][got] + (ref_c[n][got] >= 0 ? 0.5 : -0.5)));
              err = int'(q) - r;
              if (err < 0) err = -err;
              if (err > maxerr) maxerr = err;
              checks++;
              if (err > 2 || out.addr !== 9'(bnum[n] * 64 + got) || out.start !== (got == 0)
                  || out.done !== (got == 63)) begin
                failures++;
                $display("blk %0d coef %0d: got %0d (addr %0d s%b d%b) ref %f", n, got,
                         q, out.addr, out.start, out.done, ref_c[n][got]);
              end
              if (got == 0) t_first = $time;
              if (got == 0 && gap_pct == 0 && rfd_pct == 100 && n == first) begin
                checks++;
                if ((t_first - t_last_in) != 66 * 10) begin
                  failures++;
                  $display("first coefficient sampled %0d cycles after the last sample",
                           (t_first - t_last_in) / 10);
                end
              end
              if (got == 63 && gap_pct == 0 && rfd_pct == 100) begin
                checks++;
                if (($time - t_first) != 63 * 10) begin failures++; $display("burst not 64 cycles"); end
              end
              got++;
            end
          end
        end
      end
    join
  endtask

  time t_last_in;

  initial begin
    rst_n = 0; in = STREAM_IDLE; out_rfd = 1; ctrl = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NB; n++) begin
      for (int i = 0; i < 64; i++)
        blk[n][i] = (n == 1) ? 2047 : (n == 2) ? -2048 : $urandom_range(0, 4095) - 2048;
      bnum[n] = $urandom_range(0, 7);
      bcol[n] = (n == 2) ? 1'b1 : 1'($urandom);
      ref_dct(n);
    end
    gap_pct = 0; rfd_pct = 100;
    run(0, 0);
    run(1, 1);
    run(2, 2);
    run(3, 9);     // back to back: the second block meets backpressure
    gap_pct = 30; rfd_pct = 60;
    run(10, NB - 1);
    checks++;
    if (bp_cycles == 0) begin failures++; $display("backpressure never seen"); end
    $display("max coefficient error %0d, backpressure cycles %0d", maxerr, bp_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
