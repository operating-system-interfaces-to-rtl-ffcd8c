// tb_interconnect_switch: random routes (each source used at most once, some sinks left
// unconnected) and random channel contents; checks that every sink sees its selected
// source, or an idle channel, and that every source sees the RFD of the sink that
// selected it, or RFD low if none did.
module tb_interconnect_switch;
  import saif_pkg::*;
  localparam int NF = 3, NP = NF + 1;
  logic [31:0] route;
  stream_t src_fwd [NP];
  logic    src_rfd [NP];
  stream_t sink_fwd [NP];
  logic    sink_rfd [NP];

  interconnect_switch #(.NUM_FRAMES(NF)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [NP];
    int sel [NP];
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NP; i++) perm[i] = i;
      perm.shuffle();
      route = '1;
      for (int k = 0; k < NP; k++) begin
        sel[k] = ($urandom_range(0, 4) == 0) ? 15 : perm[k];
        route[4*k +: 4] = 4'(sel[k]);
      end
      for (int i = 0; i < NP; i++) begin
        src_fwd[i] = stream_t'({$urandom, $urandom});
        sink_rfd[i] = 1'($urandom);
      end
      #1;
      for (int k = 0; k < NP; k++) begin
        checks++;
        if (sel[k] < NP ? sink_fwd[k] !== src_fwd[sel[k]] : sink_fwd[k] !== STREAM_IDLE) begin
          failures++; $display("sink %0d wrong channel (sel %0d)", k, sel[k]);
        end
      end
      for (int s = 0; s < NP; s++) begin
        logic exp;
        exp = 0;
        for (int k = 0; k < NP; k++) if (sel[k] == s) exp = sink_rfd[k];
        checks++;
        if (src_rfd[s] !== exp) begin failures++; $display("source %0d rfd wrong", s); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
