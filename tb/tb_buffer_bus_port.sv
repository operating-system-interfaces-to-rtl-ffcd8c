// tb_buffer_bus_port: random bus accesses; checks that each goes to the input buffer
// (lower half of the window) or the output buffer (upper half) with the right line
// address, data and byte enables, and that read data returns from the selected buffer
// in the next cycle with bus_rvalid. The two buffers are modelled as registered RAMs.
module tb_buffer_bus_port;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, bus_en, bus_we, bus_rvalid, in_en, in_we, out_en, out_we;
  logic [7:0] bus_be, in_be, out_be;
  logic [10:0] bus_addr;
  logic [63:0] bus_wdata, bus_rdata, in_wdata, in_rdata, out_wdata, out_rdata;
  logic [6:0] in_addr, out_addr;

  buffer_bus_port #(.BUF_BYTES(1024)) dut (.*);

  logic [63:0] imem [128], omem [128];
  always_ff @(posedge clk) begin
    if (in_en)  begin if (in_we)  imem[in_addr]  <= in_wdata;  in_rdata  <= imem[in_addr];  end
    if (out_en) begin if (out_we) omem[out_addr] <= out_wdata; out_rdata <= omem[out_addr]; end
  end

  int checks = 0, failures = 0;
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ref_i [128], ref_o [128];
    logic [63:0] exp;
    logic rd;
    rst_n = 0; bus_en = 0; bus_we = 0; bus_be = 0; bus_addr = 0; bus_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 256; l++) begin
      @(negedge clk);
      bus_en = 1; bus_we = 1; bus_be = 8'hff; bus_addr = 11'(l * 8); bus_wdata = {$urandom, $urandom};
      if (l < 128) ref_i[l] = bus_wdata; else ref_o[l - 128] = bus_wdata;
      #1;
      checks++;
      if ((l < 128) ? !(in_en && !out_en && in_addr == 7'(l) && in_wdata == bus_wdata && in_be == 8'hff)
                    : !(out_en && !in_en && out_addr == 7'(l - 128) && out_wdata == bus_wdata))
        begin failures++; $display("write decode wrong at line %0d", l); end
    end
    @(negedge clk); bus_en = 0; bus_we = 0;
    for (int t = 0; t < 1000; t++) begin
      int l;
      @(negedge clk);
      l = $urandom_range(0, 255);
      bus_en = 1; bus_we = 0; bus_addr = 11'(l * 8);
      exp = (l < 128) ? ref_i[l] : ref_o[l - 128];
      @(negedge clk); bus_en = 0;
      checks++;
      if (!bus_rvalid || bus_rdata !== exp) begin
        failures++; $display("read line %0d got %h exp %h rvalid %b", l, bus_rdata, exp, bus_rvalid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
