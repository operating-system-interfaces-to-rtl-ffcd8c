// tb_dual_port_buffer: checks the two-port local store against a byte-array model.
// Random 64-bit writes with byte enables on port A and 16-bit writes on port B; every
// read on either port is compared with the model one cycle later, which also checks the
// big-endian placement of 16-bit words inside the 64-bit bus word.
module tb_dual_port_buffer;
  localparam int WORDS = 512;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        a_en, a_we, b_en, b_we;
  logic [7:0]  a_be;
  logic [6:0]  a_addr;
  logic [8:0]  b_addr;
  logic [63:0] a_wdata, a_rdata;
  logic [15:0] b_wdata, b_rdata;

  dual_port_buffer #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model [2*WORDS];   // byte address, big-endian

  function automatic logic [63:0] line_of(int l);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[63-8*i -: 8] = model[8*l + i];
    return v;
  endfunction

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] expa; logic [15:0] expb; logic chka, chkb;
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_be = 0; a_addr = 0; b_addr = 0;
    a_wdata = 0; b_wdata = 0;
    // initialise through port A
    for (int l = 0; l < WORDS/4; l++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_be = 8'hff; a_addr = 7'(l); a_wdata = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) model[8*l + i] = a_wdata[63-8*i -: 8];
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1); a_be = 8'($urandom);
      a_addr = 7'($urandom); a_wdata = {$urandom, $urandom};
      b_en = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      b_addr = 9'($urandom); b_wdata = 16'($urandom);
      if (a_en && b_en && a_we && b_we && a_addr == b_addr[8:2]) b_we = 0; // no same-word double write
      chka = a_en; chkb = b_en;
      expa = line_of(a_addr);
      expb = {model[2*b_addr], model[2*b_addr + 1]};
      if (a_en && a_we)
        for (int i = 0; i < 8; i++)
          if (a_be[7-i]) model[8*a_addr + i] = a_wdata[63-8*i -: 8];
      if (b_en && b_we) begin
        model[2*b_addr] = b_wdata[15:8]; model[2*b_addr + 1] = b_wdata[7:0];
      end
      @(posedge clk); #1;
      if (chka) begin checks++; if (a_rdata !== expa) begin failures++;
        $display("A mismatch addr %0d got %h exp %h", a_addr, a_rdata, expa); end end
      if (chkb) begin checks++; if (b_rdata !== expb) begin failures++;
        $display("B mismatch addr %0d got %h exp %h", b_addr, b_rdata, expb); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
