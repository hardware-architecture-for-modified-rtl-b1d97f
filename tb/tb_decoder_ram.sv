// tb_decoder_ram: random single-port traffic against a model memory. Checks
// the one-cycle read latency and that a read in a write cycle returns the old
// word.
module tb_decoder_ram;
  logic        clk = 0;
  logic [13:0] addr;
  logic        we;
  logic [4:0]  wdata, rdata;
  int checks = 0, failures = 0;
  logic [4:0] model [16384];
  logic [4:0] expect_q;
  bit         pending;

  decoder_ram dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so that every read has a known value
    we = 1;
    for (int i = 0; i < 16384; i++) begin
      addr = 14'(i); wdata = 5'($urandom); model[i] = wdata;
      @(posedge clk); #1;
    end
    pending = 0;
    for (int n = 0; n < 40000; n++) begin
      // a small address range makes read-after-write collisions frequent
      addr  = (n % 3 == 0) ? 14'($urandom_range(0, 15)) : 14'($urandom);
      we    = ($urandom_range(0, 2) == 0);
      wdata = 5'($urandom);
      expect_q = model[addr];
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("addr %0d: read %0d expected %0d", addr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
