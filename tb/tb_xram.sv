// tb_xram: self-checking test of the byte-wide data RAM.
//
// Writes random bytes to random addresses while keeping a reference copy in a
// testbench associative array, then reads random addresses (written and
// rewritten ones) and checks that each byte appears exactly one clock after
// its address, and that a write returns the old byte (read first). A watchdog
// ends a hung run.
module tb_xram;
  localparam int unsigned ADDR_W = 16;

  logic              clk = 0;
  logic [ADDR_W-1:0] addr;
  logic [7:0]        wdata, rdata;
  logic              we;
  logic [7:0]        model [logic [ADDR_W-1:0]];
  logic [ADDR_W-1:0] used [$];
  int checks = 0, failures = 0;

  xram #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr  = ADDR_W'($urandom);
      if (i % 3 == 0 && used.size() > 0) addr = used[$urandom_range(0, used.size() - 1)];
      wdata = 8'($urandom);
      we    = 1;
      @(negedge clk);
      // read first: the byte seen is the one before this write, if any
      if (model.exists(addr)) begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++;
          $display("FAIL read-first addr=%h got=%h exp=%h", addr, rdata, model[addr]);
        end
      end
      model[addr] = wdata;
      used.push_back(addr);
      we = 0;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = used[$urandom_range(0, used.size() - 1)];
      we   = 0;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL addr=%h got=%h exp=%h", addr, rdata, model[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
