// tb_mm192_coproc: self-checking test of the memory-mapped 192-bit modular
// multiplier.
//
// The testbench holds the data RAM itself (byte array, one-clock read
// latency, read first) and fills slots d, R1..R8 with random values: reduced
// field elements on most rounds, arbitrary 192-bit values on others. For each
// of the twelve configurations, in random order, it issues the multiply
// command, waits for done, issues the write-back command and waits again. It
// checks that the result slot holds a*b mod p (computed with the simulator's
// wide arithmetic), that no other byte of memory changed, that busy lasted
// exactly 50 clocks for the multiply and 24 for the write-back, and that a
// second write-back repeats the kept result. A watchdog ends a hung run.
module tb_mm192_coproc;
  import p192_pkg::*;
  localparam int unsigned ADDR_W = 10;          // 1 KiB is enough for the nine slots
  localparam logic [15:0] BASE   = 16'h0100;

  logic              clk = 0, rst;
  logic [7:0]        cmd;
  logic              busy, done;
  logic [ADDR_W-1:0] mem_addr;
  logic [7:0]        mem_wdata, mem_rdata;
  logic              mem_we;
  logic [7:0]        mem [2**ADDR_W];
  int checks = 0, failures = 0;

  mm192_coproc #(.ADDR_W(ADDR_W), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  function automatic fp_t rd_slot(input int s);
    fp_t v;
    for (int i = 0; i < 24; i++) v[8*i +: 8] = mem[int'(BASE) + 24*s + i];
    return v;
  endfunction

  task automatic wr_slot(input int s, input fp_t v);
    for (int i = 0; i < 24; i++) mem[int'(BASE) + 24*s + i] = v[8*i +: 8];
  endtask

  function automatic fp_t rand192(input bit reduced);
    dfp_t v;
    v = '0;
    for (int i = 0; i < 6; i++) v[32*i +: 32] = $urandom;
    if (reduced) v = v % {192'd0, P192};
    return v[191:0];
  endfunction

  // Sends one command byte and returns the number of clocks busy was high.
  task automatic command(input logic [7:0] c, output int nbusy);
    int guard;
    @(negedge clk) cmd = c;
    nbusy = 0; guard = 0;
    @(posedge clk); #1;                        // edge that samples the command
    while (busy && guard < 1000) begin
      nbusy++;
      @(posedge clk); #1;
      guard++;
    end
    cmd = 8'h00;
    @(posedge clk); #1;                        // port back to 0 for a clock
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL done not set after command %h", c);
    end
  endtask

  task automatic run_cfg(input int n, input bit reduced);
    mm_cfg_t cf;
    fp_t a, b, expected, got;
    logic [7:0] snapshot [2**ADDR_W];
    int nb, diffs;
    for (int s = 0; s <= 8; s++) wr_slot(s, rand192(reduced));
    cf = mm_cfg(4'(n));
    a  = rd_slot(int'(cf.a));
    b  = rd_slot(int'(cf.b));
    expected = 192'(({192'd0, a} * {192'd0, b}) % {192'd0, P192});
    snapshot = mem;
    command(8'h80 | 8'(n), nb);
    checks++;
    if (nb != 50) begin failures++; $display("FAIL cfg %0d multiply busy %0d clocks", n, nb); end
    checks++;
    if (mem != snapshot) begin failures++; $display("FAIL cfg %0d memory written during multiply", n); end
    command(8'h40, nb);
    checks++;
    if (nb != 24) begin failures++; $display("FAIL cfg %0d write-back busy %0d clocks", n, nb); end
    got = rd_slot(int'(cf.r));
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL cfg %0d a=%h b=%h got=%h exp=%h", n, a, b, got, expected);
    end
    diffs = 0;
    for (int i = 0; i < 2**ADDR_W; i++)
      if (mem[i] != snapshot[i] &&
          !(i >= int'(BASE) + 24*int'(cf.r) && i < int'(BASE) + 24*int'(cf.r) + 24)) diffs++;
    checks++;
    if (diffs != 0) begin failures++; $display("FAIL cfg %0d %0d stray bytes written", n, diffs); end
    // the result stays in the co-processor: a second write-back repeats it
    wr_slot(int'(cf.r), '0);
    command(8'h40, nb);
    checks++;
    if (rd_slot(int'(cf.r)) !== expected) begin
      failures++; $display("FAIL cfg %0d second write-back", n);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = 8'($urandom);
    cmd = 8'h00;
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NCFG; n++) run_cfg(n, 1);
    for (int i = 0; i < 60; i++) run_cfg($urandom_range(0, NCFG - 1), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
