// tb_bcast_mac: self-checking test of the broadcast 192x8 multiplier-
// accumulator.
//
// For random and corner operand pairs it clears the accumulator, feeds the 24
// bytes of b least significant first (one per clock, with random idle clocks
// in between on half of the runs) and checks that acc equals a*b, computed
// with the simulator's wide multiply, on the clock after the 24th byte, so the
// 24-clock rate is checked as well. A watchdog ends a hung run.
module tb_bcast_mac;
  localparam int unsigned AW = 192;

  logic            clk = 0;
  logic            clr, en;
  logic [AW-1:0]   a;
  logic [7:0]      b;
  logic [2*AW-1:0] acc;
  int checks = 0, failures = 0;

  bcast_mac #(.AW(AW), .BW(8)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] rand192();
    logic [AW-1:0] v;
    for (int i = 0; i < 6; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  task automatic run(input logic [AW-1:0] av, input logic [AW-1:0] bv, input bit gaps);
    logic [2*AW-1:0] expected;
    int n_en;
    expected = {{AW{1'b0}}, av} * {{AW{1'b0}}, bv};
    @(negedge clk);
    clr = 1; en = 0; a = av;
    @(negedge clk);
    clr = 0;
    n_en = 0;
    for (int i = 0; i < AW/8; i++) begin
      if (gaps) begin
        int g = $urandom_range(0, 2);
        repeat (g) begin en = 0; b = 8'($urandom); @(negedge clk); end
      end
      en = 1; b = bv[8*i +: 8];
      n_en++;
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (acc !== expected || n_en != AW/8) begin
      failures++;
      $display("FAIL a=%h b=%h acc=%h exp=%h", av, bv, acc, expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 0; a = '0; b = '0;
    run('1, '1, 0);
    run('0, '1, 0);
    run(192'd1, '1, 1);
    run('1, 192'd255, 0);
    for (int i = 0; i < 300; i++) run(rand192(), rand192(), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
