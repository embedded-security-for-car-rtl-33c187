// tb_par_mult: self-checking test of the parallel-port multipliers at the
// three widths the design uses, W = 8, 16 and 32.
//
// A task plays the 8051: it puts a 16-bit operand chunk on P2/P1, raises and
// lowers P0 bit 7 with the chunk index, and after the last chunk reads the
// product chunks back by raising P0 bit 6. Operand chunks are loaded in a
// random order to check the chunk index. The product is compared with a*b
// computed in the testbench; the clocks from the last load command to ready
// are checked: ready must rise on the next clock edge. A watchdog ends a hung run.
module tb_par_mult;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic [7:0]  p0  [3];
  logic [15:0] din [3];
  logic [15:0] dout[3];
  logic        ready[3];
  int checks = 0, failures = 0;

  par_mult #(.W(8))  dut8  (.clk, .rst, .p0(p0[0]), .din(din[0]), .dout(dout[0]), .ready(ready[0]));
  par_mult #(.W(16)) dut16 (.clk, .rst, .p0(p0[1]), .din(din[1]), .dout(dout[1]), .ready(ready[1]));
  par_mult #(.W(32)) dut32 (.clk, .rst, .p0(p0[2]), .din(din[2]), .dout(dout[2]), .ready(ready[2]));

  task automatic port_cmd(input int u, input logic [7:0] c);
    @(negedge clk) p0[u] = c;
    @(negedge clk) p0[u] = 8'h00;
  endtask

  task automatic mult(input int u, input int w, input logic [31:0] a, input logic [31:0] b);
    logic [63:0] ab, expected, got;
    int nch, order[4], lat;
    nch = (w == 8) ? 1 : (w == 16) ? 2 : 4;
    ab  = (w == 8) ? {48'd0, b[7:0], a[7:0]} : (w == 16) ? {32'd0, b[15:0], a[15:0]} : {b, a};
    expected = (w == 8)  ? 64'(a[7:0])  * 64'(b[7:0])
             : (w == 16) ? 64'(a[15:0]) * 64'(b[15:0])
             :             64'(a) * 64'(b);
    for (int i = 0; i < 4; i++) order[i] = i;
    for (int i = nch - 1; i > 0; i--) begin     // random load order
      int j = $urandom_range(0, i), t = order[i];
      order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < nch; i++) begin
      @(negedge clk);
      din[u] = ab[16*order[i] +: 16];
      @(negedge clk) p0[u] = 8'h80 | 8'(order[i]);
      if (i == nch - 1) begin
        lat = 0;
        @(posedge clk);                         // edge that samples the command
        #1;
        while (!ready[u] && lat < 10) begin @(posedge clk); #1; lat++; end
        if (!ready[u]) lat = 99;
        checks++;
        if (lat != 1) begin
          failures++;
          $display("FAIL W=%0d ready latency %0d", w, lat);
        end
      end
      @(negedge clk) p0[u] = 8'h00;
    end
    got = '0;
    for (int i = 0; i < nch; i++) begin
      port_cmd(u, 8'h40 | 8'(i));
      got[16*i +: 16] = dout[u];
    end
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h got=%h exp=%h", w, a, b, got, expected);
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
    for (int u = 0; u < 3; u++) begin p0[u] = 0; din[u] = 0; end
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int u = 0; u < 3; u++) begin
      automatic int w = 8 << u;
      mult(u, w, '1, '1);
      mult(u, w, 0, 32'h1234_5678);
      for (int i = 0; i < 100; i++) mult(u, w, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
