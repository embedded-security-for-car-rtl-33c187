// tb_ecc_codesign_top: end-to-end test of the co-design hardware at its
// default parameters.
//
// The testbench plays the 8051. Over the external-memory port and the
// co-processor command port it runs Edwards-curve scalar multiplications
// k*P on x^2 + y^2 = 1 + 22 x^2 y^2 over GF(2^192 - 2^64 - 1), projective
// coordinates, left-to-right double-and-add with the unified point addition.
// Every modular multiplication of a point addition goes to the 192-bit
// co-processor (one of its twelve configurations, then a write-back);
// additions and subtractions are done "in software": the testbench reads the
// operands through the CPU port, computes, and writes the result back.
//   * k = 0x06 (three point additions), then the 192-bit key
//     0x3DCF46ED302128736C0844766B41273BEB74600FF5984564, then the same key
//     again on that result (two steps of a chained k^n * P loop); each result is
//     checked against affine coordinates computed independently (constants
//     below, from the affine addition law with field inversions):
//     X == x*Z and Y == y*Z (mod p). Every intermediate point is also
//     checked to lie on the curve.
//   * The mux's exclusivity: a CPU write issued while the co-processor is
//     busy must not reach memory.
//   * The three parallel-port multipliers each compute a full 192x192-bit
//     product by grade-school multi-precision multiplication with 8-, 16- and
//     32-bit limbs, checked against a wide multiply.
// Mechanisms counted, each must occur: all twelve configurations, write-back,
// final subtraction of 0, p and 2p in the reduction, a blocked CPU write, and
// a multiplication on each parallel-port unit. A watchdog ends a hung run.
module tb_ecc_codesign_top;
  import p192_pkg::*;

  localparam fp_t D     = 192'd22;
  localparam fp_t PX    = 192'd2;
  localparam fp_t PY    = 192'd145856074246581849553882507518887366570983786224641840723;
  localparam fp_t K6    = 192'h06;
  localparam fp_t K6_X  = 192'h36a75e60188decb85226910a30ca10f47582f721599b5175;
  localparam fp_t K6_Y  = 192'h34ca494a05c826f3bf4fb9d60c144b0276c75d8d753a7995;
  localparam fp_t KEY   = 192'h3DCF46ED302128736C0844766B41273BEB74600FF5984564;
  localparam fp_t KEY_X = 192'he4286a7bae332bc248a458150c385959b53eac752cc02dc3;
  localparam fp_t KEY_Y = 192'hf0d0d685bd5790d674730b7009c5107478fec3466224ad64;
  localparam fp_t KEY2_X = 192'ha91ffab5070ab4d3a5b10c2548e4a21a51d740ec02ea893c;  // k*(k*P)
  localparam fp_t KEY2_Y = 192'hfb3cf57865becdff51a8898f8aa565dfd3ca746cdb79c83e;
  localparam logic [15:0] SCRATCH = 16'h8000;   // outside the operand slots

  logic        clk = 0, rst;
  logic [15:0] cpu_addr;
  logic [7:0]  cpu_wdata, cpu_rdata;
  logic        cpu_we;
  logic [7:0]  mm_p0;
  logic        mm_busy, mm_done;
  logic [7:0]  pm8_p0, pm16_p0, pm32_p0;
  logic [15:0] pm8_din, pm16_din, pm32_din, pm8_dout, pm16_dout, pm32_dout;
  logic        pm8_ready, pm16_ready, pm32_ready;

  ecc_codesign_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cfg_count [NCFG];
  int wb_count = 0, blocked_writes = 0, padds = 0;
  int red_case [4];
  int pm_mults [3];
  longint clocks = 0, busy_clocks = 0;

  always @(posedge clk) begin
    clocks++;
    if (mm_busy) busy_clocks++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Which multiple of p the reduction subtracts, seen in its result cycle.
  always @(posedge clk) begin
    if (!rst && 2'(dut.u_mm.state) == 2'd2) begin
      if (!dut.u_mm.u_red.d3[194])      red_case[3]++;
      else if (!dut.u_mm.u_red.d2[194]) red_case[2]++;
      else if (!dut.u_mm.u_red.d1[194]) red_case[1]++;
      else                              red_case[0]++;
    end
  end

  // ---------------- field arithmetic of the "software" side ----------------
  function automatic fp_t addm(input fp_t a, input fp_t b);
    logic [192:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, P192}) s = s - {1'b0, P192};
    return s[191:0];
  endfunction

  function automatic fp_t subm(input fp_t a, input fp_t b);
    return (a >= b) ? a - b : P192 - (b - a);
  endfunction

  function automatic fp_t mulm(input fp_t a, input fp_t b);
    return 192'(({192'd0, a} * {192'd0, b}) % {192'd0, P192});
  endfunction

  // ---------------- 8051 external-memory accesses ----------------
  task automatic cpu_wr(input logic [15:0] a, input logic [7:0] v);
    @(negedge clk);
    cpu_addr = a; cpu_wdata = v; cpu_we = 1;
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic cpu_rd(input logic [15:0] a, output logic [7:0] v);
    @(negedge clk);
    cpu_addr = a; cpu_we = 0;
    @(posedge clk); #1;
    v = cpu_rdata;
  endtask

  task automatic wr_slot(input int s, input fp_t v);
    for (int i = 0; i < NBYTES; i++) cpu_wr(16'(24*s + i), v[8*i +: 8]);
  endtask

  task automatic rd_slot(input int s, output fp_t v);
    logic [7:0] b;
    for (int i = 0; i < NBYTES; i++) begin
      cpu_rd(16'(24*s + i), b);
      v[8*i +: 8] = b;
    end
  endtask

  // ---------------- co-processor commands ----------------
  task automatic mm_cmd(input logic [7:0] c, input int expect_busy);
    int nb, guard;
    logic [7:0] sc_exp, sc_got;
    @(negedge clk) mm_p0 = c;
    @(posedge clk); #1;
    nb = 0; guard = 0;
    while (mm_busy && guard < 200) begin
      // while the co-processor owns memory, a CPU write must be ignored
      if (nb == 5 && c[7]) begin
        cpu_addr = SCRATCH; cpu_wdata = 8'hA5; cpu_we = 1;
      end else begin
        cpu_we = 0;
      end
      nb++; guard++;
      @(posedge clk); #1;
    end
    cpu_we = 0;
    mm_p0 = 8'h00;
    @(posedge clk); #1;
    check(mm_done, "co-processor done");
    check(nb == expect_busy, $sformatf("command %h busy %0d clocks, expected %0d", c, nb, expect_busy));
    if (c[7]) begin
      cpu_rd(SCRATCH, sc_got);
      sc_exp = 8'h00;
      check(sc_got == sc_exp, "CPU write during busy reached memory");
      if (sc_got == sc_exp) blocked_writes++;
    end
  endtask

  task automatic mm(input int n);
    mm_cmd(8'h80 | 8'(n), 50);
    cfg_count[n]++;
    mm_cmd(8'h40, 24);
    wb_count++;
  endtask

  // software add/sub on slots: dst = s1 op s2
  task automatic sw_op(input int dst, input int s1, input int s2, input bit sub);
    fp_t a, b;
    rd_slot(s1, a);
    rd_slot(s2, b);
    wr_slot(dst, sub ? subm(a, b) : addm(a, b));
  endtask

  typedef struct { fp_t x, y, z; } pt_t;

  function automatic bit on_curve(input pt_t q);
    fp_t x2, y2, z2, lhs, rhs;
    x2 = mulm(q.x, q.x); y2 = mulm(q.y, q.y); z2 = mulm(q.z, q.z);
    lhs = mulm(addm(x2, y2), z2);
    rhs = addm(mulm(z2, z2), mulm(D, mulm(x2, y2)));
    return lhs == rhs && q.z != 0;
  endfunction

  // Unified point addition, slot k holds Rk, slot 0 holds d.
  task automatic padd(input pt_t p1, input pt_t p2, output pt_t r);
    wr_slot(1, p1.x); wr_slot(2, p1.y); wr_slot(3, p1.z);
    wr_slot(4, p2.x); wr_slot(5, p2.y); wr_slot(6, p2.z);
    mm(0);                       // R3 = Z1*Z2
    sw_op(7, 1, 2, 0);           // R7 = X1+Y1
    sw_op(8, 4, 5, 0);           // R8 = X2+Y2
    mm(1);                       // R1 = X1*X2
    mm(2);                       // R2 = Y1*Y2
    mm(3);                       // R7 = R7*R8
    sw_op(7, 7, 1, 1);           // R7 -= R1
    sw_op(7, 7, 2, 1);           // R7 -= R2
    mm(4);                       // R7 = R7*R3
    mm(5);                       // R8 = R1*R2
    mm(6);                       // R8 = d*R8
    sw_op(2, 2, 1, 1);           // R2 = R2-R1
    mm(7);                       // R2 = R2*R3
    mm(8);                       // R3 = R3^2
    sw_op(1, 3, 8, 1);           // R1 = R3-R8
    sw_op(3, 3, 8, 0);           // R3 = R3+R8
    mm(9);                       // R2 = R2*R3
    mm(10);                      // R3 = R3*R1
    mm(11);                      // R1 = R1*R7
    rd_slot(1, r.x); rd_slot(2, r.y); rd_slot(3, r.z);
    padds++;
    check(on_curve(r), $sformatf("point addition %0d result on the curve", padds));
  endtask

  task automatic scalar_mult(input fp_t k, input pt_t p, input fp_t ex, input fp_t ey,
                             output pt_t r);
    int top;
    top = 0;
    for (int i = 0; i < 192; i++) if (k[i]) top = i;
    r = p;
    for (int i = top - 1; i >= 0; i--) begin
      padd(r, r, r);
      if (k[i]) padd(r, p, r);
    end
    check(r.x == mulm(ex, r.z), $sformatf("k=%h: X", k));
    check(r.y == mulm(ey, r.z), $sformatf("k=%h: Y", k));
  endtask

  // ---------------- parallel-port multipliers ----------------
  task automatic pm_cmd(input int u, input logic [7:0] c);
    @(negedge clk);
    case (u) 0: pm8_p0 = c; 1: pm16_p0 = c; default: pm32_p0 = c; endcase
    @(negedge clk);
    @(negedge clk);
    case (u) 0: pm8_p0 = 0; 1: pm16_p0 = 0; default: pm32_p0 = 0; endcase
  endtask

  task automatic pm_setdin(input int u, input logic [15:0] v);
    case (u) 0: pm8_din = v; 1: pm16_din = v; default: pm32_din = v; endcase
  endtask

  function automatic logic [15:0] pm_dout(input int u);
    case (u) 0: return pm8_dout; 1: return pm16_dout; default: return pm32_dout; endcase
  endfunction

  // w-bit limb product on unit u
  task automatic pm_limb(input int u, input int w, input logic [31:0] a,
                         input logic [31:0] b, output logic [63:0] r);
    logic [63:0] ab;
    int nch;
    nch = 2 * w / 16;
    ab = (w == 8) ? {48'd0, b[7:0], a[7:0]} : (w == 16) ? {32'd0, b[15:0], a[15:0]} : {b, a};
    for (int i = 0; i < nch; i++) begin
      pm_setdin(u, ab[16*i +: 16]);
      pm_cmd(u, 8'h80 | 8'(i));
    end
    r = '0;
    for (int i = 0; i < nch; i++) begin
      pm_cmd(u, 8'h40 | 8'(i));
      r[16*i +: 16] = pm_dout(u);
    end
    pm_mults[u]++;
  endtask

  // grade-school 192x192 multiplication with w-bit limbs, as the software does
  task automatic pm_bigmul(input int u, input int w, input fp_t a, input fp_t b);
    dfp_t x;
    logic [63:0] pr;
    logic [64:0] t;
    logic [31:0] carry;
    int n;
    n = 192 / w;
    x = '0;
    for (int i = 0; i < n; i++) begin
      carry = 0;
      for (int j = 0; j < n; j++) begin
        pm_limb(u, w, 32'(a >> (w*i)) & 32'((64'd1 << w) - 1),
                      32'(b >> (w*j)) & 32'((64'd1 << w) - 1), pr);
        t = 65'(64'(x >> (w*(i+j))) & ((64'd1 << w) - 1)) + 65'(pr) + 65'(carry);
        x = (x & ~(((dfp_t'(1) << w) - 1) << (w*(i+j)))) | (dfp_t'(t & ((65'd1 << w) - 1)) << (w*(i+j)));
        carry = 32'(t >> w);
      end
      x = x | (dfp_t'(carry) << (w*(i+n)));
    end
    check(x == {192'd0, a} * {192'd0, b}, $sformatf("%0d-bit limb 192x192 product", w));
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp_t a, b;
    pt_t base, res;
    foreach (cfg_count[i]) cfg_count[i] = 0;
    foreach (red_case[i]) red_case[i] = 0;
    foreach (pm_mults[i]) pm_mults[i] = 0;
    cpu_addr = 0; cpu_wdata = 0; cpu_we = 0; mm_p0 = 0;
    pm8_p0 = 0; pm16_p0 = 0; pm32_p0 = 0; pm8_din = 0; pm16_din = 0; pm32_din = 0;
    rst = 1;
    repeat (4) @(negedge clk);
    rst = 0;
    cpu_wr(SCRATCH, 8'h00);
    wr_slot(0, D);
    check(on_curve('{x: PX, y: PY, z: 192'd1}), "base point on the curve");

    base = '{x: PX, y: PY, z: 192'd1};
    scalar_mult(K6, base, K6_X, K6_Y, res);
    $display("k=0x06 done after %0d point additions", padds);
    begin
      longint c0, b0;
      c0 = clocks; b0 = busy_clocks;
      scalar_mult(KEY, base, KEY_X, KEY_Y, res);
      $display("192-bit key done after %0d point additions: %0d clocks, co-processor busy %0d",
               padds, clocks - c0, busy_clocks - b0);
    end

    // second iteration of the chained validation loop: k*(k*P)
    scalar_mult(KEY, res, KEY2_X, KEY2_Y, res);
    $display("second chained scalar multiplication done, %0d point additions in all", padds);

    a = mulm(192'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210_0F1E_2D3C_4B5A_6978, 192'd1);
    b = P192 - 192'd12345;
    pm_bigmul(0, 8, a, b);
    pm_bigmul(1, 16, a, b);
    pm_bigmul(2, 32, a, b);

    for (int n = 0; n < NCFG; n++) check(cfg_count[n] > 0, $sformatf("configuration %0d used", n));
    check(wb_count > 0, "write-back used");
    for (int k = 0; k < 3; k++) check(red_case[k] > 0, $sformatf("reduction subtracting %0dp seen", k));
    check(blocked_writes > 0, "CPU write blocked during busy");
    for (int u = 0; u < 3; u++) check(pm_mults[u] > 0, $sformatf("parallel-port unit %0d used", u));
    $display("point additions %0d, co-processor multiplications %0d, write-backs %0d",
             padds, padds * NCFG, wb_count);
    $display("reduction cases 0p=%0d 1p=%0d 2p=%0d 3p=%0d, blocked CPU writes %0d",
             red_case[0], red_case[1], red_case[2], red_case[3], blocked_writes);
    $display("parallel-port limb products: 8-bit %0d, 16-bit %0d, 32-bit %0d",
             pm_mults[0], pm_mults[1], pm_mults[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
