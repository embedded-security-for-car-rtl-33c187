// tb_p192_reduce: self-checking test of the P-192 fast reduction.
//
// Drives corner values (0, p, 2^384-1, products of p-1, values just above
// multiples of p) and random 384-bit values, and compares r with x mod p
// computed by the simulator's own wide modulo. Purely combinational block:
// a #1 delay separates input and check. A watchdog ends the run if it hangs.
module tb_p192_reduce;
  import p192_pkg::*;

  dfp_t x;
  fp_t  r;
  int   checks = 0, failures = 0;

  p192_reduce dut (.x(x), .r(r));

  function automatic dfp_t rand384();
    dfp_t v;
    for (int i = 0; i < 12; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input dfp_t v);
    dfp_t ref_r;
    x = v;
    #1;
    ref_r = v % {192'd0, P192};
    checks++;
    if ({192'd0, r} !== ref_r) begin
      failures++;
      $display("FAIL x=%h r=%h expected=%h", v, r, ref_r[191:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dfp_t pm1;
    pm1 = {192'd0, P192} - 1;
    check('0);
    check({192'd0, P192});
    check({192'd0, P192} - 1);
    check({192'd0, P192} + 1);
    check('1);
    check(pm1 * pm1);
    check({192'd0, P192} * 2);
    check({192'd0, P192} * 3);
    check({192'd0, P192} * 3 + 5);
    check({192'd1, 192'd0});
    for (int i = 0; i < 2000; i++) check(rand384());
    // products of reduced operands, the normal use
    for (int i = 0; i < 1000; i++) begin
      dfp_t a, b;
      a = rand384() % {192'd0, P192};
      b = rand384() % {192'd0, P192};
      check(a * b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
