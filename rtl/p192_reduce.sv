// p192_reduce: reduction of a 384-bit value modulo p = 2^192 - 2^64 - 1.
//
// Split x into six 64-bit words x = (A5,A4,A3,A2,A1,A0). Because
// 2^192 = 2^64 + 1 (mod p), x is congruent to the sum of four 192-bit numbers
// that are pure re-wirings of those words:
//   S0 = (A2,A1,A0)  S1 = (0,A3,A3)  S2 = (A4,A4,0)  S3 = (A5,A5,A5)
// Their sum is below 3*2^192 + 2^128 < 4p, so subtracting 0, p, 2p or 3p
// (the largest multiple not above the sum) leaves a value in [0, p).
// Correct for any 384-bit x, not only for products of reduced operands.
//
// Purely combinational: one 4-input 194-bit addition and three parallel
// trial subtractions. The four terms and the choice among sum - k*p follow
// the design; computing all three differences in parallel is this module's
// own choice.
module p192_reduce
  import p192_pkg::*;
(
  input  dfp_t x,
  output fp_t  r
);

  localparam int unsigned SW = FW + 2;          // sum width: < 4 * 2^192

  logic [63:0]   a0, a1, a2, a3, a4, a5;
  logic [SW-1:0] s;
  logic [SW:0]   d1, d2, d3;                    // sum - k*p, top bit = borrow

  always_comb begin
    {a5, a4, a3, a2, a1, a0} = x;
    s  = SW'({a2,  a1,  a0})
       + SW'({64'd0, a3, a3})
       + SW'({a4,  a4,  64'd0})
       + SW'({a5,  a5,  a5});
    d1 = {1'b0, s} - (SW+1)'(P192);
    d2 = {1'b0, s} - ((SW+1)'(P192) << 1);
    d3 = {1'b0, s} - ((SW+1)'(P192) * 3);
    if (!d3[SW])      r = d3[FW-1:0];           // s >= 3p
    else if (!d2[SW]) r = d2[FW-1:0];           // 2p <= s < 3p
    else if (!d1[SW]) r = d1[FW-1:0];           // p <= s < 2p
    else              r = s[FW-1:0];            // s < p
  end

endmodule
