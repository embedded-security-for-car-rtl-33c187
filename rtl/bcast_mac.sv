// bcast_mac: broadcast multiplier, one AW x BW partial product per clock.
//
// Operand a (AW bits) is held steady while operand b arrives one BW-bit word
// per clock, least significant word first. Each word is "broadcast" against
// the whole of a, and the AW+BW-bit partial product is added into the upper
// half of a 2*AW-bit accumulator that then shifts right by BW bits. The word
// that drops out of the upper half is final and moves into the lower half.
// After AW/BW words, acc = a * b:
//   a * B = sum_i (a * B_i) * 2^(BW*i)
// so only an (AW+BW)-bit adder is needed rather than a 2*AW-bit one.
//
// Interface: clr (synchronous, wins over en) zeroes the accumulator; en adds
// one word. acc is registered and valid the clock after the last en. The
// byte-wide split of b and the broadcast organisation follow the design's
// 192-bit multiplier; the right-shifting accumulator is this design's own way
// of adding the shifted partial products.
module bcast_mac #(
  parameter int unsigned AW = 192,
  parameter int unsigned BW = 8
) (
  input  logic            clk,
  input  logic            clr,
  input  logic            en,
  input  logic [AW-1:0]   a,
  input  logic [BW-1:0]   b,
  output logic [2*AW-1:0] acc
);

  logic [AW-1:0]    hi;      // running upper part
  logic [AW-1:0]    lo;      // finished low words, shifted in from the top
  logic [AW+BW-1:0] sum;

  // hi + a*b < 2^BW * 2^AW, so AW+BW bits hold the sum without overflow.
  always_comb sum = (AW+BW)'(hi) + (AW+BW)'(a) * (AW+BW)'(b);

  always_ff @(posedge clk) begin
    if (clr) begin
      hi <= '0;
      lo <= '0;
    end else if (en) begin
      hi <= sum[AW+BW-1:BW];
      lo <= {sum[BW-1:0], lo[AW-1:BW]};
    end
  end

  assign acc = {hi, lo};

endmodule
