// par_mult: W x W integer multiplier driven over the 8051 parallel ports.
//
// Three 8051 ports connect the CPU to this co-processor: P0 carries commands,
// P1 and P2 together carry 16 bits of data each way (din towards the
// co-processor, dout back). Operands and the 2W-bit product therefore move in
// 16-bit chunks:
//   W = 8 : one operand chunk {B, A} (P2 = B, P1 = A), one result chunk
//   W = 16: chunks 0 = A, 1 = B; result chunks 0 (low), 1 (high)
//   W = 32: chunks 0,1 = A low/high, 2,3 = B low/high; result chunks 0..3
// A small FSM steps through one multiplication:
//   LOAD   a rising P0 bit 7 stores din into operand chunk P0[1:0]; when
//          every chunk has been written since the last multiplication,
//   CALC   the product of the operand registers is registered (one clock),
//   READY  a rising P0 bit 6 places result chunk P0[1:0] on dout the next
//          clock. A rising bit 7 starts the next multiplication.
// Timing: the product register and ready are set on the clock edge after
// the one that samples the last operand chunk's command; dout follows a read
// command by one clock. The CPU is far slower than this, so it never has to
// wait. ready (status) is high in READY. P0 bits 5:2 are not used.
//
// What follows the design: the P0/P1/P2 split, the command-stepped FSM
// shared by all three widths, the plain synthesised multiplication and the
// 8-bit packing of both operands in one transfer. This design's own choices:
// the chunk index in P0[1:0], edge-triggered commands and the ready flag.
module par_mult #(
  parameter int unsigned W = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  p0,
  input  logic [15:0] din,
  output logic [15:0] dout,
  output logic        ready
);

  localparam int unsigned NCH  = (2 * W) / 16;   // 16-bit chunks in {B, A}
  localparam int unsigned NOUT = (2 * W) / 16;   // 16-bit chunks in product

  typedef enum logic [1:0] {LOAD, CALC, READY} state_t;

  state_t         state;
  logic [7:6]     p0_q;                          // previous P0 command bits
  logic           ld_rise, rd_rise;
  logic [2*W-1:0] ops;                           // {B, A}
  logic [2*W-1:0] prod;
  logic [3:0]     loaded;                        // chunks written, bit per index
  logic [1:0]     idx;

  assign ld_rise = p0[7] & ~p0_q[7];
  assign rd_rise = p0[6] & ~p0_q[6];
  assign idx     = p0[1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= LOAD;
      p0_q   <= '0;
      ops    <= '0;
      prod   <= '0;
      loaded <= '0;
      dout   <= '0;
    end else begin
      p0_q <= p0[7:6];
      unique case (state)
        LOAD: begin
          if (ld_rise && 32'(idx) < NCH) begin
            ops[16*idx +: 16] <= din;
            loaded[idx]       <= 1'b1;
            if (&(loaded[NCH-1:0] | (NCH'(1) << idx))) state <= CALC;
          end
        end
        CALC: begin
          prod   <= ops[2*W-1:W] * ops[W-1:0];
          loaded <= '0;
          state  <= READY;
        end
        READY: begin
          if (rd_rise && 32'(idx) < NOUT) dout <= prod[16*idx +: 16];
          if (ld_rise && 32'(idx) < NCH) begin
            ops[16*idx +: 16] <= din;
            loaded            <= 4'(1) << idx;
            state             <= (NCH == 1) ? CALC : LOAD;
          end
        end
        default: state <= LOAD;
      endcase
    end
  end

  assign ready = (state == READY);

endmodule
