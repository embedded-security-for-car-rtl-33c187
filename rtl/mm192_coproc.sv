// mm192_coproc: memory-mapped 192-bit modular multiplier for GF(P-192).
//
// The 8051 starts the co-processor with one byte on a parallel port. A rising
// bit 7 starts a multiplication whose operand and result locations are those
// of hardwired configuration cmd[3:0] (see p192_pkg). The co-processor then
// takes the data RAM through the memory multiplexer (busy = 1) and:
//   LOAD  48 byte reads, least significant byte first: the 24 bytes of
//         operand A are shifted into a 192-bit register, then the 24 bytes of
//         operand B are broadcast one per clock against A in bcast_mac. The
//         RAM answers one clock after the address, so the sequence is
//         pipelined: address k is issued while byte k-1 is consumed.
//   RED   the 384-bit product goes through p192_reduce and the reduced
//         result is kept in the co-processor.
// A rising bit 6 (CMD_WB) later writes the kept result, 24 bytes, into the
// result slot of the last configuration (state WB). Keeping the result until
// the CPU asks for it lets a configuration overwrite one of its own operands.
//
// Timing, counted from the clock edge that samples the rising command bit:
// multiplication 50 clocks busy (49 LOAD + 1 RED), write-back 24 clocks busy.
// done rises on the same edge as busy falls and stays high until the next
// command. Commands arriving while busy are a protocol error (asserted).
//
// What follows the design: the byte-serial memory interface, the twelve
// configurations selected by one command byte, the broadcast multiplier fed
// on the fly from memory, the hardware P-192 reduction and the result held
// until a command asks for it. This design's own choices: the command bit
// encoding, the busy/done status, the slot layout and the pipelined fetch.
module mm192_coproc
  import p192_pkg::*;
#(
  parameter int unsigned  ADDR_W = 16,
  parameter logic [15:0]  BASE   = 16'h0000   // address of slot 0 (d)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        cmd,
  output logic              busy,
  output logic              done,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [7:0]        mem_wdata,
  output logic              mem_we,
  input  logic [7:0]        mem_rdata
);

  typedef enum logic [1:0] {IDLE, LOAD, RED, WB} state_t;

  state_t      state;
  logic [7:0]  cmd_q;
  logic        mul_rise, wb_rise;
  mm_cfg_t     cfg;
  logic [5:0]  cnt;
  fp_t         a_reg;
  fp_t         res_q;
  dfp_t        prod;
  fp_t         red;
  logic        mac_clr, mac_en;

  assign mul_rise = cmd[CMD_MUL] & ~cmd_q[CMD_MUL];
  assign wb_rise  = cmd[CMD_WB]  & ~cmd_q[CMD_WB];

  function automatic logic [ADDR_W-1:0] slot_addr(input slot_t s);
    return ADDR_W'(BASE) + ADDR_W'(s) * ADDR_W'(NBYTES);
  endfunction

  // Byte read during LOAD step cnt (0..47) and byte written during WB.
  always_comb begin
    mem_we    = 1'b0;
    mem_wdata = res_q[7:0];
    mem_addr  = '0;
    unique case (state)
      LOAD:    mem_addr = (cnt < 6'(NBYTES)) ? slot_addr(cfg.a) + ADDR_W'(cnt)
                                             : slot_addr(cfg.b) + ADDR_W'(cnt - 6'(NBYTES));
      WB: begin
        mem_addr = slot_addr(cfg.r) + ADDR_W'(cnt);
        mem_we   = 1'b1;
      end
      default: mem_addr = '0;
    endcase
  end

  // The byte arriving at step cnt is byte cnt-1 of the 48-byte sequence.
  assign mac_clr = (state == IDLE);
  assign mac_en  = (state == LOAD) && (cnt > 6'(NBYTES));

  bcast_mac #(.AW(FW), .BW(8)) u_mac (
    .clk (clk),
    .clr (mac_clr),
    .en  (mac_en),
    .a   (a_reg),
    .b   (mem_rdata),
    .acc (prod)
  );

  p192_reduce u_red (
    .x (prod),
    .r (red)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      cmd_q <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      cfg   <= mm_cfg(4'd0);
      a_reg <= '0;
      res_q <= '0;
    end else begin
      cmd_q <= cmd;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (mul_rise) begin
            cfg   <= mm_cfg(cmd[3:0]);
            state <= LOAD;
            done  <= 1'b0;
          end else if (wb_rise) begin
            state <= WB;
            done  <= 1'b0;
          end
        end
        LOAD: begin
          if (cnt >= 6'd1 && cnt <= 6'(NBYTES))
            a_reg <= {mem_rdata, a_reg[FW-1:8]};
          if (cnt == 6'(2*NBYTES)) state <= RED;
          cnt <= cnt + 6'd1;
        end
        RED: begin
          res_q <= red;
          state <= IDLE;
          done  <= 1'b1;
        end
        WB: begin
          res_q <= {res_q[7:0], res_q[FW-1:8]};   // rotate: result kept
          if (cnt == 6'(NBYTES - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
          cnt <= cnt + 6'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // Handshake rule: the CPU issues a new command only while the
  // co-processor is idle.
  a_no_cmd_when_busy: assert property (@(posedge clk) disable iff (rst)
    busy |-> !(mul_rise || wb_rise))
    else $error("mm192_coproc: command issued while busy");

endmodule
