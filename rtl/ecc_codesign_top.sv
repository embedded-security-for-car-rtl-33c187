// ecc_codesign_top: the hardware side of the P-192 Edwards-curve co-design.
//
// An 8051 runs the elliptic-curve software; the field multiplication, which
// dominates the run time, is handed to a co-processor. This top holds the
// co-processors the design offers, side by side, each with its own
// 8051-facing ports (the processor itself is outside):
//   * The memory-mapped 192-bit modular multiplier (mm192_coproc). It shares
//     the byte-wide data RAM (xram) with the 8051 through mem_mux: while
//     mm_busy is high the co-processor owns the RAM and the CPU port's writes
//     are ignored and its reads return co-processor traffic. The CPU side is
//     cpu_addr/cpu_wdata/cpu_we/cpu_rdata (external data space, one clock
//     read latency) and the command port mm_p0.
//   * Three parallel-port multipliers (par_mult with W = 8, 16, 32), each on
//     its own P0 command port (pmN_p0) and 16-bit P1/P2 data pair.
// A configuration of the full system uses one of the four co-processors; all
// four are built here so that each can be exercised.
// Timing is that of the blocks: see mm192_coproc and par_mult.
module ecc_codesign_top #(
  parameter int unsigned ADDR_W  = 16,
  parameter logic [15:0] MM_BASE = 16'h0000
) (
  input  logic              clk,
  input  logic              rst,
  // 8051 external data memory port
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [7:0]        cpu_wdata,
  input  logic              cpu_we,
  output logic [7:0]        cpu_rdata,
  // 192-bit modular multiplier
  input  logic [7:0]        mm_p0,
  output logic              mm_busy,
  output logic              mm_done,
  // parallel-port multipliers
  input  logic [7:0]        pm8_p0,
  input  logic [15:0]       pm8_din,
  output logic [15:0]       pm8_dout,
  output logic              pm8_ready,
  input  logic [7:0]        pm16_p0,
  input  logic [15:0]       pm16_din,
  output logic [15:0]       pm16_dout,
  output logic              pm16_ready,
  input  logic [7:0]        pm32_p0,
  input  logic [15:0]       pm32_din,
  output logic [15:0]       pm32_dout,
  output logic              pm32_ready
);

  logic [ADDR_W-1:0] cop_addr, mem_addr;
  logic [7:0]        cop_wdata, mem_wdata, mem_rdata;
  logic              cop_we, mem_we;

  mm192_coproc #(.ADDR_W(ADDR_W), .BASE(MM_BASE)) u_mm (
    .clk       (clk),
    .rst       (rst),
    .cmd       (mm_p0),
    .busy      (mm_busy),
    .done      (mm_done),
    .mem_addr  (cop_addr),
    .mem_wdata (cop_wdata),
    .mem_we    (cop_we),
    .mem_rdata (mem_rdata)
  );

  mem_mux #(.ADDR_W(ADDR_W)) u_mux (
    .sel_cop   (mm_busy),
    .cpu_addr  (cpu_addr),
    .cpu_wdata (cpu_wdata),
    .cpu_we    (cpu_we),
    .cop_addr  (cop_addr),
    .cop_wdata (cop_wdata),
    .cop_we    (cop_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_we    (mem_we)
  );

  xram #(.ADDR_W(ADDR_W)) u_ram (
    .clk   (clk),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .we    (mem_we),
    .rdata (mem_rdata)
  );

  assign cpu_rdata = mem_rdata;

  par_mult #(.W(8)) u_pm8 (
    .clk (clk), .rst (rst), .p0 (pm8_p0), .din (pm8_din),
    .dout (pm8_dout), .ready (pm8_ready)
  );

  par_mult #(.W(16)) u_pm16 (
    .clk (clk), .rst (rst), .p0 (pm16_p0), .din (pm16_din),
    .dout (pm16_dout), .ready (pm16_ready)
  );

  par_mult #(.W(32)) u_pm32 (
    .clk (clk), .rst (rst), .p0 (pm32_p0), .din (pm32_din),
    .dout (pm32_dout), .ready (pm32_ready)
  );

endmodule
