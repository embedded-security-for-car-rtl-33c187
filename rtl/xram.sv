// xram: byte-wide synchronous data RAM shared by the 8051 and the 192-bit
// co-processor.
//
// One port: on each rising edge a write stores wdata at addr when we is high;
// rdata always returns the byte at the address of the previous clock (read
// first: a write returns the old byte). This one-cycle read latency is what
// the co-processor's fetch sequencer is built around. In the design this is
// the FPGA's block-RAM memory core, used as the 8051 external data space
// (16-bit address); the single registered port is this module's own choice.
module xram #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [7:0]        wdata,
  input  logic              we,
  output logic [7:0]        rdata
);

  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
