// mem_mux: exclusive access to the data RAM for the 8051 or the co-processor.
//
// While sel_cop is high the co-processor's address, data and write strobe
// reach the RAM and the CPU's write strobe is blocked; otherwise the CPU owns
// the port. Read data goes to both sides; only the owner may use it. Purely
// combinational. The design names this multiplexer and its exclusive rule;
// driving the select from the co-processor's busy flag is this design's own
// choice.
module mem_mux #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              sel_cop,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [7:0]        cpu_wdata,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cop_addr,
  input  logic [7:0]        cop_wdata,
  input  logic              cop_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [7:0]        mem_wdata,
  output logic              mem_we
);

  always_comb begin
    if (sel_cop) begin
      mem_addr  = cop_addr;
      mem_wdata = cop_wdata;
      mem_we    = cop_we;
    end else begin
      mem_addr  = cpu_addr;
      mem_wdata = cpu_wdata;
      mem_we    = cpu_we;
    end
  end

endmodule
