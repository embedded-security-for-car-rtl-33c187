// tb_mem_mux: self-checking test of the exclusive memory multiplexer.
//
// Applies random CPU-side and co-processor-side address, data and write
// strobes with the select in both positions, and checks that the memory side
// carries exactly the selected requester's signals (so the other side can
// never write). Combinational block: #1 between drive and check. A watchdog
// ends a hung run.
module tb_mem_mux;
  localparam int unsigned ADDR_W = 16;

  logic              sel_cop;
  logic [ADDR_W-1:0] cpu_addr, cop_addr, mem_addr;
  logic [7:0]        cpu_wdata, cop_wdata, mem_wdata;
  logic              cpu_we, cop_we, mem_we;
  int checks = 0, failures = 0;

  mem_mux #(.ADDR_W(ADDR_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      sel_cop   = 1'($urandom);
      cpu_addr  = 16'($urandom); cpu_wdata = 8'($urandom); cpu_we = 1'($urandom);
      cop_addr  = 16'($urandom); cop_wdata = 8'($urandom); cop_we = 1'($urandom);
      #1;
      checks++;
      if (sel_cop ? {mem_addr, mem_wdata, mem_we} !== {cop_addr, cop_wdata, cop_we}
                  : {mem_addr, mem_wdata, mem_we} !== {cpu_addr, cpu_wdata, cpu_we}) begin
        failures++;
        $display("FAIL sel=%0d mem=%h/%h/%0d", sel_cop, mem_addr, mem_wdata, mem_we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
