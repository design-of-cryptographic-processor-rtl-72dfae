// tb_addr_mux: self-checking test of the memory address multiplexer: with
// Fetch high the PC must appear at the memory address, with Fetch low the
// operand address.
module tb_addr_mux;
  logic       fetch;
  logic [7:0] pc_out, ops_addr, addr;
  int checks = 0, failures = 0;

  addr_mux #(.ADDR_W(8)) dut (.fetch, .pc_out, .ops_addr, .addr);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      fetch    = 1'($urandom);
      pc_out   = 8'($urandom);
      ops_addr = 8'($urandom);
      #1;
      checks++;
      if (addr !== (fetch ? pc_out : ops_addr)) begin
        failures++;
        if (failures < 10)
          $display("FAIL fetch=%b pc=%h ops=%h addr=%h", fetch, pc_out, ops_addr, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
