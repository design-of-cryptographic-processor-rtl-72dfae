// tb_gp_registers: self-checking test of the sixteen-register block.
//
// Checks that reset clears every register, then performs random writes,
// some with the write enable low, and after each clock compares all sixteen
// outputs with a shadow copy kept by the testbench.
module tb_gp_registers;
  import crypto_pkg::*;

  logic        clk = 0, rst, we;
  logic [3:0]  sel_d;
  logic [31:0] wdata;
  logic [31:0] regs [NREGS];
  logic [31:0] shadow [NREGS];
  int checks = 0, failures = 0;

  gp_registers dut (.clk, .rst, .we, .sel_d, .wdata, .regs_o(regs));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < NREGS; i++) begin
      checks++;
      if (regs[i] !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL reg%0d=%h expected %h", i, regs[i], shadow[i]);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; sel_d = 0; wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < NREGS; i++) shadow[i] = 0;
    compare_all();
    for (int n = 0; n < 400; n++) begin
      we    = ($urandom_range(3) != 0);
      sel_d = 4'($urandom);
      wdata = $urandom;
      @(posedge clk); #1;
      if (we) shadow[sel_d] = wdata;
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
