// tb_instruction_register: self-checking test of the instruction register.
// Loads random words, holds them with load low, and checks every field:
// opcode [31:28], rd [27:24], ra [23:20], rb [19:16] and the operand address
// [7:0] for an 8-bit address.
module tb_instruction_register;
  import crypto_pkg::*;

  logic        clk = 0, rst, load;
  logic [31:0] data_bus, held;
  opcode_e     opcode;
  logic [3:0]  rd, ra, rb;
  logic [7:0]  ops_addr;
  int checks = 0, failures = 0;

  instruction_register #(.ADDR_W(8)) dut (.clk, .rst, .load, .data_bus,
                                          .opcode, .rd, .ra, .rb, .ops_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_fields();
    checks++;
    if (opcode !== opcode_e'(held[31:28]) || rd !== held[27:24] || ra !== held[23:20] ||
        rb !== held[19:16] || ops_addr !== held[7:0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL held=%h op=%h rd=%h ra=%h rb=%h addr=%h", held, opcode, rd, ra, rb, ops_addr);
    end
  endtask

  initial begin
    rst = 1; load = 0; data_bus = 32'hffff_ffff;
    @(posedge clk); #1;
    rst = 0;
    held = 0;
    check_fields();
    for (int n = 0; n < 1000; n++) begin
      load     = 1'($urandom);
      data_bus = $urandom;
      @(posedge clk); #1;
      if (load) held = data_bus;
      check_fields();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
