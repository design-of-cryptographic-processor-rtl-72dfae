// tb_program_counter: self-checking test of the program counter. Drives
// random combinations of reset, load and increment and compares the count
// after every clock with a model: reset first, then load, then increment,
// wrapping at 2**8.
module tb_program_counter;
  logic       clk = 0, rst, load_pc, inc;
  logic [7:0] ops_addr, pc_out, model;
  int checks = 0, failures = 0;

  program_counter #(.ADDR_W(8)) dut (.clk, .rst, .load_pc, .inc, .ops_addr, .pc_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load_pc = 0; inc = 0; ops_addr = 0;
    @(posedge clk); #1;
    model = 0;
    checks++;
    if (pc_out !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    // A run of increments past the wrap point.
    inc = 1;
    repeat (300) begin
      @(posedge clk); #1;
      model = model + 1;
      checks++;
      if (pc_out !== model) begin failures++; $display("FAIL inc pc=%h exp %h", pc_out, model); end
    end
    for (int n = 0; n < 1000; n++) begin
      rst      = ($urandom_range(30) == 0);
      load_pc  = ($urandom_range(3) == 0);
      inc      = 1'($urandom);
      ops_addr = 8'($urandom);
      @(posedge clk); #1;
      if (rst)          model = 0;
      else if (load_pc) model = ops_addr;
      else if (inc)     model = model + 1;
      checks++;
      if (pc_out !== model) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%h expected %h", pc_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
