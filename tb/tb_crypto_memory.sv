// tb_crypto_memory: self-checking test of the program and data memories.
//
// Fills both arrays through the host port, then issues random processor
// reads (Fetch high: program memory, low: data memory), processor writes to
// data memory and host reads, and compares with a model of both arrays. A
// read must appear in data_reg one clock later and stay there while no
// further read is issued.
module tb_crypto_memory;
  import crypto_pkg::*;

  localparam int AW = 4;
  localparam int DEPTH = 1 << AW;

  logic          clk = 0, rst;
  logic          fetch, mem_rd, mem_wr, host_we, host_prog;
  logic [AW-1:0] addr, host_addr;
  logic [31:0]   wdata, host_wdata, data_reg, host_rdata;
  logic [31:0]   pmodel [DEPTH];
  logic [31:0]   dmodel [DEPTH];
  logic [31:0]   exp_reg;
  int checks = 0, failures = 0;

  crypto_memory #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; fetch = 0; mem_rd = 0; mem_wr = 0; host_we = 0; host_prog = 0;
    addr = 0; host_addr = 0; wdata = 0; host_wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    check("data_reg after reset", data_reg, 0);
    exp_reg = 0;
    // Fill both memories through the host port.
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < DEPTH; i++) begin
        host_we = 1; host_prog = 1'(p); host_addr = AW'(i); host_wdata = $urandom;
        @(posedge clk); #1;
        if (p == 1) pmodel[i] = host_wdata; else dmodel[i] = host_wdata;
      end
    host_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int kind;
      kind   = $urandom_range(3);
      fetch  = 1'($urandom);
      addr   = AW'($urandom);
      wdata  = $urandom;
      mem_rd = (kind == 0);
      mem_wr = (kind == 1) && !fetch;
      host_addr = AW'($urandom);
      @(posedge clk); #1;
      if (mem_rd) exp_reg = fetch ? pmodel[addr] : dmodel[addr];
      check("host_rdata", host_rdata, dmodel[host_addr]);
      if (mem_wr) dmodel[addr] = wdata;
      check("data_reg", data_reg, exp_reg);
    end
    mem_rd = 0; mem_wr = 0;
    // Read back the whole data memory through the host port.
    for (int i = 0; i < DEPTH; i++) begin
      host_addr = AW'(i);
      @(posedge clk); #1;
      check("final host_rdata", host_rdata, dmodel[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
