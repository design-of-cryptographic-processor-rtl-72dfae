// crypto_memory: program memory and data memory of the processor.
//
// Harvard style: instructions and data live in two separate arrays of
// 2**ADDR_W 32-bit words. Both are reached through one address, supplied by
// the address multiplexer, and the controller's Fetch line picks the array:
// high for the program memory (instruction fetch), low for the data memory
// (load and store). A read (mem_rd) is synchronous: the word appears in the
// output register data_reg, which drives the data bus, one clock later and
// stays there until the next read. A write (mem_wr, data memory only) takes
// wdata at the rising edge.
//
// A second, host port (host_*) fills either array before a program runs and
// reads results back from the data memory with one clock of latency. It
// stands in for loading the memories from a file; a host write wins over a
// processor write to the same data word in the same cycle. The sizes, the
// read latency and the host port are this design's choices.
module crypto_memory
  import crypto_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  // processor side
  input  logic              fetch,
  input  logic              mem_rd,
  input  logic              mem_wr,
  input  logic [ADDR_W-1:0] addr,
  input  logic [XLEN-1:0]   wdata,
  output logic [XLEN-1:0]   data_reg,
  // host side
  input  logic              host_we,
  input  logic              host_prog,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [XLEN-1:0]   host_wdata,
  output logic [XLEN-1:0]   host_rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [XLEN-1:0] prog_mem [DEPTH];
  logic [XLEN-1:0] data_mem [DEPTH];

  // Program memory: written only by the host.
  always_ff @(posedge clk) begin
    if (host_we && host_prog) prog_mem[host_addr] <= host_wdata;
  end

  // Data memory: processor store, host write.
  always_ff @(posedge clk) begin
    if (mem_wr && !fetch)      data_mem[addr]      <= wdata;
    if (host_we && !host_prog) data_mem[host_addr] <= host_wdata;
  end

  // Processor read port with its output register (DataReg).
  always_ff @(posedge clk) begin
    if (rst)         data_reg <= '0;
    else if (mem_rd) data_reg <= fetch ? prog_mem[addr] : data_mem[addr];
  end

  // Host read port.
  always_ff @(posedge clk) begin
    host_rdata <= data_mem[host_addr];
  end

  // The program memory is read-only to the processor.
  a_no_prog_write: assert property (@(posedge clk) disable iff (rst)
    !(mem_wr && fetch));
  // A read and a write never share a cycle.
  a_rd_wr_excl: assert property (@(posedge clk) disable iff (rst)
    !(mem_wr && mem_rd));

endmodule
