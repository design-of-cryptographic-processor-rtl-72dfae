// program_counter: holds the address of the next instruction.
//
// On a rising clock edge: reset clears it; load_pc replaces it with the
// operand address from the instruction register (a jump); otherwise inc
// advances it by one after an instruction has been fetched. Reset has
// priority over load, and load over increment; this priority and the
// synchronous active-high reset are this design's choices.
module program_counter #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load_pc,
  input  logic              inc,
  input  logic [ADDR_W-1:0] ops_addr,
  output logic [ADDR_W-1:0] pc_out
);

  always_ff @(posedge clk) begin
    if (rst)          pc_out <= '0;
    else if (load_pc) pc_out <= ops_addr;
    else if (inc)     pc_out <= pc_out + 1'b1;
  end

endmodule
