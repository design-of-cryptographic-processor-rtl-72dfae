// tb_reg_select_mux: self-checking test of the 16-to-1 operand multiplexer
// (used as MUXA and MUXD). Fills the sixteen inputs with random words and
// checks every select value, several times over.
module tb_reg_select_mux;
  import crypto_pkg::*;

  logic [31:0] regs [NREGS];
  logic [3:0]  sel;
  logic [31:0] y;
  int checks = 0, failures = 0;

  reg_select_mux dut (.regs_i(regs), .sel, .y);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < NREGS; i++) regs[i] = $urandom;
      for (int s = 0; s < NREGS; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (y !== regs[s]) begin
          failures++;
          $display("FAIL sel=%0d y=%h expected %h", s, y, regs[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
