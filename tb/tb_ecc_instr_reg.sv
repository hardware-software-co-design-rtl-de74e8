// tb_ecc_instr_reg: checks the instruction register: opcode (upper nibble)
// and operand (lower nibble) after a write, pending flag, clear by the
// reset-instruction line, and a write winning over a simultaneous clear.
module tb_ecc_instr_reg;
  import ecc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr, clr, pend;
  logic [7:0] din;
  opcode_e op;
  addr_t opnd;

  ecc_instr_reg dut (.clk, .global_reset(rst), .instr_wr(wr), .instr_in(din),
    .clear(clr), .opcode(op), .operand(opnd), .pending(pend));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wr = 0; clr = 0; din = 0;
    @(negedge clk) rst = 0;
    chk(!pend, "empty after reset");
    for (int i = 0; i < 256; i++) begin
      wr = 1; din = 8'(i); @(negedge clk) wr = 0; din = 8'hff;
      chk(4'(op) == 4'(i >> 4) && opnd == 4'(i), $sformatf("fields %02h", i));
      chk(pend == ((i >> 4) != 0), $sformatf("pending %02h", i));
      @(negedge clk);
      chk(4'(op) == 4'(i >> 4), "holds");
      clr = 1; @(negedge clk) clr = 0;
      chk(!pend && op == OP_NOP, "cleared");
    end
    wr = 1; clr = 1; din = 8'h35; @(negedge clk) wr = 0; clr = 0;
    chk(op == OP_DOUBLE && opnd == 4'h5, "write wins over clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
