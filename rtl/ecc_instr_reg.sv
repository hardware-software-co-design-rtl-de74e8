// ecc_instr_reg: the instruction register between the micro-controller
// and the hardware controller.
//
// The controller writes an 8-bit instruction (instr_wr): the upper nibble
// is the opcode, which goes to the double/add/subtract FSM, the lower nibble
// a memory location, which goes to the address controller.  The register
// holds the instruction while it executes; the FSM's reset-instruction
// line (clear) empties it (opcode NOP) when the instruction has finished.
// A write in the same cycle as a clear wins.  The 8-bit width, the
// opcode path to the FSM and the reset line follow the original
// architecture; the nibble split is this design's choice.
module ecc_instr_reg
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       global_reset,
  input  logic       instr_wr,
  input  logic [7:0] instr_in,
  input  logic       clear,
  output opcode_e    opcode,
  output addr_t      operand,
  output logic       pending
);
  logic [7:0] q;

  always_ff @(posedge clk) begin
    if (global_reset)  q <= '0;
    else if (instr_wr) q <= instr_in;
    else if (clear)    q <= '0;
  end

  // Protocol rule: a new instruction is written only once the previous one
  // has finished (the register is empty, or being cleared).
  always_ff @(posedge clk)
    if (!global_reset)
      a_no_overwrite: assert (!instr_wr || q[7:4] == 4'h0 || clear);

  assign opcode  = opcode_e'(q[7:4]);
  assign operand = q[3:0];
  assign pending = (q[7:4] != 4'h0);
endmodule
