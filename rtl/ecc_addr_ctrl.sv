// ecc_addr_ctrl: the address controller of the hardware controller.
//
// Turns the FSM's symbolic memory request (which variable to read on
// bus1, which on bus2, which to write from bus4) into the 15 address-control
// signals of the two RAM blocks: Ain, Aout1, Aout2 (4 bits each) and wen,
// oen1, oen2.  It resolves two symbolic addresses: the operand nibble of
// the current instruction (for load and read-out), and "y of the point
// being added", which is PY for an add and the scratch location holding
// PX+PY (the y of -P) for a subtract.  A write request for a location past
// the last RAM word is dropped.  Combinational.  That an address
// controller manages the two RAM blocks, and its 15 outputs, follow the
// original design; the rest is this design's.
module ecc_addr_ctrl
  import ecc_pkg::*;
(
  input  mem_req_t   req,
  input  addr_t      operand,
  input  logic       is_sub,
  output addr_ctrl_t ac
);
  function automatic addr_t resolve(addr_t a, addr_t opnd, logic sub);
    if (a == ADR_Y1)   return sub ? ADR_T3 : ADR_PY;
    if (a == ADR_OPND) return opnd;
    return a;
  endfunction

  always_comb begin
    ac.Ain   = resolve(req.dst,  operand, is_sub);
    ac.Aout1 = resolve(req.src1, operand, is_sub);
    ac.Aout2 = resolve(req.src2, operand, is_sub);
    ac.wen   = req.wr && (32'(ac.Ain) < NUM_LOC);
    ac.oen1  = req.rd1;
    ac.oen2  = req.rd2;
  end
endmodule
