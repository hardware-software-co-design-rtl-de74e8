// ecc_hw_ctrl: the hardware controller, i.e. the double/add/subtract FSM
// together with the address controller.
//
// Inputs are the instruction register's opcode and operand nibble, the
// registered status of the data-path and the data register's handshake
// flag; outputs are the 15 address-control and 7 logic-control signals
// (combinational, registered by the caller), the data register's byte
// request, the instruction register's reset line and a done pulse.  The
// split into these two parts follows the original design.
module ecc_hw_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned N = 72
) (
  input  logic        clk,
  input  logic        global_reset,
  input  opcode_e     opcode,
  input  addr_t       operand,
  input  logic        pending,
  input  status_t     status,
  input  logic        avr_turn,
  output addr_ctrl_t  ac,
  output logic_ctrl_t lc,
  output logic        dr_req,
  output logic        instr_clear,
  output logic        done
);
  mem_req_t mreq;
  logic     is_sub;

  ecc_fsm_das #(.N(N)) u_fsm (
    .clk, .global_reset, .opcode, .pending, .status, .avr_turn,
    .mreq, .lc, .dr_req, .instr_clear, .done, .is_sub);

  ecc_addr_ctrl u_addr (.req(mreq), .operand, .is_sub, .ac);
endmodule
