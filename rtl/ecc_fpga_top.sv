// ecc_fpga_top: the programmable-logic part of an elliptic-curve point
// multiplier over GF(2^n): instruction register, data register, hardware
// controller and data-path.
//
// An 8-bit micro-controller stays in charge of the point multiplication
// (it decides, digit by digit of k, when to double, add or subtract) and
// talks to this block through two 8-bit registers.  It writes instructions
// (instr_wr) and data bytes (data_wr), reads result bytes (data_rd) and is
// interrupted by irq[0] (the last instruction has finished; cleared by the
// next instruction write) and irq[1] (the data register waits for the
// controller to write or read a byte).
//
// Inside, the hardware controller drives the data-path through a
// register stage on its 15 address-control and 7 logic-control lines, and
// sees the data-path's 4 status lines through another register, as in the
// original architecture; the interrupt lines are registered too.
// The data register and the IOregister shift into each other one bit per
// clock.  Single clock, synchronous active-high reset.
//
// Operation cost at field size n: a multiplication n cycles, a squaring
// floor(n/2), an addition 1, plus a few cycles of control overhead each.
module ecc_fpga_top
  import ecc_pkg::*;
#(
  parameter int unsigned N = 72   // field size n
) (
  input  logic       clk,
  input  logic       global_reset,
  input  logic       instr_wr,
  input  logic       data_wr,
  input  logic       data_rd,
  input  logic [7:0] avr_din,
  output logic [7:0] avr_dout,
  output logic [1:0] irq
);
  opcode_e     opcode;
  addr_t       operand;
  logic        pending, instr_clear, done;
  logic        dr_req, dr_req_q, avr_turn;
  addr_ctrl_t  ac_d, ac_q;
  logic_ctrl_t lc_d, lc_q;
  status_t     status_d, status_q;
  logic        ser_dr2io, ser_io2dr;

  ecc_instr_reg u_ir (
    .clk, .global_reset, .instr_wr, .instr_in(avr_din), .clear(instr_clear),
    .opcode, .operand, .pending);

  ecc_hw_ctrl #(.N(N)) u_hc (
    .clk, .global_reset, .opcode, .operand, .pending, .status(status_q),
    .avr_turn, .ac(ac_d), .lc(lc_d), .dr_req, .instr_clear, .done);

  // Register stage between hardware controller and data-path.
  always_ff @(posedge clk) begin
    if (global_reset) begin
      ac_q     <= ADDR_CTRL_IDLE;
      lc_q     <= LOGIC_CTRL_IDLE;
      dr_req_q <= 1'b0;
      status_q <= '0;
      irq      <= '0;
    end else begin
      ac_q     <= ac_d;
      lc_q     <= lc_d;
      dr_req_q <= dr_req;
      status_q <= status_d;
      irq[1]   <= avr_turn;
      if (done)          irq[0] <= 1'b1;
      else if (instr_wr) irq[0] <= 1'b0;
    end
  end

  ecc_data_reg u_dr (
    .clk, .global_reset, .avr_wr(data_wr), .avr_rd(data_rd),
    .avr_din, .avr_dout,
    .shift(lc_q.IOreg_en && !lc_q.mux2_sel && !lc_q.IOreg_set2one),
    .clear(lc_q.IOreg_en && lc_q.mux2_sel),
    .serial_in(ser_io2dr), .serial_out(ser_dr2io),
    .req(dr_req_q), .avr_turn);

  ecc_datapath #(.N(N)) u_dp (
    .clk, .global_reset, .ac(ac_q), .lc(lc_q),
    .serial_in(ser_dr2io), .serial_out(ser_io2dr), .status(status_d));
endmodule
