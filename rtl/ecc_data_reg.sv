// ecc_data_reg: the 8-bit data register between the micro-controller's
// data bus and the data-path.
//
// The controller side writes a byte (avr_wr) or reads one (avr_rd, data on
// avr_dout).  The data-path side shifts: while shift is high the register
// moves one place towards its most significant end, taking serial_in (the
// IOregister's top bit) at bit 0 and offering bit 7 at serial_out, so that
// IOregister and data register form one rotating chain.  clear zeroes it
// (used before the first, partial byte of a read-out).
//
// Byte handshake: the hardware controller pulses req when it needs the
// controller to act (write the next byte of a load, or read the byte of a
// read-out); avr_turn then stays high, and doubles as the data-request
// interrupt, until the controller does so.  The 8-bit width and the
// serial link follow the original design; the avr_turn handshake is this design's.
module ecc_data_reg (
  input  logic       clk,
  input  logic       global_reset,
  input  logic       avr_wr,
  input  logic       avr_rd,
  input  logic [7:0] avr_din,
  output logic [7:0] avr_dout,
  input  logic       shift,
  input  logic       clear,
  input  logic       serial_in,
  output logic       serial_out,
  input  logic       req,
  output logic       avr_turn
);
  logic [7:0] d_q;

  always_ff @(posedge clk) begin
    if (global_reset)  d_q <= '0;
    else if (avr_wr)   d_q <= avr_din;
    else if (clear)    d_q <= '0;
    else if (shift)    d_q <= {d_q[6:0], serial_in};
  end

  always_ff @(posedge clk) begin
    if (global_reset)          avr_turn <= 1'b0;
    else if (req)              avr_turn <= 1'b1;
    else if (avr_wr || avr_rd) avr_turn <= 1'b0;
  end

  // Handshake rule: the controller only writes or reads a byte while the
  // register waits for it, and never both at once.
  always_ff @(posedge clk)
    if (!global_reset) begin
      a_strobe_when_turn: assert (!(avr_wr || avr_rd) || avr_turn);
      a_one_strobe:       assert (!(avr_wr && avr_rd));
    end

  assign avr_dout   = d_q;
  assign serial_out = d_q[7];
endmodule
