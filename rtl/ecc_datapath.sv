// ecc_datapath: the GF(2^n) data-path: storage, three field operators and
// four busses.
//
// Storage: two 13-word RAM blocks that are always written together (one
// write port, bus4) and read independently (RAM1 -> bus1, RAM2 -> bus2),
// so that they act as one single-write, dual-read memory; plus the
// IOregister, which drives bus3.  Operators: adder (XOR, combinational),
// bit-serial multiplier (n cycles) and serial squarer (floor(n/2) cycles);
// in1 of each operator is bus1, in2 is bus2 and the field polynomial is
// bus3.  mux1 picks the value for bus4 (adder, multiplier, squarer or
// bus3); mux2 picks what the IOregister loads (serial data or bus1).
// Zero detectors: zero1 flags bus1 == 0; zero2or3 flags bus2 == 0 while
// RAM2 drives its bus, and bus3 == 0 otherwise.
//
// Interface: the 15 address-control and 7 logic-control signals come in as
// two structs; the 4 status signals go out as one.  serial_in/serial_out
// link the IOregister to the data register.  Everything is synchronous to
// clk.  A field-polynomial-driven multiply or square needs the polynomial
// in the IOregister for its whole run.
//
// The blocks, busses, multiplexers and signal names follow the original
// data-path; the zero-detector rule and the mux encodings are this
// design's choices.  The design is written at the word level; the
// original design's six kinds of bit slice are the bit columns of this netlist.
module ecc_datapath
  import ecc_pkg::*;
#(
  parameter int unsigned N = 72
) (
  input  logic        clk,
  input  logic        global_reset,
  input  addr_ctrl_t  ac,
  input  logic_ctrl_t lc,
  input  logic        serial_in,
  output logic        serial_out,
  output status_t     status
);
  logic [N-1:0] bus1, bus2, bus3, bus4;
  logic [N-1:0] add_out, mul_out, sqr_out;
  logic         mul_ready, sqr_ready;

  ecc_ram #(.N(N), .DEPTH(NUM_LOC), .ADDR_W(ADDR_W)) u_ram1 (
    .clk, .wen(ac.wen), .Ain(ac.Ain), .din(bus4),
    .oen(ac.oen1), .Aout(ac.Aout1), .dout(bus1));

  ecc_ram #(.N(N), .DEPTH(NUM_LOC), .ADDR_W(ADDR_W)) u_ram2 (
    .clk, .wen(ac.wen), .Ain(ac.Ain), .din(bus4),
    .oen(ac.oen2), .Aout(ac.Aout2), .dout(bus2));

  ecc_ioreg #(.N(N)) u_ioreg (
    .clk, .global_reset,
    .IOreg_en(lc.IOreg_en), .IOreg_set2one(lc.IOreg_set2one),
    .mux2_sel(lc.mux2_sel), .serial_in, .par_in(bus1),
    .q(bus3), .serial_out);

  gf2m_adder #(.N(N)) u_add (.in1(bus1), .in2(bus2), .sum(add_out));

  gf2m_mul_serial #(.N(N)) u_mul (
    .clk, .global_reset, .mul_start(lc.mul_start),
    .in1(bus1), .in2(bus2), .fieldpoly(bus3),
    .result(mul_out), .mul_ready);

  gf2m_sqr_serial #(.N(N)) u_sqr (
    .clk, .global_reset, .sqr_start(lc.sqr_start),
    .in1(bus1), .fieldpoly(bus3),
    .result(sqr_out), .sqr_ready);

  always_comb begin
    unique case (lc.mux1_sel)
      M1_ADD:  bus4 = add_out;
      M1_MUL:  bus4 = mul_out;
      M1_SQR:  bus4 = sqr_out;
      M1_BUS3: bus4 = bus3;
      default: bus4 = add_out;
    endcase
  end

  always_comb begin
    status.mul_ready = mul_ready;
    status.sqr_ready = sqr_ready;
    status.zero1     = (bus1 == '0);
    status.zero2or3  = ac.oen2 ? (bus2 == '0) : (bus3 == '0);
  end
endmodule
