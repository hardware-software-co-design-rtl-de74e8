// gf2m_adder: addition in GF(2^n) with a standard (polynomial) basis.
//
// Adding two field elements is a bitwise XOR of their coefficients: there
// is no carry.  Purely combinational; in1 and in2 come from bus1 and bus2,
// sum goes to the bus4 multiplexer.  As in the original design.
module gf2m_adder #(
  parameter int unsigned N = 72   // field size n
) (
  input  logic [N-1:0] in1,
  input  logic [N-1:0] in2,
  output logic [N-1:0] sum
);
  always_comb sum = in1 ^ in2;
endmodule
