// ecc_ram: one RAM block of the data-path, 13 words of n bits.
//
// Synchronous write (wen, address Ain, data din) and asynchronous read at
// Aout; the output is driven onto its bus only while oen is high and is
// zero otherwise.  A write to an address past the last word is ignored and
// such a read returns zero.  Two instances, written together with the same
// address and data and read at independent addresses, make up the
// single-write, dual-read memory of the data-path.  The word count follows
// the original design; the asynchronous read and the zero-when-disabled output are
// this design's choices.  The array is not reset.
module ecc_ram #(
  parameter int unsigned N      = 72,
  parameter int unsigned DEPTH  = 13,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              wen,
  input  logic [ADDR_W-1:0] Ain,
  input  logic [N-1:0]      din,
  input  logic              oen,
  input  logic [ADDR_W-1:0] Aout,
  output logic [N-1:0]      dout
);
  logic [N-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (wen && (32'(Ain) < DEPTH)) mem[Ain] <= din;

  always_comb
    dout = (oen && (32'(Aout) < DEPTH)) ? mem[Aout] : '0;
endmodule
