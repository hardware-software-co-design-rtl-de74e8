// ecc_ioreg: the IOregister of the data-path, n bits.
//
// Three uses: (1) a shift register through which field elements arrive
// from and leave to the 8-bit data register one bit per clock (the most
// significant bit leaves at serial_out, serial_in enters at bit 0);
// (2) during a double/add/subtract it holds the field polynomial, which it
// drives on bus3 to the multiplier and the squarer; (3) a constant source:
// IOreg_set2one loads the element 1.  Selection: IOreg_set2one has
// priority; otherwise, while IOreg_en is high, mux2_sel = 1 loads par_in
// (bus1) in parallel and mux2_sel = 0 shifts one place.  Updates on the
// rising clock edge.  The three uses follow the original design; the priority and
// the shift direction are this design's choices.
module ecc_ioreg #(
  parameter int unsigned N = 72
) (
  input  logic         clk,
  input  logic         global_reset,
  input  logic         IOreg_en,
  input  logic         IOreg_set2one,
  input  logic         mux2_sel,
  input  logic         serial_in,
  input  logic [N-1:0] par_in,
  output logic [N-1:0] q,
  output logic         serial_out
);
  always_ff @(posedge clk) begin
    if (global_reset)       q <= '0;
    else if (IOreg_set2one) q <= N'(1);
    else if (IOreg_en)      q <= mux2_sel ? par_in : {q[N-2:0], serial_in};
  end
  assign serial_out = q[N-1];
endmodule
