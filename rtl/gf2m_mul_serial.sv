// gf2m_mul_serial: bit-serial GF(2^n) multiplier, standard basis, with a
// programmable field polynomial.
//
// Interleaved multiply-and-reduce in a linear feedback shift register.
// Each cycle the accumulator c is shifted one place towards the most
// significant end; the bit pushed out of c[n-1] is fed back, ANDed with the
// field-polynomial coefficients (fieldpoly holds f_0..f_{n-1}, the x^n term
// is implicit), and, if the current b bit is one, the multiplicand a is
// added.  b is consumed most significant bit first.  After n steps
// c = a*b mod f.
//
// Timing: mul_start is sampled on a rising clock edge; that edge loads a
// and b and already performs the first step, so the product is in result
// n clock edges after the start edge.  ready is high while no
// multiplication is running and start is low; result holds its value until
// the next start.  fieldpoly must stay stable while the multiplier runs
// (the IOregister holds it).
//
// The LFSR structure, the AND array on the feedback and the n-cycle
// latency follow the original design; the ready/start handshake and the merged
// load-and-first-step are this design's choices.
module gf2m_mul_serial #(
  parameter int unsigned N = 72
) (
  input  logic         clk,
  input  logic         global_reset,
  input  logic         mul_start,
  input  logic [N-1:0] in1,        // a
  input  logic [N-1:0] in2,        // b
  input  logic [N-1:0] fieldpoly,
  output logic [N-1:0] result,
  output logic         mul_ready
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  a_q, b_q, c_q;
  logic [CW-1:0] cnt_q;
  logic          busy_q;

  // One LFSR step: c*x mod f, plus a when the b bit is one.
  function automatic logic [N-1:0] step(logic [N-1:0] c, logic [N-1:0] a,
                                        logic bbit, logic [N-1:0] f);
    logic [N-1:0] s;
    s = {c[N-2:0], 1'b0} ^ (f & {N{c[N-1]}});
    return s ^ (a & {N{bbit}});
  endfunction

  always_ff @(posedge clk) begin
    if (global_reset) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
      a_q    <= '0;
      b_q    <= '0;
      c_q    <= '0;
    end else if (mul_start) begin
      a_q    <= in1;
      b_q    <= {in2[N-2:0], 1'b0};
      c_q    <= in1 & {N{in2[N-1]}};
      cnt_q  <= CW'(N - 1);
      busy_q <= (N > 1);
    end else if (busy_q) begin
      c_q    <= step(c_q, a_q, b_q[N-1], fieldpoly);
      b_q    <= {b_q[N-2:0], 1'b0};
      cnt_q  <= cnt_q - 1'b1;
      busy_q <= (cnt_q != CW'(1));
    end
  end

  assign result    = c_q;
  assign mul_ready = ~busy_q & ~mul_start;
endmodule
