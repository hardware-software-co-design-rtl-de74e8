// gf2m_sqr_serial: serial GF(2^n) squarer, standard basis, programmable
// field polynomial.
//
// a^2 = sum a_i x^(2i) is evaluated by Horner's rule in x^2: the
// accumulator c is multiplied by x^2 (two shift-and-reduce steps, i.e. the
// even and odd coefficient rows of the original structure) and the next
// a bit, most significant first, is added into c_0.  For the upper
// ceil(n/2) bits of a the feedback stays zero, so they are preloaded in one
// go into the even coefficients c_0, c_2, ...  (a_L -> c_0, a_{L+1} -> c_2,
// ... with L = floor(n/2)).  Only the lower L bits of a then need a cycle
// each.
//
// Timing: sqr_start is sampled on a rising edge; that edge does the preload
// and the first x^2 step, so the square is in result floor(n/2) clock edges
// after the start edge.  sqr_ready is high while idle and start is low;
// result holds until the next start.  fieldpoly must stay stable meanwhile.
//
// Preload positions and the floor(n/2) latency follow the original design; the
// handshake and merging preload with the first step are this design's own.
module gf2m_sqr_serial #(
  parameter int unsigned N = 72
) (
  input  logic         clk,
  input  logic         global_reset,
  input  logic         sqr_start,
  input  logic [N-1:0] in1,
  input  logic [N-1:0] fieldpoly,
  output logic [N-1:0] result,
  output logic         sqr_ready
);
  localparam int unsigned L  = N / 2;           // bits shifted in serially
  localparam int unsigned H  = N - L;           // bits preloaded
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  c_q;
  logic [N-1:0]  s_q;         // lower bits of a, shifted out MSB first
  logic [CW-1:0] cnt_q;
  logic          busy_q;

  function automatic logic [N-1:0] mulx(logic [N-1:0] c, logic [N-1:0] f);
    return {c[N-2:0], 1'b0} ^ (f & {N{c[N-1]}});
  endfunction

  function automatic logic [N-1:0] step(logic [N-1:0] c, logic abit,
                                        logic [N-1:0] f);
    logic [N-1:0] s;
    s = mulx(mulx(c, f), f);
    s[0] = s[0] ^ abit;
    return s;
  endfunction

  function automatic logic [N-1:0] preload(logic [N-1:0] a);
    logic [N-1:0] p;
    p = '0;
    for (int unsigned j = 0; j < H; j++) p[2*j] = a[L+j];
    return p;
  endfunction

  logic [N-1:0] pre;
  always_comb pre = preload(in1);

  always_ff @(posedge clk) begin
    if (global_reset) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
      c_q    <= '0;
      s_q    <= '0;
    end else if (sqr_start) begin
      if (L > 0) begin
        c_q    <= step(pre, in1[(L > 0) ? L-1 : 0], fieldpoly);
        s_q    <= in1 << (N - L + 1);     // a_{L-2} .. a_0 at the top
        cnt_q  <= CW'(L - 1);
        busy_q <= (L > 1);
      end else begin
        c_q    <= pre;
        busy_q <= 1'b0;
      end
    end else if (busy_q) begin
      c_q    <= step(c_q, s_q[N-1], fieldpoly);
      s_q    <= {s_q[N-2:0], 1'b0};
      cnt_q  <= cnt_q - 1'b1;
      busy_q <= (cnt_q != CW'(1));
    end
  end

  assign result    = c_q;
  assign sqr_ready = ~busy_q & ~sqr_start;
endmodule
