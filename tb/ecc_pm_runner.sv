// ecc_pm_runner: one complete point multiplication at field size N with
// field polynomial x^N + FP, for the workload testbench.  It builds a
// curve through a random point, runs k P with the micro-controller model on
// an ecc_fpga_top of that size, compares with the affine reference, and
// measures the cycles of the hardware part: per doubling and addition
// (compared with the operator latencies plus this design's fixed control
// overhead of 41 and 63 cycles) and for the whole k P (reported next to
// 12 n^2).  Raises finished when done; checks and failures count up.
module ecc_pm_runner
  import ecc_ref_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter fe_t         FP = fe_t'(8'h1b)
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  logic clk = 0, global_reset = 1;
  logic instr_wr = 0, data_wr = 0, data_rd = 0;
  logic [7:0] avr_din = 0, avr_dout;
  logic [1:0] irq;
  int cycle = 0;
  int hw_cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  ecc_fpga_top #(.N(N)) dut (.clk, .global_reset, .instr_wr, .data_wr,
    .data_rd, .avr_din, .avr_dout, .irq);

  `include "ecc_avr_model.svh"

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL n=%0d %s", N, what); end
  endtask

  initial begin
    fe_t a, b, c, k, X, Y, Z;
    pt_t P, R, E;
    int cyc;
    finished = 0; checks = 0; failures = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) global_reset = 0;
    a = rand_fe(N);
    do begin
      P.inf = 0; P.x = rand_fe(N); P.y = rand_fe(N);
      b = curve_b(P, a, FP, N);
    end while (b == '0 || P.x == '0);
    c = b;
    for (int i = 0; i < N - 2; i++) c = gf_sqr(c, FP, N);
    k = rand_fe(N) | (fe_t'(1) << (N - 1));
    avr_set_curve(FP, a, c, k, P);

    avr_set_q(P.x, P.y, fe_t'(1));
    avr_group_op(4'h3, cyc);
    chk(cyc == 5*N + 5*(N/2) + 41, $sformatf("doubling %0d cycles, expected %0d", cyc, 5*N + 5*(N/2) + 41));
    avr_group_op(4'h4, cyc);
    chk(cyc == 11*N + 4*(N/2) + 63, $sformatf("addition %0d cycles, expected %0d", cyc, 11*N + 4*(N/2) + 63));
    avr_get_q(X, Y, Z);
    chk(pt_eq(to_affine(X, Y, Z, FP, N), ec_add(ec_dbl(P, a, FP, N), P, a, FP, N)), "3P");

    hw_cycles = 0;
    avr_point_mult(k, P);
    avr_get_q(X, Y, Z);
    R = to_affine(X, Y, Z, FP, N);
    E = ec_mul(k, P, a, FP, N);
    chk(pt_eq(R, E), $sformatf("k P, k=%h", k));
    $display("n=%0d: k P took %0d hardware cycles (%0d doublings, %0d add/sub); 12 n^2 = %0d; ratio %0.2f",
             N, hw_cycles, n_dbl - 1, n_add + n_sub - 1, 12*N*N, real'(hw_cycles) / real'(12*N*N));
    finished = 1;
  end
endmodule
