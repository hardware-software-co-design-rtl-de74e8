// tb_ecc_fpga_top: end-to-end test of the programmable-logic part at its
// default field size n = 72, driven by a model of the micro-controller.
//
// Field GF(2^72) with x^72 + x^60 + x^3 + x + 1.  A curve and base point are
// made by picking a, P at random and computing b from the curve equation;
// c = b^(2^(n-2)).  The testbench
//   * loads and reads back all 13 memory locations (byte transfer path);
//   * forces the special cases of the group operations: Q = P added (turns
//     into a doubling), Q = P subtracted (gives O), O plus and minus P,
//     doubling O, and Q = P in projective form (Z != 1) added;
//   * runs complete point multiplications k P and compares the result, made
//     affine, with an affine double-and-add reference;
//   * checks the cycle count of a doubling and an addition against the
//     operator latencies (n per multiplication, n/2 per squaring) and the
//     hardware cycles of a point multiplication against about 12 n^2.
// Each mechanism (byte waits, operator waits, every branch of the
// micro-program, each instruction) is counted and must occur.
module tb_ecc_fpga_top;
  import ecc_ref_pkg::*;

  localparam int unsigned N = 72;
  localparam fe_t F = fe_t'(72'h00_1000_0000_0000_000b);

  logic clk = 0, global_reset = 1;
  logic instr_wr = 0, data_wr = 0, data_rd = 0;
  logic [7:0] avr_din = 0, avr_dout;
  logic [1:0] irq;
  int cycle = 0;
  int hw_cycles = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  ecc_fpga_top dut (.clk, .global_reset, .instr_wr, .data_wr, .data_rd,
                    .avr_din, .avr_dout, .irq);

  `include "ecc_avr_model.svh"

  // ---- mechanism counters, from the FSM's program counter and status ----
  int n_inf = 0, n_copyp = 0, n_add2dbl = 0, n_opwait = 0, n_bytewait = 0;
  logic [5:0] pc_prev;
  always @(posedge clk) begin
    pc_prev <= dut.u_hc.u_fsm.pc_q;
    if (dut.u_hc.u_fsm.pc_q != pc_prev) begin
      if (dut.u_hc.u_fsm.pc_q == 6'd46) n_inf++;
      if (dut.u_hc.u_fsm.pc_q == 6'd42) n_copyp++;
      if (dut.u_hc.u_fsm.pc_q == 6'd0 && pc_prev == 6'd24) n_add2dbl++;
    end
    if (dut.lc_q.mul_start || dut.lc_q.sqr_start) n_opwait++;
    if (dut.avr_turn && dut.dr_req_q == 1'b0) n_bytewait++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic chk_q(input pt_t exp, input string what);
    fe_t X, Y, Z;
    pt_t got;
    avr_get_q(X, Y, Z);
    got = to_affine(X, Y, Z, F, N);
    chk(pt_eq(got, exp), $sformatf("%s: got inf=%0d (%h,%h) exp inf=%0d (%h,%h)",
        what, got.inf, got.x, got.y, exp.inf, exp.x, exp.y));
    if (exp.inf) chk(X == fe_t'(1) && Y == fe_t'(1), {what, ": O is (1,1,0)"});
  endtask

  initial begin
    fe_t a, b, c, k, v;
    pt_t P, R, O;
    int cyc, hw0;
    O.inf = 1; O.x = '0; O.y = '0;

    repeat (4) @(posedge clk);
    @(negedge clk) global_reset = 0;

    // ---- curve ----
    a = rand_fe(N);
    do begin
      P.inf = 0; P.x = rand_fe(N); P.y = rand_fe(N);
      b = curve_b(P, a, F, N);
    end while (b == '0 || P.x == '0);
    c = b;
    for (int i = 0; i < N - 2; i++) c = gf_sqr(c, F, N);
    chk(gf_sqr(gf_sqr(c, F, N), F, N) == b, "reference: c^4 = b");
    k = rand_fe(N) | (fe_t'(1) << (N - 1));
    avr_set_curve(F, a, c, k, P);

    // ---- read back every location ----
    for (int loc = 0; loc < 6; loc++) begin
      avr_read(4'(loc), v);
      case (loc)
        0: chk(v == F,   "read FP");
        1: chk(v == a,   "read a");
        2: chk(v == c,   "read c");
        3: chk(v == k,   "read k");
        4: chk(v == P.x, "read Px");
        default: chk(v == P.y, "read Py");
      endcase
    end
    for (int loc = 6; loc < 13; loc++) begin
      fe_t r;
      r = rand_fe(N);
      avr_load(4'(loc), r);
      avr_read(4'(loc), v);
      chk(v == r, $sformatf("load/read location %0d", loc));
    end

    // ---- single doubling and addition, with their cycle counts ----
    avr_set_q(P.x, P.y, fe_t'(1));
    avr_group_op(4'h3, cyc);
    $display("doubling: %0d cycles (5 mul + 5 sqr = %0d)", cyc, 5*N + 5*(N/2));
    chk(cyc >= 5*N + 5*(N/2) && cyc <= 5*N + 5*(N/2) + 60, $sformatf("doubling cycles %0d", cyc));
    R = ec_dbl(P, a, F, N);
    chk_q(R, "2P");
    avr_group_op(4'h4, cyc);
    $display("addition: %0d cycles (11 mul + 4 sqr = %0d)", cyc, 11*N + 4*(N/2));
    chk(cyc >= 11*N + 4*(N/2) && cyc <= 11*N + 4*(N/2) + 100, $sformatf("addition cycles %0d", cyc));
    R = ec_add(R, P, a, F, N);
    chk_q(R, "3P");
    avr_group_op(4'h5, cyc);
    chk_q(ec_dbl(P, a, F, N), "3P - P");
    avr_group_op(4'h5, cyc);          // 2P - P = P, projective, Z != 1
    chk_q(P, "2P - P");
    avr_group_op(4'h4, cyc);          // Q = P (Z != 1) plus P -> doubling
    chk_q(ec_dbl(P, a, F, N), "P' + P");

    // ---- special cases with affine Q ----
    avr_set_q(P.x, P.y, fe_t'(1));
    avr_group_op(4'h4, cyc);
    chk_q(ec_dbl(P, a, F, N), "P + P");
    avr_set_q(P.x, P.y, fe_t'(1));
    avr_group_op(4'h5, cyc);
    chk_q(O, "P - P");
    avr_group_op(4'h3, cyc);
    chk_q(O, "2 O");
    avr_group_op(4'h4, cyc);
    chk_q(P, "O + P");
    avr_set_q(fe_t'(1), fe_t'(1), '0);
    avr_group_op(4'h5, cyc);
    chk_q(ec_neg(P), "O - P");

    // ---- complete point multiplications ----
    for (int t = 0; t < 2; t++) begin
      if (t == 1) k = rand_fe(N) | (fe_t'(1) << (N - 1));
      hw0 = hw_cycles;
      hw_cycles = 0;
      avr_point_mult(k, P);
      $display("k P: %0d hardware cycles, 12 n^2 = %0d", hw_cycles, 12*N*N);
      chk(hw_cycles > 9*N*N && hw_cycles < 15*N*N,
          $sformatf("point multiplication cycles %0d vs 12n^2 %0d", hw_cycles, 12*N*N));
      chk_q(ec_mul(k, P, a, F, N), $sformatf("k P, k=%h", k));
      hw_cycles += hw0;
    end

    // ---- every mechanism must have happened ----
    $display("counts: dbl=%0d add=%0d sub=%0d load=%0d read=%0d inf=%0d copyP=%0d add->dbl=%0d opstarts=%0d bytewait=%0d",
             n_dbl, n_add, n_sub, n_load, n_read, n_inf, n_copyp, n_add2dbl, n_opwait, n_bytewait);
    chk(n_dbl > 0 && n_add > 0 && n_sub > 0, "double/add/subtract executed");
    chk(n_load > 0 && n_read > 0, "load/read executed");
    chk(n_inf >= 2, "result-is-O branch taken");
    chk(n_copyp >= 2, "Q-is-O branch taken");
    chk(n_add2dbl >= 2, "add-turns-into-double branch taken");
    chk(n_opwait > 0, "operator waits");
    chk(n_bytewait > 0, "byte handshake waits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
