// tb_ecc_fsm_das: checks the double/add/subtract FSM at n = 72 in a cycle
// model of its surroundings (ecc_ctrl_env.svh).  For each instruction and
// special case it counts the operations the FSM starts and the writes it
// requests and compares them with the micro-program: doubling 5
// multiplications, 5 squarings, 14 writes; addition 11 / 4 / 22,
// subtraction one write more (y of -P); the O, Q = O, Q = -P and Q = P
// branches; and the byte-transfer instructions (9 byte requests and 72 shifts each).  It also
// checks the cycle count of a doubling and an addition: n cycles per
// multiplication, n/2 per squaring plus a fixed overhead.
module tb_ecc_fsm_das;
  import ecc_pkg::*;
  localparam int unsigned N = 72;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mem_req_t    mreq;
  logic_ctrl_t lc;
  logic        dr_req, instr_clear, done, is_sub;

  `include "ecc_ctrl_env.svh"

  ecc_fsm_das dut (.clk, .global_reset(rst), .opcode, .pending,
    .status(status_q), .avr_turn, .mreq, .lc, .dr_req, .instr_clear, .done,
    .is_sub);

  // symbolic addresses are good enough for the zero model here
  assign rd1_addr = mreq.src1;
  assign rd2_addr = mreq.src2;
  assign rd1_en   = mreq.rd1;
  assign rd2_en   = mreq.rd2;

  int n_mul, n_sqr, n_wr, n_one, n_req, n_shift, n_par;
  always @(posedge clk) begin
    if (lc.mul_start) n_mul++;
    if (lc.sqr_start) n_sqr++;
    if (mreq.wr) n_wr++;
    if (lc.IOreg_set2one) n_one++;
    if (dr_req) n_req++;
    if (lc.IOreg_en && !lc.mux2_sel) n_shift++;
    if (lc.IOreg_en && lc.mux2_sel) n_par++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic [7:0] ins, input logic [15:0] z,
                     input int e_mul, e_sqr, e_wr, e_one, e_req, e_shift,
                     input string what, output int cyc);
    zset = z;
    n_mul = 0; n_sqr = 0; n_wr = 0; n_one = 0; n_req = 0; n_shift = 0; n_par = 0;
    issue(ins, cyc);
    chk(n_mul == e_mul && n_sqr == e_sqr && n_wr == e_wr && n_one == e_one &&
        n_req == e_req && n_shift == e_shift,
        $sformatf("%s: mul %0d sqr %0d wr %0d one %0d req %0d shift %0d", what,
                  n_mul, n_sqr, n_wr, n_one, n_req, n_shift));
  endtask

  initial begin
    int cyc;
    instr = 0; zset = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(8'h30, 16'h0000, 5, 5, 14, 0, 0, 0, "double", cyc);
    chk(n_par == 1, "double loads the field polynomial first");
    chk(cyc >= 5*N + 5*(N/2) && cyc <= 5*N + 5*(N/2) + 40, $sformatf("double cycles %0d", cyc));
    run(8'h40, 16'h0000, 11, 4, 22, 0, 0, 0, "add", cyc);
    chk(cyc >= 11*N + 4*(N/2) && cyc <= 11*N + 4*(N/2) + 100, $sformatf("add cycles %0d", cyc));
    run(8'h50, 16'h0000, 11, 4, 23, 0, 0, 0, "sub", cyc);
    chk(is_sub, "sub flag");
    run(8'h30, 16'h0040, 0, 0, 3, 2, 0, 0, "double of x=0", cyc);       // QX = 0
    run(8'h30, 16'h0100, 0, 0, 3, 2, 0, 0, "double of O", cyc);         // QZ = 0
    run(8'h40, 16'h0100, 0, 0, 3, 1, 0, 0, "O + P", cyc);               // QZ = 0
    run(8'h40, 16'h0400, 3, 1, 6 + 3, 2, 0, 0, "Q = -P", cyc);          // W = 0, R != 0
    run(8'h40, 16'h0600, 3 + 5, 1 + 5, 6 + 14, 0, 0, 0, "Q = P", cyc);   // W = 0, R = 0
    run(8'h17, 16'h0000, 0, 0, 1, 0, 9, 72, "load", cyc);
    run(8'h29, 16'h0000, 0, 0, 0, 0, 9, 72, "read", cyc);
    chk(n_par == 1, "read loads the IOregister in parallel");
    run(8'hF0, 16'h0000, 0, 0, 0, 0, 0, 0, "unknown opcode", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
