// tb_ecc_hw_ctrl: checks the hardware controller (FSM plus address
// controller) at n = 72 in a cycle model of its surroundings
// (ecc_ctrl_env.svh), on the resolved 15 address-control signals: an add
// multiplies by PY where a subtract multiplies by the scratch location that
// holds the y of -P; a load writes its operand location exactly once; a
// read reads it into the IOregister; no write ever goes past location 12;
// and a doubling ends with the X, Y, Z of Q written.
module tb_ecc_hw_ctrl;
  import ecc_pkg::*;
  localparam int unsigned N = 72;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_ctrl_t  ac;
  logic_ctrl_t lc;
  logic        dr_req, instr_clear, done;

  `include "ecc_ctrl_env.svh"

  ecc_hw_ctrl dut (.clk, .global_reset(rst), .opcode, .operand(instr[3:0]),
    .pending, .status(status_q), .avr_turn, .ac, .lc, .dr_req, .instr_clear,
    .done);

  assign rd1_addr = ac.Aout1;
  assign rd2_addr = ac.Aout2;
  assign rd1_en   = ac.oen1;
  assign rd2_en   = ac.oen2;

  int mul_rd [16];
  int wr_to [16];
  int par_from [16];
  int bad_wr;
  always @(posedge clk) begin
    if (lc.mul_start) begin
      if (ac.oen1) mul_rd[ac.Aout1]++;
      if (ac.oen2) mul_rd[ac.Aout2]++;
    end
    if (ac.wen) wr_to[ac.Ain]++;
    if (ac.wen && ac.Ain > 12) bad_wr++;
    if (lc.IOreg_en && lc.mux2_sel && ac.oen1) par_from[ac.Aout1]++;
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

  task automatic clear_counts();
    for (int i = 0; i < 16; i++) begin mul_rd[i] = 0; wr_to[i] = 0; par_from[i] = 0; end
  endtask

  initial begin
    int cyc;
    instr = 0; zset = 0; bad_wr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    clear_counts(); issue(8'h40, cyc);
    chk(mul_rd[5] == 2 && mul_rd[12] == 3, $sformatf("add uses PY (%0d, %0d)", mul_rd[5], mul_rd[12]));
    chk(wr_to[12] == 4 && par_from[0] == 1, "add: scratch writes, field polynomial load");
    clear_counts(); issue(8'h50, cyc);
    chk(mul_rd[5] == 0 && mul_rd[12] == 5, $sformatf("sub uses y of -P (%0d, %0d)", mul_rd[5], mul_rd[12]));
    chk(wr_to[12] == 5, "sub writes y of -P");
    clear_counts(); issue(8'h30, cyc);
    chk(wr_to[6] == 3 && wr_to[7] == 1 && wr_to[8] == 1, "double writes Q");
    for (int loc = 0; loc < 16; loc++) begin
      clear_counts(); issue({4'h1, 4'(loc)}, cyc);
      chk(wr_to[loc] == ((loc < 13) ? 1 : 0), $sformatf("load %0d", loc));
      clear_counts(); issue({4'h2, 4'(loc)}, cyc);
      chk(par_from[loc] == 1, $sformatf("read %0d", loc));
    end
    chk(bad_wr == 0, "no write past the last location");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
