// ecc_ctrl_env.svh: environment for the controller testbenches, included
// inside the testbench module after the declarations of clk, rst, the
// controller's logic_ctrl_t output lc, dr_req, instr_clear, done, and
// localparam N.  It models, cycle for cycle, what surrounds the controller
// in the full design: the register stage on the control lines, the
// operator latencies (n cycles per multiplication, floor(n/2) per squaring)
// with their ready flags, the registered status, the instruction register
// (held until instr_clear) and the data register's avr_turn flag, which a
// pretend micro-controller clears 2..5 cycles after each request.  Zero
// flags are produced for the locations listed in zset, one entry per
// address of the read (resolved by the caller into rd1_addr / rd2_addr).

logic_ctrl_t lc_q;
status_t     status_q;
logic        dr_req_q, avr_turn;
int          mul_cnt, sqr_cnt, turn_cnt;
logic [15:0] zset;
logic [3:0]  rd1_addr, rd2_addr;   // resolved addresses of the current read
logic        rd1_en, rd2_en;
logic [3:0]  rd1_q, rd2_q;
logic        rd1_en_q, rd2_en_q;
logic [7:0]  instr;
opcode_e     opcode;
logic        pending;

assign opcode  = opcode_e'(instr[7:4]);
assign pending = instr[7:4] != 0;

always_ff @(posedge clk) begin
  if (rst) begin
    lc_q <= LOGIC_CTRL_IDLE; status_q <= '0; dr_req_q <= 0; avr_turn <= 0;
    mul_cnt <= 0; sqr_cnt <= 0; turn_cnt <= 0;
    rd1_q <= 0; rd2_q <= 0; rd1_en_q <= 0; rd2_en_q <= 0;
  end else begin
    lc_q     <= lc;
    dr_req_q <= dr_req;
    rd1_q <= rd1_addr; rd2_q <= rd2_addr; rd1_en_q <= rd1_en; rd2_en_q <= rd2_en;
    if (lc_q.mul_start) mul_cnt <= N - 1; else if (mul_cnt > 0) mul_cnt <= mul_cnt - 1;
    if (lc_q.sqr_start) sqr_cnt <= N / 2 - 1; else if (sqr_cnt > 0) sqr_cnt <= sqr_cnt - 1;
    status_q.mul_ready <= (mul_cnt == 0) && !lc_q.mul_start;
    status_q.sqr_ready <= (sqr_cnt == 0) && !lc_q.sqr_start;
    status_q.zero1     <= rd1_en_q && zset[rd1_q];
    status_q.zero2or3  <= rd2_en_q && zset[rd2_q];
    if (dr_req_q) begin avr_turn <= 1; turn_cnt <= $urandom_range(2, 5); end
    else if (avr_turn) begin
      if (turn_cnt == 0) avr_turn <= 0; else turn_cnt <= turn_cnt - 1;
    end
  end
end

always_ff @(posedge clk) if (instr_clear) instr <= 8'h00;

task automatic issue(input logic [7:0] ins, output int cyc);
  @(negedge clk) instr = ins;
  cyc = 0;
  while (!done) begin @(negedge clk); cyc++; end
  @(negedge clk);
endtask
