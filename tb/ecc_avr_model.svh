// ecc_avr_model.svh: behavioural model of the micro-controller side
// (software controller) for the point-multiplication testbenches.
//
// Included inside a testbench module that declares clk, instr_wr, data_wr,
// data_rd, avr_din, avr_dout, irq, the localparam N (field size) and the
// counter hw_cycles.  It talks to the programmable-logic part through the
// instruction and data registers exactly as firmware would, and reacts to
// the two interrupt lines after a random delay of 0..3 cycles.  The point
// multiplication uses the double-and-add/subtract method on the signed
// (ternary) digits given by h = 3k: for each bit i below the top of h,
// double, then add P where h_i = 1 and k_i = 0, subtract P where h_i = 0 and
// k_i = 1.

localparam int unsigned NBYTES = (N + 7) / 8;

int n_dbl = 0, n_add = 0, n_sub = 0, n_load = 0, n_read = 0;

task automatic avr_delay();
  repeat ($urandom_range(0, 3)) @(posedge clk);
endtask

task automatic avr_write_instr(input logic [3:0] op, input logic [3:0] loc);
  @(negedge clk);
  avr_din  = {op, loc};
  instr_wr = 1'b1;
  @(negedge clk);
  instr_wr = 1'b0;
endtask

task automatic avr_wait_done();
  while (!irq[0]) @(posedge clk);
  avr_delay();
endtask

task automatic avr_load(input logic [3:0] loc, input ecc_ref_pkg::fe_t v);
  logic [8*NBYTES-1:0] w;
  w = (8*NBYTES)'(v);
  avr_write_instr(4'h1, loc);
  for (int i = NBYTES - 1; i >= 0; i--) begin
    while (!irq[1]) @(posedge clk);
    avr_delay();
    @(negedge clk);
    avr_din = w[8*i +: 8];
    data_wr = 1'b1;
    @(negedge clk);
    data_wr = 1'b0;
    while (irq[1]) @(posedge clk);
  end
  avr_wait_done();
  n_load++;
endtask

task automatic avr_read(input logic [3:0] loc, output ecc_ref_pkg::fe_t v);
  logic [8*NBYTES-1:0] w;
  w = '0;
  avr_write_instr(4'h2, loc);
  for (int i = NBYTES - 1; i >= 0; i--) begin
    while (!irq[1]) @(posedge clk);
    avr_delay();
    @(negedge clk);
    w[8*i +: 8] = avr_dout;
    data_rd = 1'b1;
    @(negedge clk);
    data_rd = 1'b0;
    while (irq[1]) @(posedge clk);
  end
  avr_wait_done();
  v = ecc_ref_pkg::fe_t'(w);
  n_read++;
endtask

// One group operation; returns the cycles from instruction write to done.
task automatic avr_group_op(input logic [3:0] op, output int cyc);
  int c0;
  avr_write_instr(op, 4'h0);
  c0 = cycle;
  while (!irq[0]) @(posedge clk);
  cyc = cycle - c0;
  hw_cycles += cyc;
  avr_delay();
  case (op)
    4'h3: n_dbl++;
    4'h4: n_add++;
    default: n_sub++;
  endcase
endtask

task automatic avr_set_curve(input ecc_ref_pkg::fe_t f, input ecc_ref_pkg::fe_t a,
                             input ecc_ref_pkg::fe_t c, input ecc_ref_pkg::fe_t k,
                             input ecc_ref_pkg::pt_t p);
  avr_load(4'd0, f);
  avr_load(4'd1, a);
  avr_load(4'd2, c);
  avr_load(4'd3, k);
  avr_load(4'd4, p.x);
  avr_load(4'd5, p.y);
endtask

task automatic avr_set_q(input ecc_ref_pkg::fe_t x, input ecc_ref_pkg::fe_t y,
                         input ecc_ref_pkg::fe_t z);
  avr_load(4'd6, x);
  avr_load(4'd7, y);
  avr_load(4'd8, z);
endtask

task automatic avr_get_q(output ecc_ref_pkg::fe_t x, output ecc_ref_pkg::fe_t y,
                         output ecc_ref_pkg::fe_t z);
  avr_read(4'd6, x);
  avr_read(4'd7, y);
  avr_read(4'd8, z);
endtask

// Q <- k P, with P already loaded; k > 0.
task automatic avr_point_mult(input ecc_ref_pkg::fe_t k, input ecc_ref_pkg::pt_t p);
  logic [259:0] h, kk;
  int top, cyc;
  kk  = 260'(k);
  h   = 3 * kk;
  top = 0;
  for (int i = 0; i < 260; i++) if (h[i]) top = i;
  avr_set_q(p.x, p.y, ecc_ref_pkg::fe_t'(1));
  for (int i = top - 1; i >= 1; i--) begin
    avr_group_op(4'h3, cyc);
    if (h[i] && !kk[i]) avr_group_op(4'h4, cyc);
    else if (!h[i] && kk[i]) avr_group_op(4'h5, cyc);
  end
endtask
