// tb_gf2m_mul_serial: checks the bit-serial multiplier against the
// reference GF(2^n) product, for GF(2^4) with x^4 + x + 1 (all 256 operand
// pairs) and for the default n = 72 with x^72 + x^60 + x^3 + x + 1 (random
// operands).  Also checks that each product takes exactly n clock cycles
// from the start cycle to the first ready cycle and that ready stays low
// meanwhile.
module tb_gf2m_mul_serial;
  import ecc_ref_pkg::*;

  localparam int unsigned NB = 72;
  localparam logic [71:0] F72 = 72'h00_1000_0000_0000_000b;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        s4, r4, sB, rB;
  logic [3:0]  a4, b4, y4;
  logic [NB-1:0] aB, bB, yB;

  gf2m_mul_serial #(.N(4)) dut4 (.clk, .global_reset(rst), .mul_start(s4),
    .in1(a4), .in2(b4), .fieldpoly(4'b0011), .result(y4), .mul_ready(r4));
  gf2m_mul_serial dutB (.clk, .global_reset(rst), .mul_start(sB),
    .in1(aB), .in2(bB), .fieldpoly(F72), .result(yB), .mul_ready(rB));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run4(input logic [3:0] a, input logic [3:0] b);
    int cyc;
    a4 = a; b4 = b; s4 = 1;
    @(posedge clk); #1 s4 = 0; a4 = ~a; b4 = ~b;   // operands may change
    cyc = 1;
    while (!r4) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (y4 !== 4'(gf_mul(fe_t'(a), fe_t'(b), fe_t'(4'b0011), 4))) begin
      failures++; $display("FAIL n=4 %h*%h = %h", a, b, y4);
    end
    checks++;
    if (cyc != 4) begin failures++; $display("FAIL n=4 latency %0d", cyc); end
  endtask

  task automatic runB(input logic [NB-1:0] a, input logic [NB-1:0] b);
    int cyc;
    aB = a; bB = b; sB = 1;
    @(posedge clk); #1 sB = 0; aB = '0; bB = '0;
    cyc = 1;
    while (!rB) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (yB !== NB'(gf_mul(fe_t'(a), fe_t'(b), fe_t'(F72), NB))) begin
      failures++; $display("FAIL n=72 %h*%h = %h", a, b, yB);
    end
    checks++;
    if (cyc != NB) begin failures++; $display("FAIL n=72 latency %0d", cyc); end
  endtask

  initial begin
    s4 = 0; sB = 0; a4 = 0; b4 = 0; aB = 0; bB = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) run4(4'(a), 4'(b));
    // Fig. 4 example field: x * x^3 = x^4 = x + 1
    run4(4'b0010, 4'b1000);
    runB('1, '1);
    runB(NB'(1), {1'b1, {(NB-1){1'b0}}});
    for (int i = 0; i < 100; i++) runB(NB'(rand_fe(NB)), NB'(rand_fe(NB)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
