// tb_gf2m_sqr_serial: checks the serial squarer against the reference
// GF(2^n) square for GF(2^8) with x^8 + x^4 + x^3 + x + 1 (all 256
// inputs), for an odd size GF(2^7) with x^7 + x + 1, and for the default
// n = 72 with x^72 + x^60 + x^3 + x + 1 (random inputs).  Checks that each
// square takes floor(n/2) cycles from the start cycle to the first ready
// cycle.
module tb_gf2m_sqr_serial;
  import ecc_ref_pkg::*;

  localparam int unsigned NB = 72;
  localparam logic [71:0] F72 = 72'h00_1000_0000_0000_000b;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic s8, r8, s7, r7, sB, rB;
  logic [7:0] a8, y8;
  logic [6:0] a7, y7;
  logic [NB-1:0] aB, yB;

  gf2m_sqr_serial #(.N(8)) dut8 (.clk, .global_reset(rst), .sqr_start(s8),
    .in1(a8), .fieldpoly(8'h1b), .result(y8), .sqr_ready(r8));
  gf2m_sqr_serial #(.N(7)) dut7 (.clk, .global_reset(rst), .sqr_start(s7),
    .in1(a7), .fieldpoly(7'h03), .result(y7), .sqr_ready(r7));
  gf2m_sqr_serial dutB (.clk, .global_reset(rst), .sqr_start(sB),
    .in1(aB), .fieldpoly(F72), .result(yB), .sqr_ready(rB));

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

  initial begin
    int cyc;
    s8 = 0; s7 = 0; sB = 0; a8 = 0; a7 = 0; aB = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    for (int a = 0; a < 256; a++) begin
      a8 = 8'(a); s8 = 1;
      @(posedge clk); #1 s8 = 0; a8 = '0; cyc = 1;
      while (!r8) begin @(posedge clk); #1 cyc++; end
      chk(y8 === 8'(gf_sqr(fe_t'(a), fe_t'(8'h1b), 8)), $sformatf("n=8 %h^2=%h", a, y8));
      chk(cyc == 4, $sformatf("n=8 latency %0d", cyc));
    end
    for (int a = 0; a < 128; a++) begin
      a7 = 7'(a); s7 = 1;
      @(posedge clk); #1 s7 = 0; a7 = '0; cyc = 1;
      while (!r7) begin @(posedge clk); #1 cyc++; end
      chk(y7 === 7'(gf_sqr(fe_t'(a), fe_t'(7'h03), 7)), $sformatf("n=7 %h^2=%h", a, y7));
      chk(cyc == 3, $sformatf("n=7 latency %0d", cyc));
    end
    for (int i = 0; i < 100; i++) begin
      logic [NB-1:0] a;
      a = (i == 0) ? '1 : NB'(rand_fe(NB));
      aB = a; sB = 1;
      @(posedge clk); #1 sB = 0; aB = '0; cyc = 1;
      while (!rB) begin @(posedge clk); #1 cyc++; end
      chk(yB === NB'(gf_sqr(fe_t'(a), fe_t'(F72), NB)), $sformatf("n=72 %h^2=%h", a, yB));
      chk(cyc == NB / 2, $sformatf("n=72 latency %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
