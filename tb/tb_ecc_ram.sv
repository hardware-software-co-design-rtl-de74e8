// tb_ecc_ram: checks a 13-word RAM block at n = 72: write and read back
// every word, output zero while oen is low, writes past the last word
// ignored and reads there returning zero, write only while wen is high.
module tb_ecc_ram;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 72;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wen, oen;
  logic [3:0] Ain, Aout;
  logic [N-1:0] din, dout;
  logic [N-1:0] model [13];

  ecc_ram dut (.clk, .wen, .Ain, .din, .oen, .Aout, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wen = 0; oen = 0; Ain = 0; Aout = 0; din = 0;
    for (int i = 0; i < 13; i++) begin
      @(negedge clk);
      model[i] = N'(rand_fe(N));
      wen = 1; Ain = 4'(i); din = model[i];
    end
    @(negedge clk) wen = 0;
    for (int i = 0; i < 13; i++) begin
      Aout = 4'(i); oen = 1; #1;
      chk(dout == model[i], $sformatf("read %0d", i));
      oen = 0; #1;
      chk(dout == '0, $sformatf("oen low %0d", i));
    end
    for (int i = 13; i < 16; i++) begin
      @(negedge clk) wen = 1; Ain = 4'(i); din = '1;
    end
    @(negedge clk) wen = 0; Ain = 0; din = '1;   // wen low: no write
    @(negedge clk);
    oen = 1;
    for (int i = 0; i < 16; i++) begin
      Aout = 4'(i); #1;
      chk(dout == ((i < 13) ? model[i] : '0), $sformatf("after bad writes %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
