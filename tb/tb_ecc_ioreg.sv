// tb_ecc_ioreg: checks the IOregister at n = 72: set-to-one, parallel load
// from bus1, serial shift (bit 0 in, top bit out, most significant first),
// hold while not enabled, and set-to-one taking priority over a load.
module tb_ecc_ioreg;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 72;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, one, sel, sin, sout;
  logic [N-1:0] pin, q, v;

  ecc_ioreg dut (.clk, .global_reset(rst), .IOreg_en(en), .IOreg_set2one(one),
    .mux2_sel(sel), .serial_in(sin), .par_in(pin), .q, .serial_out(sout));

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
    en = 0; one = 0; sel = 0; sin = 0; pin = 0;
    @(negedge clk) rst = 0;
    chk(q == '0, "reset");
    one = 1; @(negedge clk) one = 0;
    chk(q == N'(1), "set2one");
    v = N'(rand_fe(N));
    en = 1; sel = 1; pin = v; @(negedge clk) en = 0; pin = '0;
    chk(q == v, "parallel load");
    @(negedge clk);
    chk(q == v, "hold");
    // shift v out while shifting w in
    begin
      logic [N-1:0] w, got;
      w = N'(rand_fe(N));
      en = 1; sel = 0;
      for (int i = N - 1; i >= 0; i--) begin
        got[i] = sout;
        sin = w[i];
        @(negedge clk);
      end
      en = 0;
      chk(got == v, "serial out, msb first");
      chk(q == w, "serial in");
    end
    en = 1; sel = 1; pin = '1; one = 1; @(negedge clk) en = 0; one = 0;
    chk(q == N'(1), "set2one priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
