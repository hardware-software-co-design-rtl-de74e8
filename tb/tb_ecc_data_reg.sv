// tb_ecc_data_reg: checks the 8-bit data register: byte write and read,
// serial shift (bit 7 out, serial_in into bit 0), clear, and the
// req / avr_turn byte handshake cleared by a controller write or read.
module tb_ecc_data_reg;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr, rd, shift, clear, sin, sout, req, turn;
  logic [7:0] din, dout;

  ecc_data_reg dut (.clk, .global_reset(rst), .avr_wr(wr), .avr_rd(rd),
    .avr_din(din), .avr_dout(dout), .shift, .clear, .serial_in(sin),
    .serial_out(sout), .req, .avr_turn(turn));

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
    logic [7:0] b, got, w;
    wr = 0; rd = 0; shift = 0; clear = 0; sin = 0; req = 0; din = 0;
    @(negedge clk) rst = 0;
    chk(!turn && dout == 0, "reset");
    for (int t = 0; t < 20; t++) begin
      b = 8'($urandom); w = 8'($urandom);
      req = 1; @(negedge clk) req = 0;
      chk(turn, "turn after req");
      @(negedge clk);
      chk(turn, "turn holds");
      wr = 1; din = b; @(negedge clk) wr = 0;
      chk(!turn, "write clears turn");
      chk(dout == b, "byte written");
      shift = 1;
      for (int i = 7; i >= 0; i--) begin
        got[i] = sout; sin = w[i];
        @(negedge clk);
      end
      shift = 0;
      chk(got == b, "shifted out msb first");
      chk(dout == w, "shifted in");
      req = 1; @(negedge clk) req = 0;
      rd = 1; @(negedge clk) rd = 0;
      chk(!turn, "read clears turn");
      clear = 1; @(negedge clk) clear = 0;
      chk(dout == 0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
