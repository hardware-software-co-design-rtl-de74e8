// tb_gf2m_adder: checks GF(2^n) addition (bitwise XOR, no carries) at the
// default n = 72 for random and corner operands, against a bit-by-bit sum
// computed in the testbench.
module tb_gf2m_adder;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 72;
  int checks = 0, failures = 0;
  logic [N-1:0] a, b, s, e;
  gf2m_adder dut (.in1(a), .in2(b), .sum(s));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      a = (i == 0) ? '1 : N'(rand_fe(N));
      b = (i == 0) ? '1 : (i == 1) ? '0 : N'(rand_fe(N));
      #1;
      for (int j = 0; j < N; j++) e[j] = (a[j] + b[j]) % 2;
      checks++;
      if (s !== e) begin failures++; $display("FAIL %h+%h=%h", a, b, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
