// tb_ecc_addr_ctrl: checks the address controller: plain addresses pass
// through, the instruction operand alias and the "y of +-P" alias (PY for
// add, T3 for subtract) are resolved, read enables pass through and writes
// past the last RAM word are dropped.
module tb_ecc_addr_ctrl;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  mem_req_t   req;
  addr_t      opnd;
  logic       sub;
  addr_ctrl_t ac;

  ecc_addr_ctrl dut (.req, .operand(opnd), .is_sub(sub), .ac);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t expect_addr(addr_t a, addr_t o, logic s);
    if (a == 4'd15) return s ? 4'd12 : 4'd5;
    if (a == 4'd14) return o;
    return a;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      addr_t d;
      req = mem_req_t'($urandom);
      opnd = addr_t'($urandom);
      sub = 1'($urandom);
      #1;
      d = expect_addr(req.dst, opnd, sub);
      checks++;
      if (ac.Ain != d || ac.Aout1 != expect_addr(req.src1, opnd, sub) ||
          ac.Aout2 != expect_addr(req.src2, opnd, sub) ||
          ac.oen1 != req.rd1 || ac.oen2 != req.rd2 ||
          ac.wen != (req.wr && d < 13)) begin
        failures++;
        $display("FAIL req=%h opnd=%h sub=%0d ac=%h", req, opnd, sub, ac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
