// tb_ecc_datapath: checks the data-path at n = 8 with the field polynomial
// x^8 + x^4 + x^3 + x + 1 by driving its control signals directly.
// Values enter through the serial input into the IOregister and are written
// to both RAM blocks over bus3/bus4; then random additions, multiplications
// and squarings between locations are checked against reference field
// arithmetic, as are the zero detectors, the parallel IOregister load from
// bus1, serial read-out and the set-to-one constant.
module tb_ecc_datapath;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 8;
  localparam logic [7:0] F = 8'h1b;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_ctrl_t  ac;
  logic_ctrl_t lc;
  logic        sin, sout;
  status_t     st;
  logic [N-1:0] model [13];

  ecc_datapath #(.N(N)) dut (.clk, .global_reset(rst), .ac, .lc,
    .serial_in(sin), .serial_out(sout), .status(st));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    ac = '0; lc = LOGIC_CTRL_IDLE; sin = 0;
  endtask

  task automatic shift_in(input logic [N-1:0] v);
    for (int i = N - 1; i >= 0; i--) begin
      idle(); lc.IOreg_en = 1; sin = v[i];
      @(negedge clk);
    end
    idle();
  endtask

  task automatic write_bus3(input int loc);
    idle(); lc.mux1_sel = M1_BUS3; ac.wen = 1; ac.Ain = addr_t'(loc);
    @(negedge clk); idle();
  endtask

  task automatic load_fp();
    idle(); ac.Aout1 = 4'd0; ac.oen1 = 1; lc.mux2_sel = 1; lc.IOreg_en = 1;
    @(negedge clk); idle();
  endtask

  // Read a location: RAM1 -> bus1 -> IOregister, then shift it out.
  task automatic read_loc(input int loc, output logic [N-1:0] v);
    idle(); ac.Aout1 = addr_t'(loc); ac.oen1 = 1; lc.mux2_sel = 1; lc.IOreg_en = 1;
    @(negedge clk); idle();
    for (int i = N - 1; i >= 0; i--) begin
      v[i] = sout; lc.IOreg_en = 1; @(negedge clk);
    end
    idle();
  endtask

  initial begin
    logic [N-1:0] rv;
    idle();
    @(negedge clk) rst = 0;
    model[0] = F;
    shift_in(F); write_bus3(0);
    for (int i = 1; i < 13; i++) begin
      model[i] = (i == 12) ? '0 : N'($urandom);
      shift_in(model[i]); write_bus3(i);
    end
    // zero detectors
    for (int i = 0; i < 13; i++) begin
      idle(); ac.Aout1 = 4'(i); ac.oen1 = 1; ac.Aout2 = 4'(12 - i); ac.oen2 = 1; #1;
      chk(st.zero1 == (model[i] == 0) && st.zero2or3 == (model[12 - i] == 0),
          $sformatf("zero flags %0d", i));
    end
    shift_in('0); #1;
    chk(st.zero2or3, "zero2or3 from bus3, zero");
    shift_in(8'h40); #1;
    chk(!st.zero2or3, "zero2or3 from bus3, nonzero");
    for (int t = 0; t < 300; t++) begin
      int s1, s2, d, kind;
      logic [N-1:0] e;
      s1 = $urandom_range(1, 12); s2 = $urandom_range(1, 12);
      d = $urandom_range(1, 12); kind = $urandom_range(0, 2);
      load_fp();
      idle();
      ac.Aout1 = 4'(s1); ac.oen1 = 1; ac.Aout2 = 4'(s2); ac.oen2 = 1;
      case (kind)
        0: begin
          lc.mux1_sel = M1_ADD; ac.wen = 1; ac.Ain = 4'(d);
          e = model[s1] ^ model[s2];
          @(negedge clk); idle();
        end
        1: begin
          int cyc;
          lc.mul_start = 1; @(negedge clk); idle(); cyc = 1;
          while (!st.mul_ready) begin @(negedge clk); cyc++; end
          chk(cyc == N, $sformatf("mul cycles %0d", cyc));
          lc.mux1_sel = M1_MUL; ac.wen = 1; ac.Ain = 4'(d);
          e = N'(gf_mul(fe_t'(model[s1]), fe_t'(model[s2]), fe_t'(F), N));
          @(negedge clk); idle();
        end
        default: begin
          int cyc;
          lc.sqr_start = 1; @(negedge clk); idle(); cyc = 1;
          while (!st.sqr_ready) begin @(negedge clk); cyc++; end
          chk(cyc == N / 2, $sformatf("sqr cycles %0d", cyc));
          lc.mux1_sel = M1_SQR; ac.wen = 1; ac.Ain = 4'(d);
          e = N'(gf_sqr(fe_t'(model[s1]), fe_t'(F), N));
          @(negedge clk); idle();
        end
      endcase
      model[d] = e;
      read_loc(d, rv);
      chk(rv == e, $sformatf("op %0d: %0d,%0d -> %0d", kind, s1, s2, d));
    end
    // serial read-out of a location through the IOregister
    begin
      logic [N-1:0] got;
      idle(); ac.Aout1 = 4'd5; ac.oen1 = 1; lc.mux2_sel = 1; lc.IOreg_en = 1;
      @(negedge clk); idle();
      for (int i = N - 1; i >= 0; i--) begin
        got[i] = sout; lc.IOreg_en = 1; @(negedge clk);
      end
      idle();
      chk(got == model[5], "serial read-out");
    end
    lc.IOreg_set2one = 1; @(negedge clk); write_bus3(7); model[7] = 1;
    read_loc(7, rv);
    chk(rv == 1, "set2one written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
