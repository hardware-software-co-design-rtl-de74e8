// ecc_fsm_das: the "double add subtract" finite state machine of the
// hardware controller.
//
// It executes one instruction from the instruction register at a time:
//   LOAD loc   ceil(n/8) bytes, most significant first, are taken from the
//              data register, each shifted bit by bit into the IOregister,
//              then the IOregister is written to location loc of both RAMs
//              (surplus top bits of the first byte are dropped).
//   READ loc   location loc is copied into the IOregister and shifted out
//              in ceil(n/8) bytes, most significant first; the first byte
//              carries the top n - 8*(ceil(n/8)-1) bits, zero-padded.
//   DOUBLE     Q <- 2Q;  ADD  Q <- Q + P;  SUB  Q <- Q - P
//              (Q projective in QX/QY/QZ, P affine in PX/PY).
// A group operation first copies the field polynomial into the IOregister
// and then steps through the micro-program of ecc_pkg, one
// micro-operation after the other: an addition takes one cycle; a multiply
// or square is started, then the FSM waits for the operator's ready status
// and writes the result; zero tests branch to the special cases (doubling
// O or a point with x = 0, Q = O, Q = +-P).  At the end it clears the
// instruction register and pulses done.
//
// Timing: the control outputs are combinational from the state and are
// registered once on their way to the data-path, and the status inputs
// arrive registered, so each started operation or test is followed by one
// idle cycle before its status is looked at.  Byte transfers use the data
// register's avr_turn handshake (req, then wait for the micro-controller).
//
// That the FSM translates instructions into sequences of field operations,
// using the status signals and these operators, follows the original design; the
// instruction set, the micro-program and the handshakes are this design's.
module ecc_fsm_das
  import ecc_pkg::*;
#(
  parameter int unsigned N = 72
) (
  input  logic        clk,
  input  logic        global_reset,
  input  opcode_e     opcode,
  input  logic        pending,
  input  status_t     status,       // registered status from the data-path
  input  logic        avr_turn,     // data register waits for the controller
  output mem_req_t    mreq,
  output logic_ctrl_t lc,
  output logic        dr_req,
  output logic        instr_clear,
  output logic        done,
  output logic        is_sub
);
  localparam int unsigned NB    = (N + 7) / 8;        // bytes per element
  localparam int unsigned FIRST = N - 8 * (NB - 1);   // bits in first byte

  typedef enum logic [4:0] {
    S_IDLE, S_FPLOAD, S_EXEC, S_OP_SKIP, S_OP_WAIT, S_MOVE_WR,
    S_T_SKIP, S_T_EVAL,
    S_LD_REQ, S_LD_SKIP, S_LD_WAIT, S_LD_SHIFT, S_LD_WRITE,
    S_RD_LOAD, S_RD_SHIFT, S_RD_REQ, S_RD_SKIP, S_RD_WAIT,
    S_FINISH
  } state_e;

  state_e     st_q, st_d;
  pc_t        pc_q, pc_d;
  logic       sub_q, sub_d;
  logic [7:0] nb_q, nb_d;     // bytes still to move
  logic [3:0] sc_q, sc_d;     // bit shifts still to do in this byte
  uop_t       u;

  always_comb u = uprog(pc_q);

  always_comb begin
    st_d        = st_q;
    pc_d        = pc_q;
    sub_d       = sub_q;
    nb_d        = nb_q;
    sc_d        = sc_q;
    mreq        = '0;
    lc          = LOGIC_CTRL_IDLE;
    dr_req      = 1'b0;
    instr_clear = 1'b0;
    done        = 1'b0;

    unique case (st_q)
      S_IDLE: if (pending) begin
        unique case (opcode)
          OP_LOAD:   begin nb_d = 8'(NB); st_d = S_LD_REQ; end
          OP_READ:   st_d = S_RD_LOAD;
          OP_DOUBLE: begin pc_d = PC_DBL; sub_d = 1'b0; st_d = S_FPLOAD; end
          OP_ADD:    begin pc_d = PC_ADD; sub_d = 1'b0; st_d = S_FPLOAD; end
          OP_SUB:    begin pc_d = PC_ADD; sub_d = 1'b1; st_d = S_FPLOAD; end
          default:   st_d = S_FINISH;
        endcase
      end

      S_FPLOAD: begin
        mreq.src1   = ADR_FP;
        mreq.rd1    = 1'b1;
        lc.mux2_sel = 1'b1;
        lc.IOreg_en = 1'b1;
        st_d        = S_EXEC;
      end

      S_EXEC: begin
        unique case (u.op)
          U_ADD, U_NEGY: begin
            if (u.op == U_ADD || sub_q) begin
              mreq.src1   = u.s1;  mreq.rd1 = 1'b1;
              mreq.src2   = u.s2;  mreq.rd2 = 1'b1;
              mreq.dst    = u.d;   mreq.wr  = 1'b1;
              lc.mux1_sel = M1_ADD;
            end
            pc_d = pc_q + 1'b1;
          end
          U_MUL: begin
            mreq.src1    = u.s1;  mreq.rd1 = 1'b1;
            mreq.src2    = u.s2;  mreq.rd2 = 1'b1;
            lc.mul_start = 1'b1;
            st_d         = S_OP_SKIP;
          end
          U_SQR: begin
            mreq.src1    = u.s1;  mreq.rd1 = 1'b1;
            lc.sqr_start = 1'b1;
            st_d         = S_OP_SKIP;
          end
          U_MOVE: begin
            mreq.src1   = u.s1;  mreq.rd1 = 1'b1;
            lc.mux2_sel = 1'b1;
            lc.IOreg_en = 1'b1;
            st_d        = S_MOVE_WR;
          end
          U_ONE: begin
            lc.IOreg_set2one = 1'b1;
            st_d             = S_MOVE_WR;
          end
          U_TZ_DBL, U_TZ_ADD: begin
            mreq.src1 = u.s1;  mreq.rd1 = 1'b1;
            mreq.src2 = u.s2;  mreq.rd2 = 1'b1;
            st_d      = S_T_SKIP;
          end
          U_TZ_QINF: begin
            mreq.src1 = u.s1;  mreq.rd1 = 1'b1;
            st_d      = S_T_SKIP;
          end
          default: st_d = S_FINISH;   // U_END
        endcase
      end

      S_OP_SKIP: st_d = S_OP_WAIT;

      S_OP_WAIT: begin
        if ((u.op == U_MUL) ? status.mul_ready : status.sqr_ready) begin
          mreq.dst    = u.d;
          mreq.wr     = 1'b1;
          lc.mux1_sel = (u.op == U_MUL) ? M1_MUL : M1_SQR;
          pc_d        = pc_q + 1'b1;
          st_d        = S_EXEC;
        end
      end

      S_MOVE_WR: begin
        mreq.dst    = u.d;
        mreq.wr     = 1'b1;
        lc.mux1_sel = M1_BUS3;
        pc_d        = pc_q + 1'b1;
        st_d        = S_EXEC;
      end

      S_T_SKIP: st_d = S_T_EVAL;

      S_T_EVAL: begin
        st_d = S_EXEC;
        pc_d = pc_q + 1'b1;
        unique case (u.op)
          U_TZ_DBL:  if (status.zero1 || status.zero2or3) pc_d = PC_INF;
          U_TZ_QINF: if (status.zero1) pc_d = PC_COPYP;
          U_TZ_ADD:  if (status.zero1) pc_d = status.zero2or3 ? PC_DBL : PC_INF;
          default: ;
        endcase
      end

      S_LD_REQ:  begin dr_req = 1'b1; st_d = S_LD_SKIP; end
      S_LD_SKIP: st_d = S_LD_WAIT;
      S_LD_WAIT: if (!avr_turn) begin sc_d = 4'd8; st_d = S_LD_SHIFT; end
      S_LD_SHIFT: begin
        lc.IOreg_en = 1'b1;       // mux2_sel = 0: serial
        sc_d        = sc_q - 1'b1;
        if (sc_q == 4'd1) begin
          nb_d = nb_q - 1'b1;
          st_d = (nb_q == 8'd1) ? S_LD_WRITE : S_LD_REQ;
        end
      end
      S_LD_WRITE: begin
        mreq.dst    = ADR_OPND;
        mreq.wr     = 1'b1;
        lc.mux1_sel = M1_BUS3;
        st_d        = S_FINISH;
      end

      S_RD_LOAD: begin
        mreq.src1   = ADR_OPND;
        mreq.rd1    = 1'b1;
        lc.mux2_sel = 1'b1;
        lc.IOreg_en = 1'b1;
        nb_d        = 8'(NB);
        sc_d        = 4'(FIRST);
        st_d        = S_RD_SHIFT;
      end
      S_RD_SHIFT: begin
        lc.IOreg_en = 1'b1;
        sc_d        = sc_q - 1'b1;
        if (sc_q == 4'd1) st_d = S_RD_REQ;
      end
      S_RD_REQ:  begin dr_req = 1'b1; st_d = S_RD_SKIP; end
      S_RD_SKIP: st_d = S_RD_WAIT;
      S_RD_WAIT: if (!avr_turn) begin
        if (nb_q == 8'd1) st_d = S_FINISH;
        else begin
          nb_d = nb_q - 1'b1;
          sc_d = 4'd8;
          st_d = S_RD_SHIFT;
        end
      end

      S_FINISH: begin
        instr_clear = 1'b1;
        done        = 1'b1;
        st_d        = S_IDLE;
      end

      default: st_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (global_reset) begin
      st_q  <= S_IDLE;
      pc_q  <= '0;
      sub_q <= 1'b0;
      nb_q  <= '0;
      sc_q  <= '0;
    end else begin
      st_q  <= st_d;
      pc_q  <= pc_d;
      sub_q <= sub_d;
      nb_q  <= nb_d;
      sc_q  <= sc_d;
    end
  end

  assign is_sub = sub_q;

  // Rules of the control interface: one operator at a time, and never a
  // RAM write and an operator start in the same cycle.
  always_ff @(posedge clk)
    if (!global_reset) begin
      a_one_op: assert (!(lc.mul_start && lc.sqr_start));
      a_no_wr_on_start: assert (!((lc.mul_start || lc.sqr_start) && mreq.wr));
    end
endmodule
