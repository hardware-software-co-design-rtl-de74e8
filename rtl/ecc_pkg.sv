// ecc_pkg: types and constants shared by the GF(2^n) elliptic-curve
// coprocessor (hardware controller + data-path).
//
// Holds the data-path memory map (13 locations), the 8-bit instruction
// format written by the software controller, the control bundles that run
// from the hardware controller to the data-path (15 address-control signals,
// 7 logic-control signals), the 4 status signals running back, and the
// micro-program that breaks a projective point double, add or subtract into
// field operations.
//
// The bundle widths (15 / 7 / 4 / 2 interrupt lines) and the signal names
// Ain, Aout1, Aout2, wen, oen1, oen2, mux1_sel, mux2_sel, IOreg_en,
// IOreg_set2one, mul_start, sqr_start, mul_ready, sqr_ready, zero1 and
// zero2or3 follow the architecture description.  The opcode values, the
// location of each variable in memory and the micro-program itself are
// this design's own.  The micro-program computes the standard binary
// projective formulas (x = X/Z^2, y = Y/Z^3) for doubling and for adding an
// affine point, with 4 scratch registers.
package ecc_pkg;

  localparam int unsigned ADDR_W  = 4;
  localparam int unsigned NUM_LOC = 13;

  typedef logic [ADDR_W-1:0] addr_t;

  // Memory map of the two RAM blocks (both hold identical copies).
  localparam addr_t ADR_FP = 4'd0;   // field polynomial, low n coefficients
  localparam addr_t ADR_A  = 4'd1;   // curve parameter a
  localparam addr_t ADR_C  = 4'd2;   // c = b^(2^(n-2)), the 4th root of b
  localparam addr_t ADR_K  = 4'd3;   // multiplier k (kept for the host)
  localparam addr_t ADR_PX = 4'd4;   // base point P, affine x
  localparam addr_t ADR_PY = 4'd5;   // base point P, affine y
  localparam addr_t ADR_QX = 4'd6;   // accumulator Q, projective X
  localparam addr_t ADR_QY = 4'd7;   // accumulator Q, projective Y
  localparam addr_t ADR_QZ = 4'd8;   // accumulator Q, projective Z
  localparam addr_t ADR_T0 = 4'd9;   // scratch
  localparam addr_t ADR_T1 = 4'd10;
  localparam addr_t ADR_T2 = 4'd11;
  localparam addr_t ADR_T3 = 4'd12;
  // Symbolic addresses resolved by the address controller.
  localparam addr_t ADR_OPND = 4'd14; // operand nibble of the instruction
  localparam addr_t ADR_Y1   = 4'd15; // y of +P (PY) or of -P (T3 = PX+PY)

  // Instruction = {opcode, operand address}.
  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_LOAD   = 4'h1,  // shift ceil(n/8) bytes in, write to location
    OP_READ   = 4'h2,  // read location, shift ceil(n/8) bytes out
    OP_DOUBLE = 4'h3,  // Q <- 2Q
    OP_ADD    = 4'h4,  // Q <- Q + P
    OP_SUB    = 4'h5   // Q <- Q - P
  } opcode_e;

  // Source of bus4 (the write-back bus of both RAM blocks).
  typedef enum logic [1:0] {
    M1_ADD  = 2'd0,
    M1_MUL  = 2'd1,
    M1_SQR  = 2'd2,
    M1_BUS3 = 2'd3    // IOregister contents
  } mux1_e;

  // 15 address-control signals.
  typedef struct packed {
    addr_t Ain;
    addr_t Aout1;
    addr_t Aout2;
    logic  wen;
    logic  oen1;
    logic  oen2;
  } addr_ctrl_t;

  // 7 logic-control signals.  mux2_sel: 0 = serial data, 1 = bus1.
  typedef struct packed {
    mux1_e mux1_sel;
    logic  mux2_sel;
    logic  IOreg_en;
    logic  IOreg_set2one;
    logic  mul_start;
    logic  sqr_start;
  } logic_ctrl_t;

  // 4 status signals.
  typedef struct packed {
    logic mul_ready;
    logic sqr_ready;
    logic zero1;
    logic zero2or3;
  } status_t;

  // Symbolic RAM request from the FSM to the address controller.
  typedef struct packed {
    addr_t dst;
    addr_t src1;
    addr_t src2;
    logic  wr;
    logic  rd1;
    logic  rd2;
  } mem_req_t;

  localparam addr_ctrl_t ADDR_CTRL_IDLE  = '0;
  localparam logic_ctrl_t LOGIC_CTRL_IDLE = '{mux1_sel: M1_ADD, default: 1'b0};

  // Micro-operations of the double/add/subtract programs.
  typedef enum logic [3:0] {
    U_ADD,      // d <- s1 + s2                       (1 cycle)
    U_MUL,      // d <- s1 * s2                       (n cycles)
    U_SQR,      // d <- s1 ^ 2                        (floor(n/2) cycles)
    U_MOVE,     // d <- s1 through the IOregister
    U_ONE,      // d <- 1  through the IOregister
    U_NEGY,     // d <- s1 + s2 only for subtract (y of -P)
    U_TZ_DBL,   // s1 == 0 or s2 == 0 : result is O
    U_TZ_QINF,  // s1 == 0            : Q is O, result is +-P
    U_TZ_ADD,   // s1 == 0            : Q = +-P, double or O
    U_END
  } uop_e;

  typedef struct packed {
    uop_e  op;
    addr_t d;
    addr_t s1;
    addr_t s2;
  } uop_t;

  localparam int unsigned PC_W = 6;
  typedef logic [PC_W-1:0] pc_t;

  localparam pc_t PC_DBL   = 6'd0;
  localparam pc_t PC_ADD   = 6'd16;
  localparam pc_t PC_COPYP = 6'd42;
  localparam pc_t PC_INF   = 6'd46;

  function automatic uop_t mk(uop_e op, addr_t d, addr_t s1, addr_t s2);
    mk = '{op: op, d: d, s1: s1, s2: s2};
  endfunction

  // Micro-program ROM.
  // Double, input (X1,Y1,Z1) in Q:  Z2 = X1*Z1^2,  X2 = (X1 + c*Z1^2)^4,
  //   U = Z2 + X1^2 + Y1*Z1,  Y2 = X1^4*Z2 + U*X2.
  // Add Q + (x1,y1,1):  U1 = x1*Z0^2, W = X0 + U1, S1 = y1*Z0^3, R = Y0 + S1,
  //   Z2 = Z0*W, V = R*x1 + Z2*y1, T = R + Z2,
  //   X2 = a*Z2^2 + T*R + W^3,  Y2 = T*X2 + V*Z2^2.
  function automatic uop_t uprog(pc_t pc);
    unique case (pc)
      // ---------------- double ----------------
      6'd0:  uprog = mk(U_TZ_DBL, ADR_T0, ADR_QX, ADR_QZ);
      6'd1:  uprog = mk(U_MUL,    ADR_T0, ADR_QY, ADR_QZ);  // Y1*Z1
      6'd2:  uprog = mk(U_SQR,    ADR_T1, ADR_QZ, ADR_QZ);  // Z1^2
      6'd3:  uprog = mk(U_MUL,    ADR_T2, ADR_T1, ADR_C);   // c*Z1^2
      6'd4:  uprog = mk(U_MUL,    ADR_QZ, ADR_QX, ADR_T1);  // Z2
      6'd5:  uprog = mk(U_ADD,    ADR_T0, ADR_T0, ADR_QZ);  // Y1*Z1 + Z2
      6'd6:  uprog = mk(U_SQR,    ADR_T1, ADR_QX, ADR_QX);  // X1^2
      6'd7:  uprog = mk(U_ADD,    ADR_QX, ADR_QX, ADR_T2);  // X1 + c*Z1^2
      6'd8:  uprog = mk(U_SQR,    ADR_QX, ADR_QX, ADR_QX);
      6'd9:  uprog = mk(U_SQR,    ADR_QX, ADR_QX, ADR_QX);  // X2
      6'd10: uprog = mk(U_ADD,    ADR_T0, ADR_T1, ADR_T0);  // U
      6'd11: uprog = mk(U_MUL,    ADR_T0, ADR_T0, ADR_QX);  // U*X2
      6'd12: uprog = mk(U_SQR,    ADR_T1, ADR_T1, ADR_T1);  // X1^4
      6'd13: uprog = mk(U_MUL,    ADR_T1, ADR_T1, ADR_QZ);  // X1^4*Z2
      6'd14: uprog = mk(U_ADD,    ADR_QY, ADR_T1, ADR_T0);  // Y2
      6'd15: uprog = mk(U_END,    ADR_T0, ADR_T0, ADR_T0);
      // ---------------- add / subtract ----------------
      6'd16: uprog = mk(U_NEGY,   ADR_T3, ADR_PX, ADR_PY);  // y of -P
      6'd17: uprog = mk(U_TZ_QINF,ADR_T0, ADR_QZ, ADR_QZ);
      6'd18: uprog = mk(U_SQR,    ADR_T0, ADR_QZ, ADR_QZ);  // Z0^2
      6'd19: uprog = mk(U_MUL,    ADR_T1, ADR_PX, ADR_T0);  // U1
      6'd20: uprog = mk(U_ADD,    ADR_T1, ADR_QX, ADR_T1);  // W
      6'd21: uprog = mk(U_MUL,    ADR_T0, ADR_QZ, ADR_T0);  // Z0^3
      6'd22: uprog = mk(U_MUL,    ADR_T0, ADR_Y1, ADR_T0);  // S1
      6'd23: uprog = mk(U_ADD,    ADR_T0, ADR_QY, ADR_T0);  // R
      6'd24: uprog = mk(U_TZ_ADD, ADR_T0, ADR_T1, ADR_T0);
      6'd25: uprog = mk(U_MUL,    ADR_T2, ADR_T0, ADR_PX);  // R*x1
      6'd26: uprog = mk(U_MUL,    ADR_QZ, ADR_T1, ADR_QZ);  // Z2
      6'd27: uprog = mk(U_MUL,    ADR_T3, ADR_QZ, ADR_Y1);  // Z2*y1
      6'd28: uprog = mk(U_ADD,    ADR_T2, ADR_T2, ADR_T3);  // V
      6'd29: uprog = mk(U_SQR,    ADR_T3, ADR_QZ, ADR_QZ);  // Z2^2
      6'd30: uprog = mk(U_MUL,    ADR_T2, ADR_T2, ADR_T3);  // V*Z2^2
      6'd31: uprog = mk(U_ADD,    ADR_T3, ADR_T0, ADR_QZ);  // T
      6'd32: uprog = mk(U_MUL,    ADR_T0, ADR_T0, ADR_T3);  // T*R
      6'd33: uprog = mk(U_SQR,    ADR_QX, ADR_T1, ADR_T1);  // W^2
      6'd34: uprog = mk(U_MUL,    ADR_QX, ADR_QX, ADR_T1);  // W^3
      6'd35: uprog = mk(U_ADD,    ADR_QX, ADR_QX, ADR_T0);  // W^3 + T*R
      6'd36: uprog = mk(U_SQR,    ADR_T0, ADR_QZ, ADR_QZ);  // Z2^2
      6'd37: uprog = mk(U_MUL,    ADR_T0, ADR_T0, ADR_A);   // a*Z2^2
      6'd38: uprog = mk(U_ADD,    ADR_QX, ADR_QX, ADR_T0);  // X2
      6'd39: uprog = mk(U_MUL,    ADR_T3, ADR_T3, ADR_QX);  // T*X2
      6'd40: uprog = mk(U_ADD,    ADR_QY, ADR_T3, ADR_T2);  // Y2
      6'd41: uprog = mk(U_END,    ADR_T0, ADR_T0, ADR_T0);
      // ---------------- Q was O: Q <- +-P ----------------
      6'd42: uprog = mk(U_MOVE,   ADR_QX, ADR_PX, ADR_PX);
      6'd43: uprog = mk(U_MOVE,   ADR_QY, ADR_Y1, ADR_Y1);
      6'd44: uprog = mk(U_ONE,    ADR_QZ, ADR_T0, ADR_T0);
      6'd45: uprog = mk(U_END,    ADR_T0, ADR_T0, ADR_T0);
      // ---------------- result is O = (1,1,0) ----------------
      6'd46: uprog = mk(U_ONE,    ADR_QX, ADR_T0, ADR_T0);
      6'd47: uprog = mk(U_ONE,    ADR_QY, ADR_T0, ADR_T0);
      6'd48: uprog = mk(U_ADD,    ADR_QZ, ADR_QZ, ADR_QZ);  // Z + Z = 0
      default: uprog = mk(U_END,  ADR_T0, ADR_T0, ADR_T0);
    endcase
  endfunction

endpackage
