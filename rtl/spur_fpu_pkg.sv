// spur_fpu_pkg -- types and constants shared by the SPUR floating point co-processor.
//
// An operand is held on chip in "internal format", 87 bits split into four portions that
// travel on separate datapaths: sign (1), exponent (17-bit two's complement, bias -1, i.e.
// the true exponent minus one), type (5 bits: 2-bit rounding type over a 3-bit data type) and
// fraction (64 bits with an explicit integer bit at bit 63). The register file, the busses and
// the load/store logic all use this split.
//
// Widths (87-bit operand, 17-bit exponent, 5-bit type, 64-bit fraction, 65-bit fraction
// busses, 7-bit opcode, 5-bit register specifiers, 16 registers, FPSW bit positions) follow
// the design description. The numeric codes of opcodes, data types, rounding types and
// rounding modes, the special exponent used for zero, and the register holding the FPSW are
// this implementation's own choices.
package spur_fpu_pkg;

  localparam int FRAC_W  = 64;          // register fraction: 1 integer bit + 63 fraction bits
  localparam int EXP_W   = 17;          // internal exponent, two's complement, bias -1
  localparam int TYPE_W  = 5;           // {rounding type[1:0], data type[2:0]}
  localparam int BUS_W   = 65;          // fraction busses: 2 integer bits + 63 fraction bits
  localparam int NREGS   = 16;
  localparam int FPSW_REG = 15;         // register reserved for the status word (choice)

  // Special exponent written for a zero result ("EzeroE"): most negative 17-bit value.
  localparam logic [EXP_W-1:0] EZERO = 17'h10000;

  // Extended-range limits of the internal exponent (15-bit IEEE extended exponent field):
  // true exponent in [-16382, 16383], internal = true - 1.
  localparam int EXT_EMAX = 16382;
  localparam int EXT_EMIN = -16383;
  localparam int DBL_EMAX = 1022;
  localparam int DBL_EMIN = -1023;
  localparam int SGL_EMAX = 126;
  localparam int SGL_EMIN = -127;

  // Data type codes (3 bits).
  typedef enum logic [2:0] {
    DT_ZERO   = 3'd0,
    DT_DENORM = 3'd1,
    DT_NORM   = 3'd2,
    DT_INF    = 3'd3,
    DT_NAN    = 3'd4
  } dtype_e;

  // Rounding type codes (2 bits): precision the value was last rounded to.
  localparam logic [1:0] RT_EXT = 2'd0;
  localparam logic [1:0] RT_SGL = 2'd1;
  localparam logic [1:0] RT_DBL = 2'd2;

  // Rounding modes held in FPSW.RM.
  localparam logic [1:0] RM_NEAREST = 2'd0;
  localparam logic [1:0] RM_ZERO    = 2'd1;
  localparam logic [1:0] RM_PINF    = 2'd2;
  localparam logic [1:0] RM_MINF    = 2'd3;

  // FPSW bit positions (within the 64-bit fraction portion of the FPSW register).
  localparam int FPSW_TF  = 47;
  localparam int FPSW_E   = 46;
  localparam int FPSW_RM  = 44;   // RM occupies 45:44
  localparam int FPSW_V   = 43;
  localparam int FPSW_X   = 42;
  localparam int FPSW_U   = 41;
  localparam int FPSW_O   = 40;
  localparam int FPSW_OT2 = 37;   // OT2 occupies 39:37
  localparam int FPSW_OT1 = 34;   // OT1 occupies 36:34
  localparam int FPSW_EE  = 33;
  localparam int FPSW_EI  = 32;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [TYPE_W-1:0] typ;
    logic [FRAC_W-1:0] frac;
  } fpreg_t;

  // 7-bit opcodes seen on fpuOPCODE (encoding chosen here).
  typedef enum logic [6:0] {
    OP_FADD    = 7'h40,
    OP_FSUB    = 7'h41,
    OP_FMUL    = 7'h42,
    OP_FDIV    = 7'h43,
    OP_FCMP    = 7'h44,
    OP_FABS    = 7'h45,
    OP_FNEG    = 7'h46,
    OP_FMOV    = 7'h47,
    OP_CVTD    = 7'h48,
    OP_CVTS    = 7'h49,
    OP_LD_SGL  = 7'h50,
    OP_LD_DBL  = 7'h51,
    OP_LD_EXT1 = 7'h52,
    OP_LD_EXT2 = 7'h53,
    OP_ST_SGL  = 7'h54,
    OP_ST_DBL  = 7'h55,
    OP_ST_EXT1 = 7'h56,
    OP_ST_EXT2 = 7'h57,
    OP_TRAP    = 7'h7f
  } opcode_e;

  // Positions in the 10-bit one-hot decoded arithmetic opcode vector.
  localparam int A_ADD  = 0;
  localparam int A_SUB  = 1;
  localparam int A_MUL  = 2;
  localparam int A_DIV  = 3;
  localparam int A_CMP  = 4;
  localparam int A_ABS  = 5;
  localparam int A_NEG  = 6;
  localparam int A_MOV  = 7;
  localparam int A_CVTD = 8;
  localparam int A_CVTS = 9;

  // Positions in the 8-bit one-hot decoded memory opcode.
  localparam int M_LD_SGL  = 0;
  localparam int M_LD_DBL  = 1;
  localparam int M_LD_EXT1 = 2;
  localparam int M_LD_EXT2 = 3;
  localparam int M_ST_SGL  = 4;
  localparam int M_ST_DBL  = 5;
  localparam int M_ST_EXT1 = 6;
  localparam int M_ST_EXT2 = 7;

  // One station of the memory opcode pipeline: 15 bits.
  typedef struct packed {
    logic [7:0] op;      // one-hot memory operation
    logic       load;    // composite: any load
    logic       store;   // composite: any store
    logic [4:0] rd;      // register specifier
  } memop_t;

  // Arithmetic supervisory state machine (eight states).
  typedef enum logic [2:0] {
    S_INACTIVE  = 3'd0,
    S_EARLY     = 3'd1,
    S_FIRST     = 3'd2,
    S_SECOND    = 3'd3,
    S_TRAPPABLE = 3'd4,
    S_SAFE      = 3'd5,
    S_PREPARE   = 3'd6,
    S_WRITE     = 3'd7
  } astate_e;

  // Last execute cycle (value of the machine cycle counter when the results reach the
  // destination latches); the write cycle follows. Cycle 1 is the decode cycle.
  localparam logic [4:0] LAST_ADD = 5'd3;
  localparam logic [4:0] LAST_MUL = 5'd8;
  localparam logic [4:0] LAST_DIV = 5'd21;

  // Multiply/divide loop lengths.
  localparam int MUL_ITERS = 9;    // 8.5 loops of one multiplier byte
  localparam int DIV_ITERS = 34;   // two quotient bits per loop, 68-bit quotient vectors

endpackage
