// arith_pkg: word format, operation codes and configuration records shared by
// the processing elements (PEs), the routing and allocation networks and the
// local controller of the dynamic arithmetic processor.
//
// Number format (this design's choice; the source leaves widths open): a word
// is a floating-point number whose mantissa m is an MW-bit two's complement
// fraction m0.m1...m(MW-1) in [-1,1) and whose exponent e is an EW-bit two's
// complement integer; value = m * 2**e.  A normalized word has m0 != m1, so the
// sign bit and the most significant mantissa bit alone tell x<0, x=0 or x>0,
// which is what the branch control looks at.  Fixed-point operations use the
// mantissa field as a plain fraction and leave the exponent at zero.
// Every word that moves between blocks travels as a flit: the word plus a
// valid bit, so results find their way back to memory without a schedule.
package arith_pkg;

  parameter int MW = 24;            // mantissa bits, sign included
  parameter int EW = 8;             // exponent bits
  parameter int NPORT = 3;          // operand ports and result ports per PE
  parameter int DLY_W = 6;          // width of a programmable delay value
  parameter int FR = 2 * (MW - 1);  // fraction bits of the Multiply/Add result
  parameter int RW = FR + 4;        // Multiply/Add result width (4 integer bits)

  typedef struct packed {
    logic signed [EW-1:0] e;
    logic signed [MW-1:0] m;
  } word_t;

  typedef struct packed {
    logic  v;
    word_t w;
  } flit_t;

  // Operation of one Exponent/Logic + Multiply/Add stage pair.
  typedef enum logic [3:0] {
    OP_PASS,          // r = a
    OP_FADD,          // floating a + b
    OP_FSUB,          // floating a - b
    OP_FMUL,          // floating a * b
    OP_IADD,          // fixed-point fraction a + b
    OP_ISUB,          // fixed-point fraction a - b
    OP_IMUL,          // fixed-point fraction a * b
    OP_NR_TWOMINUS,   // 2 - (a*b +- b), sign of s picks + or -
    OP_NR_STEP,       // a*b +- b, result kept as fraction part (implied +-1)
    OP_NR_LAST,       // a*b +- b, result as a floating-point word
    OP_AND,           // bitwise on the whole word
    OP_OR,
    OP_XOR,
    OP_NOT            // ~a
  } op_e;

  // Operand lanes visible to a stage pair.  LN_R1 only exists for stage II.
  typedef enum logic [1:0] {LN_X, LN_Y, LN_Z, LN_R1} lane_e;

  // Lanes the Transmit multiplexer can send out.
  typedef enum logic [2:0] {OS_X, OS_Y, OS_Z, OS_R1, OS_R2} osel_e;

  // Branch conditions, evaluated on a normalized word.
  typedef enum logic [2:0] {CD_ALWAYS, CD_LT, CD_LE, CD_EQ, CD_GE, CD_GT, CD_NE} cond_e;

  // Where a PE operand port takes its data from.
  typedef enum logic [1:0] {SRC_MEM, SRC_NET, SRC_FB, SRC_ZERO} src_e;

  // Multiply/Add operation classes (Fig. 5 style unit).
  typedef enum logic [2:0] {MA_ADD, MA_SUB, MA_MUL, MA_TWOMINUS, MA_MULACC} ma_op_e;

  typedef struct packed {
    op_e   op;
    lane_e a;
    lane_e b;
    lane_e s;      // sign reference for the Newton-Raphson operations
  } unit_cfg_t;

  typedef struct packed {
    src_e  [NPORT-1:0] src;   // per operand port
    logic  [NPORT-1:0][1:0] fb;   // which own result port feeds a SRC_FB port
    logic  [DLY_W-1:0] cdly;  // noncompute delay on port C, in cycles
    logic              rom_x; // Exp/Logic I: lane x := ROM(1/y), exponent -e(y)
    unit_cfg_t         u1;    // Exp/Logic I + Multiply/Add I
    unit_cfg_t         u2;    // Exp/Logic II + Multiply/Add II
    cond_e             cond;  // branch condition
    osel_e             clane; // lane the condition is evaluated on
    osel_e [NPORT-1:0] out_t; // result port sources when the condition holds
    osel_e [NPORT-1:0] out_f; // result port sources when it does not
  } pe_cfg_t;

  // One crossbar output of the routing network.
  typedef struct packed {
    logic             en;
    logic [7:0]       sel;  // source: result port index (3*pe + port)
    logic [DLY_W-1:0] dly;  // extra noncompute delay, cycles
  } route_cfg_t;

  // One allocation-network output (a PE memory port or a memory write port).
  typedef struct packed {
    logic       en;
    logic [7:0] sel;
  } alloc_cfg_t;

  // Stream description of one local memory.
  typedef struct packed {
    logic        rd_en;
    logic [15:0] rd_base;
    logic [15:0] rd_stride;
    logic        wr_en;
    logic [15:0] wr_base;
    logic [15:0] wr_stride;
  } lm_cfg_t;

  // Operands prepared by an Exponent/Logic stage for the next Multiply/Add stage.
  typedef struct packed {
    logic                 v;
    op_e                  op;
    logic signed [MW-1:0] a;     // aligned mantissa of the first operand
    logic signed [MW-1:0] b;     // aligned mantissa of the second operand
    logic                 neg;   // use '-' in the +-b term
    logic signed [EW:0]   e;     // result exponent before normalization
    word_t                lres;  // result of a logic operation or a pass
  } prep_t;

  function automatic logic is_float_op(op_e op);
    return op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_NR_LAST};
  endfunction

  function automatic logic is_logic_op(op_e op);
    return op inside {OP_AND, OP_OR, OP_XOR, OP_NOT, OP_PASS};
  endfunction

endpackage
