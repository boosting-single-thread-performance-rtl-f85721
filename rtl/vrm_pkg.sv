// vrm_pkg: types and constants shared by the reconfigurable functional unit.
//
// The reconfigurable datapath (VRD) is a grid of ALU processing elements.
// Each PE is configured by a 64-bit descriptor held in two 32-bit words of
// a configuration context: a control word (mode, operation, two operand
// selects, flag select) and a 32-bit immediate. After the PE descriptors a
// context holds four write-back words (one byte per host register: enable
// bit and source PE) and one flag write-back word. Contexts all have the
// same size for a given array shape, as the architecture requires; the
// field layout itself is this design's own choice.
//
// Flags follow the ARM host's NZCV convention so that flags can pass
// between the host and the datapath unchanged.
package vrm_pkg;

  localparam int unsigned XLEN  = 32;   // datapath width (32-bit operands)
  localparam int unsigned NREG  = 16;   // host general-purpose registers
  localparam int unsigned CTX_AW = 24;  // address field carried by a BXV

  // ALU operations (ARM data-processing subset plus shifts).
  typedef enum logic [3:0] {
    OP_ADD = 4'd0,  OP_ADC = 4'd1,  OP_SUB = 4'd2,  OP_SBC = 4'd3,
    OP_RSB = 4'd4,  OP_RSC = 4'd5,  OP_AND = 4'd6,  OP_ORR = 4'd7,
    OP_EOR = 4'd8,  OP_BIC = 4'd9,  OP_MOV = 4'd10, OP_MVN = 4'd11,
    OP_LSL = 4'd12, OP_LSR = 4'd13, OP_ASR = 4'd14, OP_ROR = 4'd15
  } alu_op_e;

  // What a PE does. LOAD and STORE are honoured only in load/store columns.
  typedef enum logic [1:0] {
    PE_NOP = 2'd0, PE_ALU = 2'd1, PE_LOAD = 2'd2, PE_STORE = 2'd3
  } pe_mode_e;

  typedef struct packed {
    logic n;  // sign
    logic z;  // zero
    logic c;  // carry out / not borrow
    logic v;  // signed overflow
  } flags_t;

  // Operand source select (8 bits).
  localparam logic [7:0] SRC_REG0 = 8'd0;    // 0..15   : host register r0..r15
  localparam logic [7:0] SRC_PREV0 = 8'd16;  // 16+c    : previous-row PE in column c
  localparam logic [7:0] SRC_IMM  = 8'd255;  // 255     : the PE's immediate
  // Flag source select (8 bits).
  localparam logic [7:0] FSEL_CPU0  = 8'd0;  // 0..3    : host N, Z, C, V
  localparam logic [7:0] FSEL_PREV0 = 8'd4;  // 4+4c+f  : previous-row PE c, flag f (0=N..3=V)
  localparam logic [7:0] FSEL_ZERO  = 8'd254;
  localparam logic [7:0] FSEL_ONE   = 8'd255;

  // PE descriptor: control word in bits [31:0], immediate in [63:32].
  typedef struct packed {
    logic [31:0] imm;
    logic [1:0]  rsvd;
    logic [7:0]  fsel;
    logic [7:0]  srcb;
    logic [7:0]  srca;
    alu_op_e     op;
    pe_mode_e    mode;
  } pe_cfg_t;

  // Result write-back select: one byte per destination.
  typedef struct packed {
    logic       en;
    logic [6:0] pe;   // source PE index, row * COLS + column
  } wb_sel_t;

  // Memory operation a load/store PE asks for.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [XLEN-1:0]   addr;
    logic [XLEN-1:0]   wdata;
  } ls_req_t;

  // Event pulses of one VRFU, for performance counting.
  typedef struct packed {
    logic ctx_hit;        // context found in the context cache
    logic ctx_miss;       // context fetched through the DMA
    logic ctx_evict;      // a valid context was replaced
    logic bank_conflict;  // two accesses of one row hit the same bank
    logic mem_stall;      // a data-cache port held the row (miss)
    logic load;           // a load completed
    logic store;          // a store completed
    logic done;           // a BXV completed
  } vcu_ev_t;

  // Number of 32-bit words in a context for a ROWS x COLS array.
  function automatic int unsigned ctx_words(int unsigned rows, int unsigned cols);
    return 2 * rows * cols + NREG / 4 + 1;
  endfunction

  // Flag of index f (0=N, 1=Z, 2=C, 3=V).
  function automatic logic flag_bit(flags_t f, logic [1:0] idx);
    case (idx)
      2'd0:    return f.n;
      2'd1:    return f.z;
      2'd2:    return f.c;
      default: return f.v;
    endcase
  endfunction

endpackage
