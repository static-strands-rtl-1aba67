// strand_pkg: types and constants shared by the static-strand back end.
//
// A static strand is a chain of up to MAX_STRAND_LEN integer instructions in
// which every intermediate result has exactly one consumer, the next
// instruction of the chain. Software places a prefix instruction in front of
// the chain that holds its length; the hardware collapses the chain into one
// macro-op that takes a single issue-queue slot, a single reorder-buffer slot
// and runs back to back in a closed-loop ALU.
//
// Sizes that follow the document: 64 physical registers (so 6-bit result
// tags), at most two external source operands per strand, strand lengths of
// two to five instructions evaluated, six issue-queue and six reorder-buffer
// entries. This design's own choices: a 32-bit datapath, 16-bit sign-extended
// immediates, a 4-bit length field in the prefix, MAX_STRAND_LEN = 4 and the
// ALU op set below.
package strand_pkg;

  localparam int XLEN           = 32;
  localparam int IMM_W          = 16;
  localparam int NUM_REGS       = 64;
  localparam int TAG_W          = $clog2(NUM_REGS);
  localparam int MAX_STRAND_LEN = 4;
  localparam int LEN_W          = $clog2(MAX_STRAND_LEN + 1);
  localparam int OPID_W         = (MAX_STRAND_LEN > 1) ? $clog2(MAX_STRAND_LEN) : 1;
  localparam int PFX_LEN_W      = 4;
  localparam int ROB_ENTRIES    = 6;
  localparam int ROB_ID_W       = $clog2(ROB_ENTRIES);
  localparam int IQ_ENTRIES     = 6;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [OPID_W-1:0] opid_t;

  // Integer ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_SLL  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_SLT  = 4'd8,
    ALU_SLTU = 4'd9
  } alu_op_e;

  // Where an ALU operand comes from inside a macro-op: one of the two
  // buffered external sources, the op's own immediate, the result of the
  // previous op of the strand (the closed-loop path) or the zero register.
  typedef enum logic [2:0] {
    OPD_ZERO  = 3'd0,
    OPD_SRC1  = 3'd1,
    OPD_SRC2  = 3'd2,
    OPD_IMM   = 3'd3,
    OPD_CHAIN = 3'd4
  } opd_sel_e;

  typedef enum logic [1:0] {
    INS_ALU    = 2'd0,  // rd = rs1 op (use_imm ? sext(imm) : rs2)
    INS_PREFIX = 2'd1,  // no-op carrying the length of the strand that follows
    INS_NOP    = 2'd2
  } ins_kind_e;

  // A decoded instruction as it leaves the decode stage.
  typedef struct packed {
    ins_kind_e              kind;
    logic [PFX_LEN_W-1:0]   pfx_len;
    alu_op_e                op;
    tag_t                   rd;
    tag_t                   rs1;
    tag_t                   rs2;
    logic                   use_imm;
    logic [IMM_W-1:0]       imm;
  } instr_t;

  // One component operation of a macro-op: its op-code, immediate and the
  // operand routing worked out by the strand accumulation buffer.
  typedef struct packed {
    alu_op_e          op;
    opd_sel_e         a_sel;
    opd_sel_e         b_sel;
    logic [IMM_W-1:0] imm;
  } strand_op_t;

  // A macro-op: a single instruction (len = 1) or a collapsed strand.
  typedef struct packed {
    logic [LEN_W-1:0]                      len;
    strand_op_t [MAX_STRAND_LEN-1:0]       ops;
    logic  [1:0]                           src_valid;
    tag_t  [1:0]                           src_tag;
    opid_t [1:0]                           src_opid;
    logic                                  dest_valid;
    tag_t                                  dest_tag;
    logic                                  strand;   // len > 1
    logic                                  mixed;    // holds non-ALU ops
    logic [ROB_ID_W-1:0]                   rob_id;
  } macro_op_t;

  function automatic word_t sext_imm(logic [IMM_W-1:0] imm);
    return word_t'(signed'(imm));
  endfunction

  function automatic word_t alu_compute(alu_op_e op, word_t a, word_t b);
    word_t y;
    case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_SLL:  y = a << b[4:0];
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = word_t'($signed(a) >>> b[4:0]);
      ALU_SLT:  y = word_t'($signed(a) < $signed(b));
      ALU_SLTU: y = word_t'(a < b);
      default:  y = '0;
    endcase
    return y;
  endfunction

endpackage
