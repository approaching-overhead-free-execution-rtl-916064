// Shared constants and types of the reduced-overhead Octavo soft-processor.
//
// Octavo is a barrel processor: THREADS hardware threads issue in strict
// round-robin order, one instruction per clock, so each thread sees the
// whole pipeline as a single cycle and needs no forwarding or interlocks.
// The reduced-overhead variant adds, per thread, an Address Offset Module
// (AOM, one per operand) and a Branch Trigger Module (BTM) that carry out
// addressing and flow control in parallel with the useful work.
//
// Instruction word (op, then D, A, B fields, MSB first):
//   [35:32] opcode   [31:20] D (12 bits)   [19:10] A (10 bits)   [9:0] B (10 bits)
// The opcode values are the published Octavo encoding. The field widths and
// the 36-bit word are this design's choice: A and B each index one 1024-word
// data memory, and D carries two extra bits that select the target region.
//
// Write (D) address map, region = D[11:10]:
//   0: A data memory   1: B data memory   2: instruction memory
//   3: configuration space of the writing thread's AOM and BTM entries
// Inside an A or B memory (10-bit offset):
//   [IO_BASE, IO_BASE+IO_PORTS)      memory-mapped I/O ports (read via A/B, write via D)
//   [IND_BASE, IND_BASE+POINTERS)    indirect pointer slots handled by the AOM
//   offsets below SHARED_WORDS        shared by all threads (no default offset)
//   offsets at or above SHARED_WORDS  private: the thread's default offset is added
// Configuration space (10-bit offset inside region 3):
//   AOM of operand o (0=A, 1=B, 2=D): o*32 + p = PO[p], o*32 + 8 + p = PI[p], o*32 + 16 = DO
//   BTM entry e: 128 + 4*e + 0 = BO, +1 = BD, +2 = {BF[2:0], BPE, BP} in bits [4:0]
//
// Lint note: a module compiled alone reports the constants of this package
// that it does not use itself (for example BTM_BASE in the ALU); every
// constant is used by some module of the design.
package octavo_pkg;

  localparam int unsigned WORD_W     = 36;
  localparam int unsigned THREADS    = 8;
  localparam int unsigned TID_W      = $clog2(THREADS);
  localparam int unsigned OP_W       = 4;
  localparam int unsigned MEM_AW     = 10;            // A, B field width; A/B/I memory depth 2**MEM_AW
  localparam int unsigned D_W        = MEM_AW + 2;    // D field: region + offset
  localparam int unsigned PC_W       = MEM_AW;
  localparam int unsigned IO_PORTS   = 2;             // I/O ports in each of A and B
  localparam int unsigned IO_BASE    = 2;
  localparam int unsigned IND_BASE   = 8;
  localparam int unsigned MAX_PTRS   = 8;             // room per operand in the configuration layout
  localparam int unsigned SHARED_WORDS = 64;
  localparam int unsigned BTM_BASE   = 128;

  typedef enum logic [OP_W-1:0] {
    OP_XOR = 4'b0000,
    OP_AND = 4'b0001,
    OP_OR  = 4'b0010,
    OP_SUB = 4'b0011,
    OP_ADD = 4'b0100,
    OP_U5  = 4'b0101,
    OP_U6  = 4'b0110,
    OP_U7  = 4'b0111,
    OP_MHS = 4'b1000,
    OP_MLS = 4'b1001,
    OP_MHU = 4'b1010,
    OP_JMP = 4'b1011,
    OP_JZE = 4'b1100,
    OP_JNZ = 4'b1101,
    OP_JPO = 4'b1110,
    OP_JNE = 4'b1111
  } opcode_e;

  typedef enum logic [1:0] {
    REG_A   = 2'd0,
    REG_B   = 2'd1,
    REG_I   = 2'd2,
    REG_CFG = 2'd3
  } region_e;

  // Branch conditions selectable by a BTM entry's BF field, tested on the
  // thread's most recent result.
  typedef enum logic [2:0] {
    BC_ALWAYS = 3'd0,
    BC_ZERO   = 3'd1,
    BC_NZERO  = 3'd2,
    BC_POS    = 3'd3,   // >= 0
    BC_NEG    = 3'd4,   // < 0
    BC_EVEN   = 3'd5,
    BC_ODD    = 3'd6,
    BC_NEVER  = 3'd7
  } bcond_e;

  typedef struct packed {
    logic [OP_W-1:0]   op;
    logic [D_W-1:0]    d;
    logic [MEM_AW-1:0] a;
    logic [MEM_AW-1:0] b;
  } instr_t;

  // One write into a thread's AOM/BTM configuration space.
  typedef struct packed {
    logic              we;
    logic [TID_W-1:0]  tid;
    logic [MEM_AW-1:0] addr;
    logic [WORD_W-1:0] data;
  } cfg_wr_t;

  function automatic logic is_alu_op(logic [OP_W-1:0] op);
    return (op <= OP_ADD) || (op == OP_MHS) || (op == OP_MLS) || (op == OP_MHU);
  endfunction

  function automatic logic is_io_addr(logic [MEM_AW-1:0] off);
    return (off >= MEM_AW'(IO_BASE)) && (off < MEM_AW'(IO_BASE + IO_PORTS));
  endfunction

  // The eight condition flags of a result word, indexed by bcond_e.
  function automatic logic [7:0] cond_flags(logic [WORD_W-1:0] r);
    logic [7:0] f;
    f[BC_ALWAYS] = 1'b1;
    f[BC_ZERO]   = (r == '0);
    f[BC_NZERO]  = (r != '0);
    f[BC_POS]    = ~r[WORD_W-1];
    f[BC_NEG]    = r[WORD_W-1];
    f[BC_EVEN]   = ~r[0];
    f[BC_ODD]    = r[0];
    f[BC_NEVER]  = 1'b0;
    return f;
  endfunction

endpackage
