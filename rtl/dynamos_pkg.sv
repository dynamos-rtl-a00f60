// dynamos_pkg: shared sizes, types and the encoded-schedule format of the
// DynaMOS little core (an in-order core that can replay issue schedules
// recorded by an out-of-order core, "OinO" mode).
//
// Sizes that follow the design: 3-wide issue, 4 physical registers per
// architectural register (128-entry PRF for 32 ARs), up to 16 physical
// condition-code registers, a 32-entry LSQ whose 5-bit sequence numbers form a
// 20-byte meta-block, traces of at most 128 instructions, and a 4 kB schedule
// trace cache (STC). Each register field of an encoded instruction carries a
// 2-bit version suffix.
//
// Own choices: the micro-op set (ADD, SUB, ADDI, LD, ST, CMP, BR, NOP), the
// 48-bit slot layout, 32-bit data and addresses, a 20-byte STC block that holds
// either the meta-block or one 3-wide issue group, and the 4-bit NZCV flags.
package dynamos_pkg;

  localparam int unsigned WIDTH      = 3;   // issue width of big and little
  localparam int unsigned NUM_AR     = 32;  // architectural registers
  localparam int unsigned AR_W       = 5;
  localparam int unsigned POOL       = 4;   // PRs per AR
  localparam int unsigned SUF_W      = 2;   // suffix bits per register field
  localparam int unsigned CC_POOL    = 16;  // PRs of the condition-code register
  localparam int unsigned CC_SUF_W   = 4;
  localparam int unsigned XLEN       = 32;
  localparam int unsigned LSQ_DEPTH  = 32;
  localparam int unsigned SEQ_W      = 5;
  localparam int unsigned MAX_TRACE  = 128; // instructions per trace
  localparam int unsigned MIN_TRACE  = 20;  // a trace shorter than this is extended
  localparam int unsigned STC_BYTES  = 4096;
  localparam int unsigned BLK_BITS   = 160; // 20 bytes = one meta-block
  localparam int unsigned SLOT_BITS  = 48;

  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,
    OP_ADD  = 3'd1,  // rd = rs1 + rs2
    OP_SUB  = 3'd2,  // rd = rs1 - rs2
    OP_ADDI = 3'd3,  // rd = rs1 + imm
    OP_LD   = 3'd4,  // rd = mem[rs1 + imm]
    OP_ST   = 3'd5,  // mem[rs1 + imm] = rs2
    OP_CMP  = 3'd6,  // flags = compare(rs1, rs2)
    OP_BR   = 3'd7   // conditional branch on flags, direction recorded in slot
  } op_e;

  typedef enum logic [1:0] {
    BC_EQ = 2'd0, BC_NE = 2'd1, BC_LT = 2'd2, BC_GE = 2'd3
  } bcond_e;

  // One register operand: architectural index and Level-1 version suffix.
  typedef struct packed {
    logic [AR_W-1:0]  ar;
    logic [SUF_W-1:0] suf;
  } reg_t;

  // One encoded instruction in an STC issue group (48 bits).
  typedef struct packed {
    logic                valid;
    op_e                 op;
    reg_t                rd;
    reg_t                rs1;
    reg_t                rs2;
    logic [15:0]         imm;    // sign-extended immediate
    logic [CC_SUF_W-1:0] ccsuf;  // suffix of the flags written (CMP) or read (BR)
    bcond_e              bcond;
    logic                taken;  // direction recorded when the schedule was built
  } slot_t;

  // One STC block holding an issue group.
  typedef struct packed {
    logic [BLK_BITS-WIDTH*SLOT_BITS-2:0] pad;
    logic                                eot;  // End-of-Trace marker
    slot_t [WIDTH-1:0]                   slot;
  } group_t;

  // The meta-block: program sequence number of the k-th memory op in issue order.
  typedef logic [LSQ_DEPTH-1:0][SEQ_W-1:0] meta_t;

  // NZCV-style flags of a compare: N, Z, C (no borrow), V.
  function automatic logic [3:0] cmp_flags(logic [XLEN-1:0] a, logic [XLEN-1:0] b);
    logic [XLEN:0] d;
    logic          n, z, c, v;
    d = {1'b0, a} - {1'b0, b};
    n = d[XLEN-1];
    z = (d[XLEN-1:0] == '0);
    c = ~d[XLEN];
    v = (a[XLEN-1] ^ b[XLEN-1]) & (a[XLEN-1] ^ d[XLEN-1]);
    return {n, z, c, v};
  endfunction

  function automatic logic br_eval(bcond_e c, logic [3:0] f);
    logic n, z, v;
    n = f[3];
    z = f[2];
    v = f[0];
    unique case (c)
      BC_EQ:   return z;
      BC_NE:   return ~z;
      BC_LT:   return n ^ v;
      default: return ~(n ^ v);
    endcase
  endfunction

endpackage
