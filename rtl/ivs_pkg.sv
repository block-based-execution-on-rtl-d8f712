// ivs_pkg: types and constants shared by the integrated vector-scalar core.
//
// The core runs a small load/store instruction set with scalar and vector
// classes. The instruction classes (scalar ALU, scalar memory, vector
// computational, vector memory) follow the split the core's issue logic needs;
// the field layout, opcodes and widths are this design's own choice.
//
// Instruction fields (instr_t):
//   cls     instruction class
//   op      ALU operation (ALU classes only)
//   rd      destination: scalar register (S_ALU, S_LD) or vector register (V_ALU, V_LD)
//   rs1     scalar ALU: first operand; memory classes: scalar base register;
//           V_ALU: first vector source
//   rs2     scalar ALU: second operand; S_ST: data register;
//           V_ALU: second vector source; V_ST: vector register stored
//   use_imm S_ALU only: second operand is the sign-extended immediate
//   imm     immediate (address offset for memory classes)
// Memory is word addressed. Vector memory accesses are unit stride: element e
// of a vector lives at base + e, with base = sreg[rs1] + imm.
package ivs_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned REG_W     = 4;   // register field width (16 scalar, 16 vector)
  localparam int unsigned IMM_W     = 16;

  typedef enum logic [2:0] {
    C_S_ALU = 3'd0,
    C_S_LD  = 3'd1,
    C_S_ST  = 3'd2,
    C_V_ALU = 3'd3,
    C_V_LD  = 3'd4,
    C_V_ST  = 3'd5
  } iclass_e;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_AND = 3'd2,
    OP_OR  = 3'd3,
    OP_XOR = 3'd4,
    OP_MUL = 3'd5
  } aluop_e;

  typedef struct packed {
    iclass_e            cls;
    aluop_e             op;
    logic [REG_W-1:0]   rd;
    logic [REG_W-1:0]   rs1;
    logic [REG_W-1:0]   rs2;
    logic               use_imm;
    logic [IMM_W-1:0]   imm;
  } instr_t;

  // Multiplies go to the complex integer ALU, everything else to the simple one.
  function automatic logic uses_complex(aluop_e op);
    return op == OP_MUL;
  endfunction

  function automatic logic is_mem(iclass_e c);
    return c == C_S_LD || c == C_S_ST || c == C_V_LD || c == C_V_ST;
  endfunction

  // One-cycle event pulses, counted by performance counters or testbenches.
  typedef struct packed {
    logic       blk_form;       // a block was captured
    logic [2:0] blk_size;       // its size (valid with blk_form)
    logic       blk_end_other;  // block closed by a non-computational instruction
    logic       blk_end_full;   // block closed because it was full
    logic       chain_byp;      // CCL forwarded an operand
    logic       mem_during_blk; // memory instruction issued while a block runs
    logic       salu_during_blk;// scalar ALU instruction issued while a block runs
    logic       salu_fu_stall;  // scalar ALU instruction waited for a busy ALU
    logic       acl_hold;       // ACL held a scalar memory instruction
    logic       vmem_conflict;  // vector memory or block start waited on a register conflict
    logic       blk_busy_stall; // vector ALU instruction waited for the running block
    logic       load_use_stall; // reader of a pending scalar load waited
  } ivs_events_t;

endpackage
