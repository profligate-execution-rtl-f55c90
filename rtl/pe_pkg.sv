// pe_pkg: types and constants shared by the profligate-execution fabric.
//
// A register in each core carries one of three slice states: S (shared, valid
// everywhere), O (owned: depends on a miss this core waits for) or INV
// (poisoned: depends on a miss another core waits for). The sizes below are the
// evaluated configuration: 4 cores, 64 logical registers (32 integer + 32
// floating point), 64-bit data and addresses, a 512-entry global reorder buffer
// and a 256-entry global store queue. The instruction classes and the memory
// outcome encoding of a committed load are this design's own choices.
package pe_pkg;

  typedef enum logic [1:0] {
    RS_S   = 2'd0,   // shared
    RS_O   = 2'd1,   // owned by this core
    RS_INV = 2'd2    // poisoned
  } reg_state_e;

  // Class of the instruction at the head of a core's reorder buffer.
  typedef enum logic [2:0] {
    OP_ALU    = 3'd0,  // dest <- f(src1, src2); one source: src2 = src1
    OP_LOAD   = 3'd1,  // dest <- mem[f(src1, src2)]; one source: src2 = src1
    OP_STORE  = 3'd2,  // mem[src1 + imm] <- src2
    OP_BRANCH = 3'd3,  // branch on src1
    OP_NOP    = 3'd4   // no register or memory effect
  } op_e;

  // How the memory system resolved a load when it issued.
  typedef enum logic [1:0] {
    LD_HIT      = 2'd0,  // value found locally (STQ, L1 or L2)
    LD_MISS_OWN = 2'd1,  // L2 miss, this core waits for it
    LD_DISCARD  = 2'd2   // L2 miss handled elsewhere, or GSQ match: poison
  } ld_outcome_e;

  // Committed instruction as presented by a core at its ROB head.
  typedef struct packed {
    op_e          op;
    logic [5:0]   dest;
    logic [5:0]   src1;
    logic [5:0]   src2;
    ld_outcome_e  ld;
    logic         exc;      // instruction raises an exception at commit
    logic [63:0]  result;   // value produced (ALU/load), computed by the core
    logic [63:0]  addr;     // store address, computed by the core
    logic [63:0]  sdata;    // store data, read by the core from its ARF
  } commit_t;

endpackage
