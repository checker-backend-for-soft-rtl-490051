// chk_pkg: types and widths shared by the checker-backend blocks.
//
// The checker backend re-executes every committed instruction on one of the
// processor's own execution clusters and compares loads, stores and branches
// with the values recorded by the regular clusters. This package holds the
// record formats passed between the commit stage, the value queues (LVQ, SVQ,
// BVQ), the checkROB, the checker rename logic and the checkpoint buffer.
// Address/data width (32), 16 logical and 128 physical registers are this
// design's own choices; the structure sizes live as module parameters.
package chk_pkg;

  localparam int unsigned XLEN     = 32;   // address and data width
  localparam int unsigned NUM_LREG = 16;   // logical registers
  localparam int unsigned NUM_PREG = 128;  // physical registers per backend
  localparam int unsigned LREG_W   = $clog2(NUM_LREG);
  localparam int unsigned PREG_W   = $clog2(NUM_PREG);

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [PREG_W-1:0] preg_t;

  // Instruction class as seen by the checking machinery.
  typedef enum logic [1:0] {
    OP_ALU    = 2'd0,
    OP_LOAD   = 2'd1,
    OP_STORE  = 2'd2,
    OP_BRANCH = 2'd3
  } op_e;

  // One instruction at the head of the ROB, as the regular clusters executed it.
  typedef struct packed {
    logic  valid;
    op_e   op;
    word_t pc;
    logic  has_dst;
    lreg_t ldst;
    lreg_t lsrc1;
    lreg_t lsrc2;
    preg_t reg_old_pdst;  // regular cluster's previous mapping of ldst
    word_t addr;          // load/store address
    word_t data;          // load result or store data
    logic  taken;         // branch outcome
    word_t target;        // branch target
    logic  exc;           // exception raised in the regular cluster
  } commit_t;

  // Instruction handed to the checker cluster's schedulers.
  typedef struct packed {
    logic  valid;
    op_e   op;
    word_t pc;
    logic [6:0] crob_idx;  // checkROB slot (sized for the 128-entry checkROB)
    logic  has_dst;
    preg_t pdst;
    preg_t psrc1;
    preg_t psrc2;
  } chk_alloc_t;

  // Load/store record held in the LVQ and SVQ.
  typedef struct packed {
    word_t addr;
    word_t data;
  } mem_rec_t;

  // Branch outcome held in the BVQ.
  typedef struct packed {
    logic  taken;
    word_t target;
  } br_rec_t;

  // Instruction leaving the checkROB (its registers are released).
  typedef struct packed {
    logic  valid;
    word_t pc;
    logic  is_store;
    logic  has_dst;
    lreg_t ldst;
    preg_t pdst;          // checker mapping becoming architectural
    preg_t chk_old_pdst;  // checker register released
    preg_t reg_old_pdst;  // regular-cluster register released
  } retire_t;

  // Checkpoint-buffer entry: one per retired instruction.
  typedef struct packed {
    word_t pc;
    logic  is_store;
    logic  has_dst;
    lreg_t ldst;
    word_t val_reg;  // released value, regular clusters
    word_t val_chk;  // released value, checker cluster
  } ckpt_t;

endpackage
