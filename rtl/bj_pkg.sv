// bj_pkg: types and constants shared by the BlackJack checking subsystem.
//
// BlackJack runs a leading and a trailing copy of a program on one SMT core
// and makes the two copies use different frontend and backend ways, so that a
// permanent (hard) fault in one way shows up as a disagreement. This package
// holds the record that the leading thread leaves in the Dependence Trace
// Queue (DTQ) for each committed instruction, the shuffled-slot record that
// the trailing thread fetches, and the functional-unit classes with their
// unit counts.
//
// Follows the document: issue width 4, four frontend and four backend ways,
// 4 integer ALUs, 2 integer multipliers, 2 FP ALUs, 2 FP multipliers and two
// cache ports. This design's own choices: 64 logical registers (32 integer +
// 32 FP), 576 physical registers, 32-bit instruction words, 64-bit addresses
// and data, 16-bit virtual indices, branches running on ALU ways and integer
// divide sharing the MUL ways.
package bj_pkg;

  localparam int unsigned ISSUE_W    = 4;    // fetch/issue/commit width
  localparam int unsigned N_LREGS  = 64;   // logical registers
  localparam int unsigned N_PREGS  = 576;  // physical registers
  localparam int unsigned LREG_W     = $clog2(N_LREGS);
  localparam int unsigned PREG_W     = $clog2(N_PREGS);
  localparam int unsigned WAY_W      = $clog2(ISSUE_W);
  localparam int unsigned VIDX_W     = 16;   // virtual AL/LSQ/LVQ index width
  localparam int unsigned XLEN       = 64;   // address / data width
  localparam int unsigned INST_BYTES = 4;

  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [WAY_W-1:0]  way_t;
  typedef logic [VIDX_W-1:0] vidx_t;
  typedef logic [XLEN-1:0]   word_t;

  // Backend way classes. An instruction is mapped to the n-th free way of
  // its own class by the oldest-first select/map policy.
  typedef enum logic [2:0] {
    FU_ALU   = 3'd0,
    FU_MUL   = 3'd1,
    FU_MEM   = 3'd2,
    FU_FPALU = 3'd3,
    FU_FPMUL = 3'd4
  } fu_e;

  // Number of backend ways of each class.
  function automatic int unsigned fu_count(fu_e t);
    case (t)
      FU_ALU:   return 4;
      FU_MUL:   return 2;
      FU_MEM:   return 2;
      FU_FPALU: return 2;
      FU_FPMUL: return 2;
      default:  return 0;
    endcase
  endfunction

  // What a committed leading instruction leaves in its DTQ entry.
  typedef struct packed {
    logic [31:0] inst;      // undecoded instruction
    word_t       pc;
    fu_e         fu;        // backend way class
    way_t        fe_way;    // leading frontend way
    way_t        be_way;    // leading backend way, index within class
    logic        has_dst;
    logic        has_src1;
    logic        has_src2;
    lreg_t       ldst;      // logical registers
    lreg_t       lsrc1;
    lreg_t       lsrc2;
    preg_t       pdst;      // leading rename maps
    preg_t       psrc1;
    preg_t       psrc2;
    logic        is_load;
    logic        is_store;
    logic        is_branch;
    vidx_t       v_al;      // virtual active-list index
    vidx_t       v_lsq;     // virtual load/store-queue index
    vidx_t       v_lvq;     // virtual load-value-queue index
  } dtq_rec_t;

  // One slot of a shuffled packet. Slot number = trailing frontend way.
  typedef struct packed {
    logic     valid;
    logic     nop;          // filler that keeps later slots on their ways
    fu_e      fu;           // class of the instruction (or of the NOP)
    dtq_rec_t rec;
  } tslot_t;

  // What the trailing active list keeps for an instruction from fetch on.
  typedef struct packed {
    word_t  pc;
    logic   has_dst;
    logic   has_src1;
    logic   has_src2;
    lreg_t  ldst;
    lreg_t  lsrc1;
    lreg_t  lsrc2;
    preg_t  tdst;           // trailing physical registers from the first
    preg_t  tsrc1;          // trailing rename, as used in execution
    preg_t  tsrc2;
    logic   is_load;
    logic   is_store;
    logic   is_branch;
  } tal_static_t;

  // What the trailing backend reports at completion.
  typedef struct packed {
    logic   taken;          // branch outcome
    word_t  target;         // branch target
    word_t  addr;           // store address
    word_t  data;           // store data
  } tal_result_t;

endpackage
