// trail_rename: the trailing thread's first renamer ("double renaming").
//
// The trailing thread arrives in the leading thread's issue order, in which
// several live ranges of one logical register can overlap, so its logical
// register names no longer tell which producer a consumer needs. The leading
// thread's physical register names do. This renamer is therefore indexed by
// leading physical register: a source is renamed by reading the trailing
// physical register installed for the leading physical source, and a
// destination installs a freshly allocated trailing physical register for the
// leading physical destination. The table has one row per physical register
// instead of one per logical register. Nothing is freed here: this renamer
// sees instructions out of program order, so freeing is left to the commit
// checker, which renames again in program order.
//
// Interface: in_fire with a fetched packet in_slot; new_preg[s] is a free
// trailing register offered for slot s and used when need_preg[s] is set;
// t* outputs are the trailing names of slot s. The instructions of one packet
// were co-issued by the leading thread and so are mutually independent: no
// bypass between slots is needed.
// Timing: reads are combinational, the table is written at in_fire.
//
// Follows the document for the indexing by leading physical registers. This
// design's choices: the register counts and the reset state, in which leading
// physical register i (i < NUM_LREGS) holds logical register i of the leading
// thread and maps to trailing register NUM_LREGS + i.
module trail_rename
  import bj_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter int unsigned NUM_PREGS = N_PREGS,
  parameter int unsigned NUM_LREGS = N_LREGS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_fire,
  input  tslot_t        in_slot  [W],
  input  preg_t         new_preg [W],
  output logic [W-1:0]  need_preg,
  output preg_t         tsrc1    [W],
  output preg_t         tsrc2    [W],
  output preg_t         tdst     [W]
);
  preg_t map_q [NUM_PREGS];

  always_comb begin
    for (int s = 0; s < W; s++) begin
      need_preg[s] = in_slot[s].valid && !in_slot[s].nop && in_slot[s].rec.has_dst;
      tsrc1[s]     = map_q[in_slot[s].rec.psrc1];
      tsrc2[s]     = map_q[in_slot[s].rec.psrc2];
      tdst[s]      = new_preg[s];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PREGS; p++)
        map_q[p] <= (p < NUM_LREGS) ? preg_t'(NUM_LREGS + p) : '0;
    end else if (in_fire) begin
      for (int s = 0; s < W; s++)
        if (need_preg[s]) map_q[in_slot[s].rec.pdst] <= new_preg[s];
    end
  end
endmodule
