// blackjack_top: the BlackJack hard-error detection subsystem of an SMT core.
//
// BlackJack runs a program twice on one SMT core, as a leading and a trailing
// thread some distance (the slack) apart, and compares the stores of the two
// copies. To catch permanent faults, not only transient ones, the two copies
// of every instruction must go through different frontend ways and
// different backend ways. This block is everything BlackJack adds around an
// unmodified SMT core:
//
//   leading issue/commit -> dtq -> safe_shuffle -> trail_fetch
//     -> trail_rename + trail_active_list / LSQ index mapping -> core backend
//   core backend completion -> trail_active_list -> in-order trailing commit
//     -> commit_rename_check (dependences), pc_order_check (program order),
//        store_checker (stores to memory), lvq (freeing load values)
//
// The leading thread allocates DTQ entries in issue order and fills them at
// commit. Complete packets (one leading issue cycle each) are shuffled so that
// every instruction lands on another frontend way and, if the packet issues
// whole and alone, another backend way. The trailing thread fetches one
// shuffled packet per cycle, renames it a second time by leading physical
// register, and places it in its active list and load/store queue by the
// virtual indices the leading thread assigned at commit. At trailing commit
// three checks run: stores against the waiting leading stores, sources
// against a program-order rename table, and each PC against its predecessor.
//
// The core itself (fetch, decode, leading rename, issue queue, functional
// units, caches, shared free list) is outside this block; its side of every
// connection is a port. The per-thread issue-queue payload RAMs are
// instantiated here with their ports brought out for the core's issue queue.
// Error outputs pulse for one cycle per detected disagreement; err_any is
// sticky until reset.
//
// Follows the document: the block structure, the DTQ/slack/LVQ/store-buffer
// and active-list/LSQ sizes (1024, 256, 128, 64, 512, 64). This design's
// choices are listed in each block; here: a fetched packet goes on only when
// the active list, the LSQ and the free list can all take it.
module blackjack_top
  import bj_pkg::*;
#(
  parameter int unsigned W         = ISSUE_W,
  parameter int unsigned DTQ_DEPTH = 1024,
  parameter int unsigned SLACK     = 256,
  parameter int unsigned AL_SIZE   = 512,
  parameter int unsigned LSQ_SIZE  = 64,
  parameter int unsigned LVQ_DEPTH = 128,
  parameter int unsigned SB_DEPTH  = 64,
  parameter int unsigned TFQ_DEPTH = 16,
  parameter int unsigned IQ_SIZE   = 32,
  parameter int unsigned NUM_LREGS = N_LREGS,
  parameter int unsigned NUM_PREGS = N_PREGS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // ---- leading thread: issue (DTQ allocation) ----
  input  logic [W-1:0]                 lead_issue_valid,
  output logic                         lead_issue_ready,
  output logic [$clog2(DTQ_DEPTH)-1:0] lead_issue_idx [W],
  input  logic [W-1:0]                 lead_squash_valid,
  input  logic [$clog2(DTQ_DEPTH)-1:0] lead_squash_idx [W],
  // ---- leading thread: commit (lanes in program order) ----
  input  logic [W-1:0]                 lead_commit_valid,
  output logic                         lead_commit_ready,
  input  logic [$clog2(DTQ_DEPTH)-1:0] lead_commit_idx [W],
  input  dtq_rec_t                     lead_commit_rec [W],
  input  word_t                        lead_commit_addr [W],   // load/store address
  input  word_t                        lead_commit_data [W],   // load value / store data
  input  logic                         drain,
  // ---- trailing fetch toward the core's decode/dispatch ----
  output logic                         tf_valid,
  input  logic                         tf_ready,
  output tslot_t                       tf_slot  [W],  // slot s = frontend way s
  output preg_t                        tf_tsrc1 [W],
  output preg_t                        tf_tsrc2 [W],
  output preg_t                        tf_tdst  [W],
  output logic [$clog2(AL_SIZE)-1:0]   tf_al_idx  [W],
  output logic [$clog2(LSQ_SIZE)-1:0]  tf_lsq_idx [W],
  output logic [W-1:0]                 tf_need_preg,
  input  preg_t                        tpreg_new [W],  // free trailing registers offered
  input  logic                         tpreg_avail,
  input  vidx_t                        lsq_head_v,     // trailing LSQ head reference
  input  logic [$clog2(LSQ_SIZE)-1:0]  lsq_head_p,
  // ---- trailing completion ----
  input  logic [W-1:0]                 tc_valid,
  input  logic [$clog2(AL_SIZE)-1:0]   tc_al_idx [W],
  input  tal_result_t                  tc_res    [W],
  // ---- trailing load value lookup ----
  input  logic                         tl_valid,
  input  vidx_t                        tl_v,
  input  word_t                        tl_addr,
  output word_t                        tl_data,
  output logic                         tl_hit,
  // ---- trailing commit ----
  output logic [W-1:0]                 tcommit_valid,
  output word_t                        tcommit_pc [W],
  output logic [W-1:0]                 tfree_valid,
  output preg_t                        tfree_preg [W],
  // ---- checked stores to the memory hierarchy ----
  output logic [W-1:0]                 mem_valid,
  output word_t                        mem_addr [W],
  output word_t                        mem_data [W],
  // ---- per-thread issue-queue payload RAMs ----
  input  logic [1:0]                   pl_wr_en,
  input  logic [$clog2(IQ_SIZE)-1:0]   pl_wr_idx  [2],
  input  logic [63:0]                  pl_wr_data [2],
  input  logic [$clog2(IQ_SIZE)-1:0]   pl_rd_idx  [2],
  output logic [63:0]                  pl_rd_data [2],
  // ---- detection and events ----
  output logic                         err_store,
  output logic                         err_dep,
  output logic                         err_pc,
  output logic                         err_lvq,
  output logic                         err_any,
  output logic                         ev_split,      // safe-shuffle split a packet
  output logic                         ev_fallback,   // safe-shuffle used a filler NOP of another class
  output logic                         ev_slack_stall,
  output logic                         ev_alloc_stall // fetched packet waits for AL/LSQ/registers
);
  // ---------------- leading commit gating ----------------
  logic         lvq_wr_ready, sb_ld_ready;
  logic [W-1:0] lc_fire, lc_load, lc_store;
  logic [$clog2(W):0] lc_n;
  always_comb begin
    lead_commit_ready = lvq_wr_ready && sb_ld_ready;
    lc_n = '0;
    for (int i = 0; i < W; i++) begin
      lc_fire[i]  = lead_commit_valid[i] && lead_commit_ready;
      lc_load[i]  = lc_fire[i] && lead_commit_rec[i].is_load;
      lc_store[i] = lc_fire[i] && lead_commit_rec[i].is_store;
      if (lc_fire[i]) lc_n++;
    end
  end

  // ---------------- DTQ ----------------
  logic         dtq_pkt_valid, dtq_pkt_ready;
  logic [W-1:0] dtq_pkt_mask;
  dtq_rec_t     dtq_pkt_rec [W];
  dtq #(.W(W), .DEPTH(DTQ_DEPTH)) u_dtq (
    .clk, .rst_n,
    .alloc_valid(lead_issue_valid), .alloc_ready(lead_issue_ready), .alloc_idx(lead_issue_idx),
    .squash_valid(lead_squash_valid), .squash_idx(lead_squash_idx),
    .commit_valid(lc_fire), .commit_idx(lead_commit_idx), .commit_rec(lead_commit_rec),
    .pkt_valid(dtq_pkt_valid), .pkt_mask(dtq_pkt_mask), .pkt_rec(dtq_pkt_rec),
    .pkt_ready(dtq_pkt_ready), .count());

  // ---------------- safe-shuffle ----------------
  logic   sh_valid, sh_ready, sh_split, sh_fallback;
  tslot_t sh_slot [W];
  safe_shuffle #(.W(W)) u_shuffle (
    .clk, .rst_n,
    .in_valid(dtq_pkt_valid), .in_mask(dtq_pkt_mask), .in_rec(dtq_pkt_rec),
    .in_ready(dtq_pkt_ready),
    .out_valid(sh_valid), .out_slot(sh_slot), .out_split(sh_split),
    .out_fallback(sh_fallback), .out_ready(sh_ready));
  assign ev_split    = sh_valid && sh_ready && sh_split;
  assign ev_fallback = sh_valid && sh_ready && sh_fallback;

  // ---------------- trailing fetch queue ----------------
  logic   fq_valid, fq_ready;
  tslot_t fq_slot [W];
  trail_fetch #(.W(W), .DEPTH(TFQ_DEPTH), .SLACK(SLACK)) u_fetch (
    .clk, .rst_n,
    .in_valid(sh_valid), .in_slot(sh_slot), .in_ready(sh_ready),
    .lead_commit_n(lc_n), .drain,
    .out_valid(fq_valid), .out_slot(fq_slot), .out_ready(fq_ready),
    .slack_stall(ev_slack_stall));

  // ---------------- trailing rename, AL and LSQ placement ----------------
  logic        tf_fire, al_ok, lsq_ok;
  logic [W-1:0] need_preg, al_valid, lsq_fits;
  tal_static_t al_ent [W];
  vidx_t       al_v [W];
  preg_t       r_tsrc1 [W], r_tsrc2 [W], r_tdst [W];

  trail_rename #(.W(W), .NUM_PREGS(NUM_PREGS), .NUM_LREGS(NUM_LREGS)) u_rename (
    .clk, .rst_n, .in_fire(tf_fire), .in_slot(fq_slot), .new_preg(tpreg_new),
    .need_preg(need_preg), .tsrc1(r_tsrc1), .tsrc2(r_tsrc2), .tdst(r_tdst));

  for (genvar s = 0; s < W; s++) begin : g_lsq
    vidx_map #(.SIZE(LSQ_SIZE), .VW(VIDX_W)) u_lsq_map (
      .head_v(lsq_head_v), .head_p(lsq_head_p), .v(fq_slot[s].rec.v_lsq),
      .p(tf_lsq_idx[s]), .fits(lsq_fits[s]));
  end

  always_comb begin
    lsq_ok = 1'b1;
    for (int s = 0; s < W; s++) begin
      al_valid[s] = fq_slot[s].valid && !fq_slot[s].nop;
      al_v[s]     = fq_slot[s].rec.v_al;
      al_ent[s]   = '{pc:        fq_slot[s].rec.pc,
                      has_dst:   fq_slot[s].rec.has_dst,
                      has_src1:  fq_slot[s].rec.has_src1,
                      has_src2:  fq_slot[s].rec.has_src2,
                      ldst:      fq_slot[s].rec.ldst,
                      lsrc1:     fq_slot[s].rec.lsrc1,
                      lsrc2:     fq_slot[s].rec.lsrc2,
                      tdst:      r_tdst[s],
                      tsrc1:     r_tsrc1[s],
                      tsrc2:     r_tsrc2[s],
                      is_load:   fq_slot[s].rec.is_load,
                      is_store:  fq_slot[s].rec.is_store,
                      is_branch: fq_slot[s].rec.is_branch};
      if (al_valid[s] && (fq_slot[s].rec.is_load || fq_slot[s].rec.is_store) && !lsq_fits[s])
        lsq_ok = 1'b0;
    end
    tf_valid       = fq_valid && al_ok && lsq_ok && (tpreg_avail || need_preg == '0);
    tf_fire        = tf_valid && tf_ready;
    fq_ready       = tf_fire;
    ev_alloc_stall = fq_valid && !tf_valid;
    tf_slot        = fq_slot;
    tf_tsrc1       = r_tsrc1;
    tf_tsrc2       = r_tsrc2;
    tf_tdst        = r_tdst;
    tf_need_preg   = need_preg;
  end

  logic [W-1:0] c_valid;
  tal_static_t  c_ent [W];
  tal_result_t  c_res [W];
  trail_active_list #(.W(W), .SIZE(AL_SIZE)) u_al (
    .clk, .rst_n,
    .alloc_fire(tf_fire), .alloc_valid(al_valid), .alloc_v(al_v), .alloc_ent(al_ent),
    .alloc_ok(al_ok), .alloc_p(tf_al_idx),
    .cmp_valid(tc_valid), .cmp_p(tc_al_idx), .cmp_res(tc_res),
    .commit_valid(c_valid), .commit_ent(c_ent), .commit_res(c_res), .occupancy());

  // ---------------- trailing commit checks ----------------
  logic dep_err_w, pc_err_w, st_err_w, lvq_err_w;
  commit_rename_check #(.W(W), .NUM_LREGS(NUM_LREGS)) u_crc (
    .clk, .rst_n, .c_valid, .c_ent,
    .free_valid(tfree_valid), .free_preg(tfree_preg), .dep_err(dep_err_w));

  word_t        c_pc [W], c_target [W];
  logic [W-1:0] c_taken, c_store;
  word_t        c_addr [W], c_data [W];
  logic [$clog2(W):0] c_loads;
  always_comb begin
    c_loads = '0;
    for (int i = 0; i < W; i++) begin
      c_pc[i]     = c_ent[i].pc;
      c_taken[i]  = c_ent[i].is_branch && c_res[i].taken;
      c_target[i] = c_res[i].target;
      c_store[i]  = c_valid[i] && c_ent[i].is_store;
      c_addr[i]   = c_res[i].addr;
      c_data[i]   = c_res[i].data;
      if (c_valid[i] && c_ent[i].is_load) c_loads++;
    end
  end
  assign tcommit_valid = c_valid;
  assign tcommit_pc    = c_pc;

  pc_order_check #(.W(W)) u_pcc (
    .clk, .rst_n, .c_valid, .c_pc, .c_taken, .c_target,
    .pc_err(pc_err_w), .err_lane());

  word_t lc_addr [W], lc_data [W];
  assign lc_addr = lead_commit_addr;
  assign lc_data = lead_commit_data;

  store_checker #(.W(W), .DEPTH(SB_DEPTH)) u_sb (
    .clk, .rst_n,
    .ld_valid(lc_store), .ld_addr(lc_addr), .ld_data(lc_data), .ld_ready(sb_ld_ready),
    .tr_valid(c_store), .tr_addr(c_addr), .tr_data(c_data),
    .mem_valid, .mem_addr, .mem_data, .st_err(st_err_w), .count());

  lvq #(.W(W), .DEPTH(LVQ_DEPTH)) u_lvq (
    .clk, .rst_n,
    .wr_valid(lc_load), .wr_addr(lc_addr), .wr_data(lc_data), .wr_ready(lvq_wr_ready),
    .rd_valid(tl_valid), .rd_v(tl_v), .rd_addr(tl_addr), .rd_data(tl_data),
    .rd_hit(tl_hit), .rd_err(lvq_err_w), .free_n(c_loads), .count());

  payload_ram #(.ENTRIES(IQ_SIZE), .PW(64)) u_payload (
    .clk, .wr_en(pl_wr_en), .wr_idx(pl_wr_idx), .wr_data(pl_wr_data),
    .rd_idx(pl_rd_idx), .rd_data(pl_rd_data));

  // ---------------- errors ----------------
  assign err_store = st_err_w;
  assign err_dep   = dep_err_w;
  assign err_pc    = pc_err_w;
  assign err_lvq   = lvq_err_w;
  always_ff @(posedge clk) begin
    if (!rst_n) err_any <= 1'b0;
    else if (st_err_w || dep_err_w || pc_err_w || lvq_err_w) err_any <= 1'b1;
  end
endmodule
