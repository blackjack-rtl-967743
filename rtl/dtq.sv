// dtq: Dependence Trace Queue.
//
// The leading thread allocates one entry per issued instruction, in issue
// order, when it issues (the entries of one issue cycle are consecutive and
// the last one carries an end-of-packet bit). The instructions of one issue
// cycle form a "packet": they were co-issued and so are independent of each
// other, which is what makes it safe to reorder them later. At leading commit
// an instruction writes its record (undecoded instruction, PC, logical and
// leading physical registers, frontend and backend way IDs) into its entry;
// at the same time the DTQ hands out virtual active-list, load/store-queue
// and load-value-queue indices in commit (= program) order, which later lets
// the trailing thread place its instructions in program order although it
// fetches them in issue order. When every entry of the oldest packet has
// committed (or been squashed) the packet goes to safe-shuffle; squashed
// entries are dropped from it, and a packet with no live entry is dropped.
//
// Interface: alloc_* (issue side, lanes 0..n-1 used, contiguous), commit_*
// (commit side, lane order = program order), squash_* (issued instructions
// that will never commit), pkt_* (valid/ready toward shuffle).
// Timing: an entry allocated in cycle t can be written by commit from t+1;
// a packet whose last entry commits in cycle t is offered from t+1.
//
// Follows the document: depth 1024, allocation in issue order with an
// end-of-packet bit, recording at commit, virtual indices kept in the DTQ.
// This design's choices: the squash path, keeping the PC in the entry, and
// dropping entries that are dead.
module dtq
  import bj_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // leading issue: allocate
  input  logic [W-1:0]           alloc_valid,
  output logic                   alloc_ready,
  output logic [$clog2(DEPTH)-1:0] alloc_idx [W],
  // leading squash of issued, uncommitted instructions
  input  logic [W-1:0]           squash_valid,
  input  logic [$clog2(DEPTH)-1:0] squash_idx [W],
  // leading commit: record (v_* fields are filled here)
  input  logic [W-1:0]           commit_valid,
  input  logic [$clog2(DEPTH)-1:0] commit_idx [W],
  input  dtq_rec_t               commit_rec [W],
  // oldest complete packet toward shuffle
  output logic                   pkt_valid,
  output logic [W-1:0]           pkt_mask,
  output dtq_rec_t               pkt_rec [W],
  input  logic                   pkt_ready,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;

  dtq_rec_t   mem   [DEPTH];
  logic [DEPTH-1:0] done_q;   // committed or squashed
  logic [DEPTH-1:0] dead_q;   // squashed
  logic [DEPTH-1:0] eop_q;
  ptr_t       head_q, tail_q;
  logic [AW:0] cnt_q;
  vidx_t      v_al_q, v_lsq_q, v_lvq_q;

  // ---------------- allocation ----------------
  int unsigned n_alloc;
  always_comb begin
    n_alloc = 0;
    for (int i = 0; i < W; i++) if (alloc_valid[i]) n_alloc++;
    alloc_ready = (int'(cnt_q) + W <= DEPTH);
    for (int i = 0; i < W; i++) alloc_idx[i] = ptr_t'(tail_q + ptr_t'(i));
  end

  // ---------------- head packet ----------------
  int unsigned pkt_len;
  logic        pkt_complete;
  always_comb begin
    pkt_len      = 0;
    pkt_complete = 1'b0;
    pkt_mask     = '0;
    for (int k = W - 1; k >= 0; k--) begin
      if (k < int'(cnt_q) && eop_q[ptr_t'(head_q + ptr_t'(k))]) pkt_len = k + 1;
    end
    if (pkt_len != 0) begin
      pkt_complete = 1'b1;
      for (int k = 0; k < W; k++) begin
        if (k < int'(pkt_len)) begin
          if (!done_q[ptr_t'(head_q + ptr_t'(k))]) pkt_complete = 1'b0;
          pkt_mask[k] = !dead_q[ptr_t'(head_q + ptr_t'(k))];
        end
      end
    end
    for (int k = 0; k < W; k++) pkt_rec[k] = mem[ptr_t'(head_q + ptr_t'(k))];
    pkt_valid = pkt_complete && (pkt_mask != '0);
  end

  logic pop;
  assign pop = pkt_complete && ((pkt_mask == '0) || pkt_ready);
  assign count = cnt_q;

  // ---------------- virtual indices for this cycle's commits ----------------
  vidx_t v_al_n [W], v_lsq_n [W], v_lvq_n [W];
  vidx_t v_al_end, v_lsq_end, v_lvq_end;
  always_comb begin
    v_al_end = v_al_q; v_lsq_end = v_lsq_q; v_lvq_end = v_lvq_q;
    for (int i = 0; i < W; i++) begin
      v_al_n[i] = v_al_end; v_lsq_n[i] = v_lsq_end; v_lvq_n[i] = v_lvq_end;
      if (commit_valid[i]) begin
        v_al_end = v_al_end + 1'b1;
        if (commit_rec[i].is_load || commit_rec[i].is_store) v_lsq_end = v_lsq_end + 1'b1;
        if (commit_rec[i].is_load) v_lvq_end = v_lvq_end + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      cnt_q   <= '0;
      v_al_q  <= '0;
      v_lsq_q <= '0;
      v_lvq_q <= '0;
      done_q  <= '0;
      dead_q  <= '0;
      eop_q   <= '0;
    end else begin
      if (alloc_ready) begin
        for (int i = 0; i < W; i++) begin
          if (alloc_valid[i]) begin
            done_q[alloc_idx[i]] <= 1'b0;
            dead_q[alloc_idx[i]] <= 1'b0;
            eop_q[alloc_idx[i]]  <= (i == int'(n_alloc) - 1);
          end
        end
        tail_q <= ptr_t'(tail_q + ptr_t'(n_alloc));
      end
      for (int i = 0; i < W; i++) begin
        if (squash_valid[i]) begin
          done_q[squash_idx[i]] <= 1'b1;
          dead_q[squash_idx[i]] <= 1'b1;
        end
        if (commit_valid[i]) done_q[commit_idx[i]] <= 1'b1;
      end
      v_al_q  <= v_al_end;
      v_lsq_q <= v_lsq_end;
      v_lvq_q <= v_lvq_end;
      if (pop) head_q <= ptr_t'(head_q + ptr_t'(pkt_len));
      cnt_q <= cnt_q + (alloc_ready ? (AW+1)'(n_alloc) : '0) - (pop ? (AW+1)'(pkt_len) : '0);
    end
  end

  // record storage (no reset needed: only read once written by commit)
  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) begin
      if (commit_valid[i]) begin
        mem[commit_idx[i]]       <= commit_rec[i];
        mem[commit_idx[i]].v_al  <= v_al_n[i];
        mem[commit_idx[i]].v_lsq <= v_lsq_n[i];
        mem[commit_idx[i]].v_lvq <= v_lvq_n[i];
      end
    end
  end

  // issue lanes are used from lane 0 upward
  property p_alloc_contig;
    @(posedge clk) disable iff (!rst_n)
      (alloc_valid & (alloc_valid + 1'b1)) == '0;
  endproperty
  a_alloc_contig: assert property (p_alloc_contig);

endmodule
