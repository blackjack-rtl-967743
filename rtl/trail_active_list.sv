// trail_active_list: the trailing thread's active list (reorder buffer),
// filled out of program order and retired in program order.
//
// Trailing instructions arrive in leading issue order, each with a virtual
// active-list index that the leading thread handed out at its commit. An
// instruction is placed at the physical entry that lies as far from the
// physical head as its virtual index lies from the head's virtual index
// (vidx_map); if that is beyond the list, the whole fetched packet waits.
// Entries therefore appear with gaps that later-fetched, older instructions
// fill. The backend marks entries complete and reports branch outcomes and
// store addresses/data; commit retires up to W complete entries per cycle
// from the head, strictly in program order, and stops at the first entry
// that is missing or incomplete.
//
// Interface: alloc_* (one packet, a slot may be empty), alloc_ok back
// (all valid slots fit); cmp_* completions by physical index; commit_*
// lanes 0..n-1 in program order. Timing: an entry allocated in cycle t can
// complete in t+1 and commit in t+2 at the earliest.
//
// Follows the document for the virtual-to-physical allocation and the stall.
// This design's choices: commit width W and the completion port format.
module trail_active_list
  import bj_pkg::*;
#(
  parameter int unsigned W    = 4,
  parameter int unsigned SIZE = 512
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    alloc_fire,
  input  logic [W-1:0]            alloc_valid,
  input  vidx_t                   alloc_v   [W],
  input  tal_static_t             alloc_ent [W],
  output logic                    alloc_ok,
  output logic [$clog2(SIZE)-1:0] alloc_p   [W],
  input  logic [W-1:0]            cmp_valid,
  input  logic [$clog2(SIZE)-1:0] cmp_p     [W],
  input  tal_result_t             cmp_res   [W],
  output logic [W-1:0]            commit_valid,
  output tal_static_t             commit_ent [W],
  output tal_result_t             commit_res [W],
  output logic [$clog2(SIZE):0]   occupancy
);
  localparam int unsigned PW = $clog2(SIZE);
  typedef logic [PW-1:0] ptr_t;

  tal_static_t ent_q [SIZE];
  tal_result_t res_q [SIZE];
  logic [SIZE-1:0] vld_q, done_q;
  vidx_t       head_v_q;
  ptr_t        head_p_q;
  logic [PW:0] occ_q;

  logic [W-1:0] fits;
  for (genvar s = 0; s < W; s++) begin : g_map
    vidx_map #(.SIZE(SIZE), .VW(VIDX_W)) u_map (
      .head_v(head_v_q), .head_p(head_p_q), .v(alloc_v[s]),
      .p(alloc_p[s]), .fits(fits[s]));
  end

  function automatic ptr_t wrap_add(ptr_t a, int unsigned k);
    logic [PW:0] t;
    t = {1'b0, a} + (PW+1)'(k);
    if (t >= (PW+1)'(SIZE)) t = t - (PW+1)'(SIZE);
    return t[PW-1:0];
  endfunction

  int unsigned n_commit, n_alloc;
  always_comb begin
    alloc_ok = 1'b1;
    n_alloc  = 0;
    for (int s = 0; s < W; s++) if (alloc_valid[s]) begin
      if (!fits[s]) alloc_ok = 1'b0;
      n_alloc++;
    end
    n_commit = 0;
    for (int i = 0; i < W; i++) begin
      commit_valid[i] = 1'b0;
      commit_ent[i]   = ent_q[wrap_add(head_p_q, i)];
      commit_res[i]   = res_q[wrap_add(head_p_q, i)];
      if (n_commit == i && vld_q[wrap_add(head_p_q, i)] && done_q[wrap_add(head_p_q, i)]) begin
        commit_valid[i] = 1'b1;
        n_commit++;
      end
    end
  end
  assign occupancy = occ_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_q    <= '0;
      done_q   <= '0;
      head_v_q <= '0;
      head_p_q <= '0;
      occ_q    <= '0;
    end else begin
      for (int i = 0; i < W; i++) if (commit_valid[i]) begin
        vld_q[wrap_add(head_p_q, i)]  <= 1'b0;
        done_q[wrap_add(head_p_q, i)] <= 1'b0;
      end
      for (int i = 0; i < W; i++) if (cmp_valid[i]) done_q[cmp_p[i]] <= 1'b1;
      if (alloc_fire && alloc_ok) begin
        for (int s = 0; s < W; s++) if (alloc_valid[s]) begin
          vld_q[alloc_p[s]]  <= 1'b1;
          done_q[alloc_p[s]] <= 1'b0;
        end
      end
      head_v_q <= head_v_q + vidx_t'(n_commit);
      head_p_q <= wrap_add(head_p_q, n_commit);
      occ_q    <= occ_q + ((alloc_fire && alloc_ok) ? (PW+1)'(n_alloc) : '0) - (PW+1)'(n_commit);
    end
  end

  always_ff @(posedge clk) begin
    if (alloc_fire && alloc_ok)
      for (int s = 0; s < W; s++) if (alloc_valid[s]) ent_q[alloc_p[s]] <= alloc_ent[s];
    for (int i = 0; i < W; i++) if (cmp_valid[i]) res_q[cmp_p[i]] <= cmp_res[i];
  end

  // an instruction completes only while it holds an entry
  for (genvar i = 0; i < W; i++) begin : g_chk
    a_cmp_live: assert property (@(posedge clk) disable iff (!rst_n)
                                 cmp_valid[i] |-> vld_q[cmp_p[i]]);
  end
endmodule
