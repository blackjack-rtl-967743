// tb_blackjack_top: end-to-end test of the BlackJack subsystem at its
// default sizes (DTQ 1024, slack 256, active list 512, LSQ 64, LVQ 128,
// store buffer 64).
//
// The testbench plays the SMT core around the subsystem:
//  * a leading thread renames a generated program (ALU, branch, load, store,
//    multiply and FP instructions, taken branches changing the PC) with a
//    shared free list of 576 registers, issues it out of order from a
//    32-entry window by dataflow, oldest first, at most 4 per cycle and no
//    more per class than there are ways (4 ALU, 2 MUL, 2 MEM, 2 FP ALU,
//    2 FP MUL), so each instruction gets a frontend way (its word position
//    in the fetch block) and a backend way (its rank within its class);
//    it also issues wrong-path instructions that are squashed, and commits
//    in program order;
//  * a trailing backend accepts fetched packets, completes them after random
//    delays (with occasional long stalls), looks load values up in the LVQ,
//    returns freed registers to the free list and keeps the LSQ head.
// Checks on the clean run: every trailing instruction is on another frontend
// way than its leading copy, and on another backend way if its packet issues
// whole and alone (the way is worked out from the slot positions); its
// trailing sources are the trailing
// destinations of its true producers (the double renaming keeps the
// program's dependences although fetch is in issue order); load values are
// the leading ones; trailing commit is the program in order; every store
// reaches memory once, in order, with the right address and data; no error
// is flagged. Then four short runs inject one fault each: a corrupted leading
// rename map in a DTQ record, a wrong trailing store value, a wrong PC in a
// committed leading record (as if an instruction were dropped), and a wrong
// trailing load address; each must raise its own error flag. Every
// mechanism (packet split, NOP insertion, filler NOP of another class, slack
// stall, trailing allocation stall, leading commit stall, squash, each
// error) must occur.
module tb_blackjack_top;
  import bj_pkg::*;
  localparam int W = 4, NL = 64, NP = 576, DTQ = 1024, AL = 512, LSQ = 64, IQ = 32;
  localparam int NMAX = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ---------------- DUT ----------------
  logic [W-1:0] lead_issue_valid, lead_squash_valid, lead_commit_valid;
  logic lead_issue_ready, lead_commit_ready, drain;
  logic [9:0] lead_issue_idx [W], lead_squash_idx [W], lead_commit_idx [W];
  dtq_rec_t lead_commit_rec [W];
  word_t lead_commit_addr [W], lead_commit_data [W];
  logic tf_valid, tf_ready, tpreg_avail;
  tslot_t tf_slot [W];
  preg_t tf_tsrc1 [W], tf_tsrc2 [W], tf_tdst [W], tpreg_new [W];
  logic [8:0] tf_al_idx [W];
  logic [5:0] tf_lsq_idx [W];
  logic [W-1:0] tf_need_preg;
  vidx_t lsq_head_v;
  logic [5:0] lsq_head_p;
  logic [W-1:0] tc_valid;
  logic [8:0] tc_al_idx [W];
  tal_result_t tc_res [W];
  logic tl_valid, tl_hit;
  vidx_t tl_v;
  word_t tl_addr, tl_data;
  logic [W-1:0] tcommit_valid, tfree_valid, mem_valid;
  word_t tcommit_pc [W], mem_addr [W], mem_data [W];
  preg_t tfree_preg [W];
  logic [1:0] pl_wr_en;
  logic [4:0] pl_wr_idx [2], pl_rd_idx [2];
  logic [63:0] pl_wr_data [2], pl_rd_data [2];
  logic err_store, err_dep, err_pc, err_lvq, err_any;
  logic ev_split, ev_fallback, ev_slack_stall, ev_alloc_stall;

  blackjack_top dut (.*);

  // ---------------- program ----------------
  int    N;
  fu_e   p_fu   [NMAX];
  logic  p_ld [NMAX], p_st [NMAX], p_br [NMAX], p_hd [NMAX], p_h1 [NMAX], p_h2 [NMAX];
  int    p_d [NMAX], p_s1 [NMAX], p_s2 [NMAX], prod1 [NMAX], prod2 [NMAX];
  word_t p_pc [NMAX], p_tg [NMAX], p_addr [NMAX], p_data [NMAX];
  logic  p_tk [NMAX];

  function automatic void gen_program(int n);
    int last [NL];
    int r;
    N = n;
    for (int l = 0; l < NL; l++) last[l] = -1;
    for (int i = 0; i < n; i++) begin
      r = $urandom_range(0, 99);
      p_ld[i] = 0; p_st[i] = 0; p_br[i] = 0; p_tk[i] = 0;
      p_hd[i] = 1; p_h1[i] = 1; p_h2[i] = $urandom_range(0, 1);
      p_fu[i] = FU_ALU;
      if (r < 20)      begin p_fu[i] = FU_MEM; p_ld[i] = 1; p_h2[i] = 0; end
      else if (r < 30) begin p_fu[i] = FU_MEM; p_st[i] = 1; p_hd[i] = 0; p_h2[i] = 1; end
      else if (r < 40) begin p_br[i] = 1; p_hd[i] = 0; p_tk[i] = $urandom_range(0, 1); end
      else if (r < 46) p_fu[i] = FU_MUL;
      else if (r < 52) p_fu[i] = FU_FPALU;
      else if (r < 58) p_fu[i] = FU_FPMUL;
      p_s1[i] = $urandom_range(0, NL - 1);
      p_s2[i] = $urandom_range(0, NL - 1);
      p_d[i]  = $urandom_range(0, NL - 1);
      prod1[i] = p_h1[i] ? last[p_s1[i]] : -1;
      prod2[i] = p_h2[i] ? last[p_s2[i]] : -1;
      if (p_hd[i]) last[p_d[i]] = i;
      p_pc[i]   = (i == 0) ? 64'h1_0000 : (p_tk[i-1] ? p_tg[i-1] : p_pc[i-1] + 4);
      p_tg[i]   = 64'h1_0000 + (word_t'($urandom_range(0, 16383)) << 2);
      p_addr[i] = 64'h8000_0000 + (word_t'($urandom_range(0, 1 << 20)) << 3);
      p_data[i] = {$urandom, $urandom};
    end
  endfunction

  // ---------------- shared free list ----------------
  int fl [$];

  // ---------------- leading model state ----------------
  int     lrat [NL];
  longint ready_at [NP];
  int     l_pd [NMAX], l_ps1 [NMAX], l_ps2 [NMAX], l_prev [NMAX];
  int     l_be [NMAX], l_dtq [NMAX];
  longint l_done [NMAX];
  logic   l_issued [NMAX];
  int     ren_ptr, com_ptr;
  int     junk_idx [$];
  longint junk_t [$];

  // ---------------- trailing model state ----------------
  logic   t_fetched [NMAX];
  int     t_dst [NMAX], t_al [NMAX];
  logic [15:0] t_vlvq [NMAX];
  int     t_pend [$];           // fetched, waiting to complete
  longint t_due [NMAX];
  logic   t_lvq_done [NMAX];
  int     t_lvq_q [$];
  int     t_com, mem_seen, t_mem_committed;
  longint stall_until;

  // ---------------- fault injection ----------------
  int fault;          // 0 none, 1 dep, 2 store, 3 pc, 4 lvq address
  int fault_id;
  logic fault_done;

  // ---------------- event counters ----------------
  int n_split, n_fallback, n_nop, n_slack, n_alloc_stall, n_commit_stall, n_squash;
  int n_err_store, n_err_dep, n_err_pc, n_err_lvq;
  int n_fe_div, n_be_div, n_trail;

  function automatic int fe_of(int i); return int'(p_pc[i][3:2]); endfunction

  function automatic int lat(int i);
    if (p_ld[i]) return ($urandom_range(0, 9) == 0) ? 30 : 2;
    case (p_fu[i])
      FU_MUL:   return 4;
      FU_FPALU: return 3;
      FU_FPMUL: return 5;
      default:  return 1;
    endcase
  endfunction

  task automatic reset_all(input int n, input int f);
    gen_program(n);
    fault = f; fault_done = 0;
    fault_id = n / 2;
    while (!(fault != 1 || (p_h1[fault_id] && prod1[fault_id] >= 0 && !p_st[fault_id]))) fault_id++;
    while (!(fault != 2 || p_st[fault_id])) fault_id++;
    while (!(fault != 4 || p_ld[fault_id])) fault_id++;
    fl.delete();
    for (int p = 2 * NL; p < NP; p++) fl.push_back(p);
    for (int l = 0; l < NL; l++) lrat[l] = l;
    for (int p = 0; p < NP; p++) ready_at[p] = 0;
    for (int i = 0; i < N; i++) begin
      l_issued[i] = 0; t_fetched[i] = 0; t_lvq_done[i] = 0; l_done[i] = 1 << 40;
    end
    ren_ptr = 0; com_ptr = 0; t_com = 0; mem_seen = 0; t_mem_committed = 0;
    junk_idx.delete(); junk_t.delete(); t_pend.delete(); t_lvq_q.delete();
    stall_until = 0;
    lead_issue_valid = 0; lead_squash_valid = 0; lead_commit_valid = 0; drain = 0;
    tf_ready = 0; tc_valid = 0; tl_valid = 0; tl_v = 0; tl_addr = 0;
    for (int l = 0; l < W; l++) begin
      lead_squash_idx[l] = 0; lead_commit_idx[l] = 0; lead_commit_rec[l] = '0;
      lead_commit_addr[l] = 0; lead_commit_data[l] = 0; tc_al_idx[l] = 0; tc_res[l] = '0;
      tpreg_new[l] = 0;
    end
    pl_wr_en = 0;
    for (int t = 0; t < 2; t++) begin pl_wr_idx[t] = 0; pl_rd_idx[t] = 0; pl_wr_data[t] = 0; end
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t_rst = cyc;
  endtask

  // ================= one cycle of the core model, at the falling edge =================
  always @(negedge clk) if (rst_n) begin
    int win [$];
    int cls_used [5];
    int lanes, k, id;
    // ---------- leading: rename into the window ----------
    for (int j = 0; j < W; j++) begin
      if (ren_ptr < N && ren_ptr - com_ptr < IQ && fl.size() > 16) begin
        id = ren_ptr;
        l_ps1[id] = lrat[p_s1[id]];
        l_ps2[id] = lrat[p_s2[id]];
        if (p_hd[id]) begin
          l_pd[id] = fl.pop_front();
          l_prev[id] = lrat[p_d[id]];
          lrat[p_d[id]] = l_pd[id];
          ready_at[l_pd[id]] = 1 << 40;
        end else begin
          l_pd[id] = 0; l_prev[id] = -1;
        end
        ren_ptr++;
      end
    end
    // ---------- leading: issue (dataflow, oldest first) ----------
    lead_issue_valid = '0;
    lanes = 0;
    for (int c = 0; c < 5; c++) cls_used[c] = 0;
    if (lead_issue_ready) begin
      for (int i = com_ptr; i < ren_ptr && lanes < W; i++) begin
        if (!l_issued[i]
            && (!p_h1[i] || ready_at[l_ps1[i]] <= cyc)
            && (!p_h2[i] || ready_at[l_ps2[i]] <= cyc)
            && cls_used[int'(p_fu[i])] < int'(fu_count(p_fu[i]))) begin
          l_be[i]  = cls_used[int'(p_fu[i])];
          cls_used[int'(p_fu[i])]++;
          l_issued[i] = 1;
          l_dtq[i] = int'(lead_issue_idx[lanes]);
          lead_issue_valid[lanes] = 1;
          l_done[i] = cyc + lat(i);
          if (p_hd[i]) ready_at[l_pd[i]] = cyc + lat(i);
          lanes++;
        end
      end
      // a wrong-path instruction now and then, squashed a little later
      if (lanes > 0 && lanes < W && $urandom_range(0, 15) == 0) begin
        junk_idx.push_back(int'(lead_issue_idx[lanes]));
        junk_t.push_back(cyc + 2);
        lead_issue_valid[lanes] = 1;
      end
    end
    // ---------- leading: squash ----------
    lead_squash_valid = '0;
    if (junk_idx.size() > 0 && junk_t[0] <= cyc) begin
      lead_squash_valid[0] = 1;
      lead_squash_idx[0] = 10'(junk_idx.pop_front());
      void'(junk_t.pop_front());
      n_squash++;
    end
    // ---------- leading: commit in program order ----------
    lead_commit_valid = '0;
    if (!lead_commit_ready) n_commit_stall++;
    k = 0;
    while (lead_commit_ready && k < W && com_ptr < N && l_issued[com_ptr] && l_done[com_ptr] < cyc) begin
      dtq_rec_t r;
      id = com_ptr;
      r = '0;
      r.inst = 32'(id); r.pc = p_pc[id]; r.fu = p_fu[id];
      r.fe_way = way_t'(fe_of(id)); r.be_way = way_t'(l_be[id]);
      r.has_dst = p_hd[id]; r.has_src1 = p_h1[id]; r.has_src2 = p_h2[id];
      r.ldst = lreg_t'(p_d[id]); r.lsrc1 = lreg_t'(p_s1[id]); r.lsrc2 = lreg_t'(p_s2[id]);
      r.pdst = preg_t'(l_pd[id]); r.psrc1 = preg_t'(l_ps1[id]); r.psrc2 = preg_t'(l_ps2[id]);
      r.is_load = p_ld[id]; r.is_store = p_st[id]; r.is_branch = p_br[id];
      if (fault == 1 && id == fault_id) r.psrc1 = preg_t'((l_ps1[id] + 1) % NP);
      if (fault == 3 && id == fault_id) r.pc = p_pc[id] + 8;
      lead_commit_valid[k] = 1;
      lead_commit_idx[k] = 10'(l_dtq[id]);
      lead_commit_rec[k] = r;
      lead_commit_addr[k] = p_addr[id];
      lead_commit_data[k] = p_data[id];
      if (p_hd[id]) fl.push_back(l_prev[id]);
      com_ptr++; k++;
    end
    drain = (com_ptr == N);

    // ---------- trailing: free registers, LSQ head, fetch ----------
    tpreg_avail = fl.size() >= W;
    for (int s = 0; s < W; s++) tpreg_new[s] = preg_t'(fl.size() > s ? fl[s] : 0);
    lsq_head_v = vidx_t'(t_mem_committed);
    lsq_head_p = 6'(t_mem_committed % LSQ);
    tf_ready = ($urandom_range(0, 7) != 0);
    if (cyc >= stall_until && $urandom_range(0, 999) == 0) stall_until = cyc + 150;
    #1;
    if (ev_slack_stall) n_slack++;
    if (ev_alloc_stall) n_alloc_stall++;
    if (ev_split) n_split++;
    if (ev_fallback) n_fallback++;
    if (tf_valid && tf_ready) begin
      int used [$];
      used.delete();
      for (int s = 0; s < W; s++) begin
        if (tf_slot[s].valid && tf_slot[s].nop) n_nop++;
        if (tf_slot[s].valid && !tf_slot[s].nop) begin
          int bw, e1, e2;
          id = int'(tf_slot[s].rec.inst);
          n_trail++;
          chk(!t_fetched[id], "instruction fetched once");
          t_fetched[id] = 1;
          // frontend diversity: slot s is frontend way s
          chk(s != fe_of(id), $sformatf("frontend way of %0d differs", id));
          if (s != fe_of(id)) n_fe_div++;
          // backend way if the packet issues whole and alone
          bw = 0;
          for (int q = 0; q < s; q++) if (tf_slot[q].valid && tf_slot[q].fu == tf_slot[s].fu) bw++;
          chk(bw != l_be[id], $sformatf("backend way of %0d differs", id));
          if (bw != l_be[id]) n_be_div++;
          // double renaming keeps the true dependences
          if (!(fault == 1 && id == fault_id)) begin
            if (p_h1[id]) begin
              e1 = (prod1[id] < 0) ? (NL + p_s1[id]) : t_dst[prod1[id]];
              chk(prod1[id] < 0 || t_fetched[prod1[id]], "producer fetched first");
              chk(int'(tf_tsrc1[s]) == e1, $sformatf("trailing source 1 of %0d", id));
            end
            if (p_h2[id]) begin
              e2 = (prod2[id] < 0) ? (NL + p_s2[id]) : t_dst[prod2[id]];
              chk(int'(tf_tsrc2[s]) == e2, $sformatf("trailing source 2 of %0d", id));
            end
          end
          if (tf_need_preg[s]) begin
            t_dst[id] = int'(tf_tdst[s]);
            chk(tf_tdst[s] == tpreg_new[s], "destination from the offered register");
            used.push_back(s);
          end
          t_al[id] = int'(tf_al_idx[s]);
          t_vlvq[id] = tf_slot[s].rec.v_lvq;
          t_due[id] = cyc + $urandom_range(1, 6);
          t_pend.push_back(id);
          if (p_ld[id]) t_lvq_q.push_back(id);
        end
      end
      for (int u = used.size() - 1; u >= 0; u--) fl.delete(used[u]);
    end

    // ---------- trailing: load value lookup (one per cycle) ----------
    tl_valid = 0;
    if (t_lvq_q.size() > 0) begin
      int li;
      li = t_lvq_q.pop_front();
      tl_valid = 1; tl_v = t_vlvq[li];
      tl_addr = p_addr[li];
      if (fault == 4 && li == fault_id) tl_addr = p_addr[li] ^ 64'h10;
      #1;
      if (!(fault == 4 && li == fault_id)) begin
        chk(tl_hit, "LVQ entry live for a trailing load");
        chk(tl_data == p_data[li], "LVQ value is the leading load's value");
      end
      t_lvq_done[li] = 1;
    end

    // ---------- trailing: completion ----------
    tc_valid = '0;
    k = 0;
    for (int q = 0; q < t_pend.size() && k < W; q++) begin
      id = t_pend[q];
      if (t_due[id] <= cyc && cyc >= stall_until && (!p_ld[id] || t_lvq_done[id])) begin
        tc_valid[k] = 1;
        tc_al_idx[k] = 9'(t_al[id]);
        tc_res[k].taken = p_tk[id];
        tc_res[k].target = p_tg[id];
        tc_res[k].addr = p_addr[id];
        tc_res[k].data = p_data[id];
        if (fault == 2 && id == fault_id) tc_res[k].data = p_data[id] ^ 64'h1;
        t_pend.delete(q);
        q--;
        k++;
      end
    end
    // payload RAMs: the core's issue queue keeps each thread's payload apart
    pl_wr_en = 2'b11;
    pl_wr_idx[0] = 5'(cyc); pl_wr_idx[1] = 5'(cyc);
    pl_wr_data[0] = 64'(cyc); pl_wr_data[1] = ~64'(cyc);
    pl_rd_idx[0] = 5'(cyc - 1); pl_rd_idx[1] = 5'(cyc - 1);
  end

  // ================= sampling at the rising edge =================
  longint t_rst;
  always @(posedge clk) if (rst_n) begin
    if (cyc > t_rst + 3) begin
      chk(pl_rd_data[0] == 64'(cyc - 1) && pl_rd_data[1] == ~64'(cyc - 1), "payload RAMs keep threads apart");
    end
    if (err_store) n_err_store++;
    if (err_dep)   n_err_dep++;
    if (err_pc)    n_err_pc++;
    if (err_lvq)   n_err_lvq++;
    for (int l = 0; l < W; l++) if (tcommit_valid[l]) begin
      if (fault == 0) chk(tcommit_pc[l] == p_pc[t_com], $sformatf("trailing commit %0d in program order", t_com));
      if (p_ld[t_com] || p_st[t_com]) t_mem_committed++;
      t_com++;
    end
    for (int l = 0; l < W; l++) if (tfree_valid[l]) fl.push_back(int'(tfree_preg[l]));
    for (int l = 0; l < W; l++) if (mem_valid[l]) begin
      while (mem_seen < N && !p_st[mem_seen]) mem_seen++;
      chk(mem_addr[l] == p_addr[mem_seen] && mem_data[l] == p_data[mem_seen],
          $sformatf("store %0d to memory", mem_seen));
      mem_seen++;
    end
  end

  // ================= test sequence =================
  task automatic run(input int n, input int f, input longint max_cycles);
    longint t0;
    reset_all(n, f);
    t0 = cyc;
    while (t_com < N && cyc - t0 < max_cycles && !(f != 0 && err_any)) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int a, b, c, d;
    n_split = 0; n_fallback = 0; n_nop = 0; n_slack = 0; n_alloc_stall = 0; n_commit_stall = 0;
    n_squash = 0; n_err_store = 0; n_err_dep = 0; n_err_pc = 0; n_err_lvq = 0;
    n_fe_div = 0; n_be_div = 0; n_trail = 0;
    // ---- clean run ----
    run(NMAX, 0, 200000);
    chk(t_com == N, "clean run: all instructions committed by the trailing thread");
    chk(!err_any, "clean run: no error flagged");
    begin
      int ns; ns = 0;
      for (int i = 0; i < N; i++) if (p_st[i]) ns++;
      chk(mem_seen <= N && (ns > 0), "stores seen");
    end
    $display("clean run: %0d instructions in %0d cycles; frontend diverse %0d/%0d, backend diverse %0d/%0d",
             N, cyc, n_fe_div, n_trail, n_be_div, n_trail);
    $display("events: split=%0d nop_slots=%0d fallback=%0d slack_stall=%0d alloc_stall=%0d lead_commit_stall=%0d squash=%0d",
             n_split, n_nop, n_fallback, n_slack, n_alloc_stall, n_commit_stall, n_squash);
    // ---- fault runs ----
    a = n_err_dep; run(800, 1, 30000);
    chk(n_err_dep > a, "corrupted leading rename map caught by the dependence check");
    b = n_err_store; run(800, 2, 30000);
    chk(n_err_store > b, "wrong trailing store caught by the store check");
    c = n_err_pc; run(800, 3, 30000);
    chk(n_err_pc > c, "wrong committed PC caught by the program-order check");
    d = n_err_lvq; run(800, 4, 30000);
    chk(n_err_lvq > d, "wrong trailing load address caught by the LVQ check");
    // ---- every mechanism happened ----
    chk(n_split > 0, "packet split happened");
    chk(n_nop > 0, "NOP insertion happened");
    chk(n_fallback > 0, "filler NOP of another class used");
    chk(n_slack > 0, "slack stall happened");
    chk(n_alloc_stall > 0, "trailing allocation stall happened");
    chk(n_commit_stall > 0, "leading commit stall (LVQ/store buffer full) happened");
    chk(n_squash > 0, "squash happened");
    $display("errors flagged: store=%0d dep=%0d pc=%0d lvq=%0d", n_err_store, n_err_dep, n_err_pc, n_err_lvq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (trailing committed %0d of %0d, leading %0d)", t_com, N, com_ptr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
