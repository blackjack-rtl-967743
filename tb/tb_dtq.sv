// tb_dtq: self-checking test of the Dependence Trace Queue.
//
// A small leading-thread model issues a 600-instruction program in packets
// of 1 to 4 instructions (reversed within a packet, since order inside a
// packet is free), commits it in program order a few instructions per cycle,
// and squashes about one instruction in ten instead of committing it. The
// checker expects the DTQ to hand out exactly the issue packets, in issue
// order, with squashed lanes masked off, all-squashed packets dropped, each
// record as committed, and virtual active-list/LSQ/LVQ indices equal to the
// count of older committed instructions, memory operations and loads. A
// 16-entry DTQ is used so that the full condition is reached.
module tb_dtq;
  import bj_pkg::*;
  localparam int W = 4, DEPTH = 16, N = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] alloc_valid, squash_valid, commit_valid, pkt_mask;
  logic alloc_ready, pkt_valid, pkt_ready;
  logic [$clog2(DEPTH)-1:0] alloc_idx [W], squash_idx [W], commit_idx [W];
  dtq_rec_t commit_rec [W], pkt_rec [W];
  logic [$clog2(DEPTH):0] count;

  dtq #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int idx_of [N];
  logic squashed [N];
  int pkt_first [N], pkt_len [N];   // packets in issue order
  int n_pkts = 0, issue_ptr = 0, commit_ptr = 0, exp_pkt = 0, full_seen = 0;
  int v_al [N], v_lsq [N], v_lvq [N];
  logic issued_before [N];

  function automatic dtq_rec_t mkrec(int id);
    dtq_rec_t r = '0;
    r.inst = 32'(id); r.pc = word_t'(id * 4);
    r.is_load = (id % 3 == 0); r.is_store = (id % 3 != 0) && (id % 5 == 0);
    r.fu = (r.is_load || r.is_store) ? FU_MEM : FU_ALU;
    r.fe_way = way_t'(id % 4);
    return r;
  endfunction

  initial begin
    int a = 0, m = 0, l = 0;
    for (int i = 0; i < N; i++) begin
      squashed[i] = ($urandom_range(0, 9) == 0);
      issued_before[i] = 0;
      v_al[i] = a; v_lsq[i] = m; v_lvq[i] = l;
      if (!squashed[i]) begin
        a++;
        if (mkrec(i).is_load || mkrec(i).is_store) m++;
        if (mkrec(i).is_load) l++;
      end
    end
  end

  // issue and commit, driven on the falling edge
  int k, c;
  always @(negedge clk) if (rst_n) begin
    // mark last cycle's issues as visible to commit
    for (int i = 0; i < issue_ptr; i++) issued_before[i] = 1;
    alloc_valid = '0; squash_valid = '0; commit_valid = '0;
    if (!alloc_ready) full_seen++;
    if (issue_ptr < N && alloc_ready && $urandom_range(0, 3) != 0) begin
      k = $urandom_range(1, W);
      if (issue_ptr + k > N) k = N - issue_ptr;
      pkt_first[n_pkts] = issue_ptr; pkt_len[n_pkts] = k; n_pkts++;
      for (int j = 0; j < k; j++) begin
        alloc_valid[j] = 1;
        idx_of[issue_ptr + k - 1 - j] = int'(alloc_idx[j]);
      end
      issue_ptr += k;
    end
    c = $urandom_range(0, W);
    for (int j = 0; j < c; j++) begin
      if (commit_ptr < N && issued_before[commit_ptr]) begin
        if (squashed[commit_ptr]) begin
          squash_valid[j] = 1; squash_idx[j] = $clog2(DEPTH)'(idx_of[commit_ptr]);
        end else begin
          commit_valid[j] = 1; commit_idx[j] = $clog2(DEPTH)'(idx_of[commit_ptr]);
          commit_rec[j] = mkrec(commit_ptr);
        end
        commit_ptr++;
      end
    end
    pkt_ready = ($urandom_range(0, 2) != 0);
  end

  // check packets leaving
  always @(posedge clk) if (rst_n) begin
    if (pkt_valid && pkt_ready) begin
      int f, n; logic all_dead;
      do begin
        all_dead = 1;
        for (int j = 0; j < pkt_len[exp_pkt]; j++)
          if (!squashed[pkt_first[exp_pkt] + j]) all_dead = 0;
        if (all_dead) exp_pkt++;
      end while (all_dead && exp_pkt < n_pkts);
      f = pkt_first[exp_pkt]; n = pkt_len[exp_pkt];
      for (int j = 0; j < W; j++) begin
        int id;
        dtq_rec_t e;
        id = f + n - 1 - j;
        if (j < n) begin
          chk(pkt_mask[j] == !squashed[id], $sformatf("mask lane %0d of packet %0d", j, exp_pkt));
          if (!squashed[id]) begin
            e = mkrec(id);
            e.v_al = vidx_t'(v_al[id]); e.v_lsq = vidx_t'(v_lsq[id]); e.v_lvq = vidx_t'(v_lvq[id]);
            chk(pkt_rec[j] == e, $sformatf("record of instruction %0d", id));
          end
        end else chk(!pkt_mask[j], "lane beyond packet masked");
      end
      exp_pkt++;
    end
  end

  initial begin
    alloc_valid = 0; squash_valid = 0; commit_valid = 0; pkt_ready = 0;
    for (int j = 0; j < W; j++) begin squash_idx[j] = 0; commit_idx[j] = 0; commit_rec[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (commit_ptr == N);
    repeat (50) @(posedge clk);
    // all live packets delivered, queue empty
    while (exp_pkt < n_pkts) begin
      logic all_dead;
      all_dead = 1;
      for (int j = 0; j < pkt_len[exp_pkt]; j++) if (!squashed[pkt_first[exp_pkt] + j]) all_dead = 0;
      chk(all_dead, "undelivered live packet");
      exp_pkt++;
    end
    chk(count == 0, "DTQ empty at end");
    chk(full_seen > 0, "full DTQ exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
