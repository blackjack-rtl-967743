// tb_trail_active_list: self-checking test of the trailing active list.
//
// 1500 instructions with virtual indices 0..1499 are allocated out of order
// (program order permuted within windows of 12, sent as packets of up to 4)
// into a 16-entry list, completed after random delays, and committed. The
// checker expects commits strictly in virtual-index order with the contents
// and completion results each instruction was given, never an instruction
// committed before it completed, physical entries at head + (v - head_v)
// modulo 16, and stalls when an index lies 16 or more past the head.
module tb_trail_active_list;
  import bj_pkg::*;
  localparam int W = 4, SIZE = 16, N = 1500, WIN = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_fire, alloc_ok;
  logic [W-1:0] alloc_valid, cmp_valid, commit_valid;
  vidx_t alloc_v [W];
  tal_static_t alloc_ent [W], commit_ent [W];
  logic [3:0] alloc_p [W], cmp_p [W];
  tal_result_t cmp_res [W], commit_res [W];
  logic [4:0] occupancy;
  trail_active_list #(.W(W), .SIZE(SIZE)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int order [N];
  int sent = 0, committed = 0, stalls = 0;
  int phys [N];
  logic done_flag [N];
  int pend [$];   // allocated, not yet completed

  function automatic tal_static_t ent(int id);
    tal_static_t e = '0;
    e.pc = word_t'(id); e.ldst = lreg_t'(id); e.tdst = preg_t'(id * 3);
    return e;
  endfunction
  function automatic tal_result_t res(int id);
    tal_result_t r = '0;
    r.data = word_t'(id * 7); r.target = word_t'(id + 100); r.taken = id[0];
    return r;
  endfunction

  initial begin
    for (int b = 0; b < N; b += WIN) begin
      int q [$];
      q.delete();
      for (int i = b; i < b + WIN && i < N; i++) q.push_back(i);
      q.shuffle();
      foreach (q[k]) order[b + k] = q[k];
    end
    for (int i = 0; i < N; i++) done_flag[i] = 0;
  end

  int k_pkt;
  always @(negedge clk) if (rst_n) begin
    // allocation packet
    k_pkt = $urandom_range(1, W);
    alloc_valid = '0;
    for (int s = 0; s < W; s++) if (s < k_pkt && sent + s < N) begin
      alloc_valid[s] = 1; alloc_v[s] = vidx_t'(order[sent + s]); alloc_ent[s] = ent(order[sent + s]);
    end
    alloc_fire = $urandom_range(0, 3) != 0;
    // completions
    cmp_valid = '0;
    for (int l = 0; l < W; l++) if (pend.size() > 0 && $urandom_range(0, 2) == 0) begin
      int id;
      pend.shuffle();
      id = pend.pop_front();
      cmp_valid[l] = 1; cmp_p[l] = 4'(phys[id]); cmp_res[l] = res(id);
      done_flag[id] = 1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (alloc_valid != 0 && !alloc_ok) stalls++;
    for (int l = 0; l < W; l++) if (commit_valid[l]) begin
      chk(commit_ent[l] == ent(committed), $sformatf("commit order at %0d", committed));
      chk(commit_res[l] == res(committed), "completion result");
      chk(done_flag[committed], "committed after completion");
      committed++;
    end
    if (alloc_fire && alloc_ok && alloc_valid != 0) begin
      for (int s = 0; s < W; s++) if (alloc_valid[s]) begin
        int id;
        id = order[sent];
        phys[id] = int'(alloc_p[s]);
        chk(int'(alloc_p[s]) == (id % SIZE), "physical index = virtual index mod size here");
        chk(id - committed < SIZE, "allocated only within the list");
        pend.push_back(id);
        sent++;
      end
    end
  end

  initial begin
    alloc_fire = 0; alloc_valid = 0; cmp_valid = 0;
    for (int s = 0; s < W; s++) begin alloc_v[s] = 0; alloc_ent[s] = '0; cmp_p[s] = 0; cmp_res[s] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (committed == N);
    chk(stalls > 0, "allocation stall happened");
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog committed=%0d sent=%0d", committed, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
