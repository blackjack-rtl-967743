// tb_trail_fetch: self-checking test of the trailing fetch queue and slack.
//
// Pushes 400 numbered packets of 1 to 4 real instructions (with NOPs) into a
// 4-deep queue while a leading-commit counter advances at random, and takes
// packets out with random back-pressure, using a slack of 20 instructions.
// Checks: packets leave in the order they came, unchanged, at most one per
// cycle, and offered in every cycle in which one waits and the slack
// allows; a packet leaves only while the leading thread has committed at
// least 20 instructions more than the trailing thread has fetched (tracked
// here on its own), except in the final drain phase; slack stalls and a full
// queue both occur.
module tb_trail_fetch;
  import bj_pkg::*;
  localparam int W = 4, DEPTH = 4, SLACK = 20, N = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, drain, out_valid, out_ready, slack_stall;
  tslot_t in_slot [W], out_slot [W];
  logic [2:0] lead_commit_n;
  trail_fetch #(.W(W), .DEPTH(DEPTH), .SLACK(SLACK)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic last_fire = 0;
  int n_fast = 0, n_in = 0, n_out = 0, gap = 0, stalls = 0, fulls = 0, lead_total = 0;
  int reals [N];

  function automatic void mk(int id, output tslot_t s [W]);
    int k;
    k = (id % 4) + 1;
    for (int j = 0; j < W; j++) begin
      s[j] = '0;
      s[j].valid = (j < k);
      s[j].nop   = (j < k - 1) && ((id + j) % 3 == 0);
      s[j].rec.inst = 32'(id);
      s[j].rec.pc   = word_t'(j);
    end
  endfunction

  always @(negedge clk) if (rst_n) begin
    tslot_t s [W];
    in_valid = (n_in < N) && ($urandom_range(0, 3) != 0);
    mk(n_in, s); in_slot = s;
    lead_commit_n = (lead_total < 1500) ? 3'($urandom_range(0, 2)) : 3'd0;
    out_ready = $urandom_range(0, 3) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    gap += int'(lead_commit_n);
    lead_total += int'(lead_commit_n);
    if (slack_stall) stalls++;
    if (!in_ready) fulls++;
    // rate: a packet written in an earlier cycle is offered as soon as the
    // slack allows, so the queue delivers one packet every cycle while the
    // slack holds and packets wait
    chk(out_valid == ((n_in > n_out) && (drain || gap - int'(lead_commit_n) >= SLACK)),
        "packet offered exactly when one waits and the slack allows");
    if (out_valid && out_ready && last_fire) n_fast++;
    last_fire = out_valid && out_ready;
    if (in_valid && in_ready) n_in++;
    if (out_valid && out_ready) begin
      tslot_t e [W];
      int r;
      mk(n_out, e);
      r = 0;
      for (int j = 0; j < W; j++) begin
        chk(out_slot[j] == e[j], $sformatf("packet %0d slot %0d", n_out, j));
        if (e[j].valid && !e[j].nop) r++;
      end
      if (!drain) chk(gap - int'(lead_commit_n) >= SLACK, "slack respected");
      gap -= r;
      n_out++;
    end
  end

  initial begin
    in_valid = 0; drain = 0; out_ready = 0; lead_commit_n = 0;
    for (int j = 0; j < W; j++) in_slot[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (lead_total >= 1500);
    repeat (20) @(posedge clk);
    drain = 1;
    wait (n_out == N);
    repeat (5) @(posedge clk);
    chk(!out_valid, "queue empty at end");
    chk(stalls > 0, "slack stall happened");
    chk(fulls > 0, "queue full happened");
    chk(n_fast > 0, "packets fetched in back-to-back cycles");
    $display("stalls=%0d fulls=%0d", stalls, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
