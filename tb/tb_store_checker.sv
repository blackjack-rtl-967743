// tb_store_checker: self-checking test of the store buffer comparison.
//
// 2000 leading stores enter a 16-entry buffer up to 4 per cycle (waiting on
// ld_ready); trailing copies arrive later, up to 4 per cycle, never ahead of
// the leading ones. About one trailing store in 20 has a wrong address or
// data. Checks: a matching store is released to memory in its lane with the
// leading address and data; a mismatched one is not released and raises
// st_err in that cycle; nothing else raises it; the buffer fills at times and
// is empty at the end.
module tb_store_checker;
  import bj_pkg::*;
  localparam int W = 4, DEPTH = 16, N = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] ld_valid, tr_valid, mem_valid;
  word_t ld_addr [W], ld_data [W], tr_addr [W], tr_data [W], mem_addr [W], mem_data [W];
  logic ld_ready, st_err;
  logic [4:0] count;
  store_checker #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t A(int i); return word_t'(i) * 8 + 64'h8000; endfunction
  function automatic word_t D(int i); return word_t'(i) * 64'h1234567 + 1; endfunction

  int lead = 0, trail = 0, fulls = 0, nerr = 0, released = 0;
  initial begin
    int k, t;
    logic exp_err;
    ld_valid = 0; tr_valid = 0;
    for (int i = 0; i < W; i++) begin ld_addr[i] = 0; ld_data[i] = 0; tr_addr[i] = 0; tr_data[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (trail < N) begin
      @(negedge clk);
      k = $urandom_range(0, W);
      ld_valid = '0;
      for (int l = 0; l < k && lead + l < N; l++) begin
        ld_valid[l] = 1; ld_addr[l] = A(lead + l); ld_data[l] = D(lead + l);
      end
      t = $urandom_range(0, W);
      if (t > lead - trail) t = lead - trail;
      tr_valid = '0; exp_err = 0;
      for (int l = 0; l < t; l++) begin
        logic bad;
        bad = ($urandom_range(0, 19) == 0);
        tr_valid[l] = 1; tr_addr[l] = A(trail + l); tr_data[l] = D(trail + l);
        if (bad) begin
          if ($urandom_range(0, 1)) tr_addr[l] ^= 64'h8; else tr_data[l] ^= 64'h100;
          exp_err = 1;
        end
      end
      #1;
      if (!ld_ready) fulls++;
      chk(st_err == exp_err, "st_err exactly on mismatches");
      if (st_err) nerr++;
      for (int l = 0; l < t; l++) begin
        logic ok;
        ok = (tr_addr[l] == A(trail + l)) && (tr_data[l] == D(trail + l));
        chk(mem_valid[l] == ok, "released exactly when equal");
        if (ok) begin
          chk(mem_addr[l] == A(trail + l) && mem_data[l] == D(trail + l), "released store content");
          released++;
        end
      end
      for (int l = t; l < W; l++) chk(!mem_valid[l], "no release without trailing store");
      @(posedge clk);
      if (ld_ready) lead += int'($countones(ld_valid));
      trail += t;
    end
    @(negedge clk); tr_valid = 0; ld_valid = 0; #1;
    chk(count == 0, "buffer empty at end");
    chk(fulls > 0 && nerr > 0 && released > 0, "full, mismatch and release all happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
