// tb_pc_order_check: self-checking test of the program-order check.
//
// Builds a random instruction stream with taken and not-taken branches and
// commits it in groups of 0 to 4 per cycle. A correct stream must raise no
// error; then single instructions are dropped, duplicated or given a wrong
// branch target, and each must raise pc_err on exactly the cycle (and lane)
// of the first instruction whose PC does not follow.
module tb_pc_order_check;
  import bj_pkg::*;
  localparam int W = 4, N = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] c_valid, c_taken;
  word_t c_pc [W], c_target [W];
  logic pc_err;
  logic [1:0] err_lane;
  pc_order_check #(.W(W)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  word_t pc [N], tgt [N];
  logic  tk [N];
  int    bad;   // index whose PC is wrong, -1 for none

  task automatic run(input int corrupt);
    int i, k, errs;
    word_t p;
    p = 64'h1000;
    for (int n = 0; n < N; n++) begin
      pc[n] = p; tk[n] = ($urandom_range(0, 5) == 0);
      tgt[n] = word_t'($urandom_range(0, 4095)) << 2;
      p = tk[n] ? tgt[n] : p + 4;
    end
    bad = -1;
    if (corrupt == 1) begin bad = N / 2; for (int n = bad; n < N - 1; n++) begin pc[n] = pc[n+1]; tk[n] = tk[n+1]; tgt[n] = tgt[n+1]; end end // dropped
    if (corrupt == 2) begin bad = N / 3; for (int n = N - 1; n >= bad; n--) begin pc[n] = pc[n-1]; tk[n] = tk[n-1]; tgt[n] = tgt[n-1]; end tk[bad-1] = 0; end   // repeated
    if (corrupt == 3) begin bad = N / 4 + 1; tk[bad - 1] = 1; tgt[bad - 1] = pc[bad] + 64; end  // wrong target
    rst_n = 0; @(negedge clk); rst_n = 1;
    i = 0; errs = 0;
    while (i < N - 1) begin
      k = $urandom_range(0, W);
      c_valid = '0;
      for (int l = 0; l < k && i < N - 1; l++) begin
        c_valid[l] = 1; c_pc[l] = pc[i]; c_taken[l] = tk[i]; c_target[l] = tgt[i];
        i++;
      end
      #1;
      begin
        logic exp; int lane;
        exp = 0; lane = 0;
        for (int l = 0; l < W; l++) if (c_valid[l] && (i - int'($countones(c_valid)) + l) == bad) begin exp = 1; lane = l; end
        chk(pc_err == exp, $sformatf("error flag at instruction %0d (corrupt=%0d)", i, corrupt));
        if (exp) begin chk(int'(err_lane) == lane, "error lane"); errs++; end
      end
      @(negedge clk);
    end
    c_valid = '0;
    if (corrupt != 0) chk(errs == 1, "exactly one detection");
  endtask

  initial begin
    c_valid = 0; c_taken = 0;
    for (int l = 0; l < W; l++) begin c_pc[l] = 0; c_target[l] = 0; end
    @(negedge clk);
    for (int r = 0; r < 4; r++) run(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
