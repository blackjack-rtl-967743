// tb_commit_rename_check: self-checking test of the commit-time dependence
// check.
//
// A random program of 3000 instructions over 64 logical registers is renamed
// by a reference model in this testbench (a trailing register per result,
// taken from a pool). It commits 0 to 4 instructions per cycle. With the
// correct trailing sources no error may appear and every freed register must
// be the previous mapping of the destination; then about one instruction in
// 50 gets a wrong source register, and dep_err must be raised in exactly the
// cycles that hold such an instruction.
module tb_commit_rename_check;
  import bj_pkg::*;
  localparam int W = 4, N = 3000, NL = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] c_valid, free_valid;
  tal_static_t c_ent [W];
  preg_t free_preg [W];
  logic dep_err;
  commit_rename_check #(.W(W), .NUM_LREGS(NL)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  tal_static_t prog [N];
  preg_t       prev [N];
  logic        bad [N];

  task automatic run(input logic corrupt);
    preg_t rat [NL];
    int i, k, nbad;
    for (int r = 0; r < NL; r++) rat[r] = preg_t'(NL + r);
    nbad = 0;
    for (int n = 0; n < N; n++) begin
      prog[n] = '0;
      prog[n].has_src1 = $urandom_range(0, 4) != 0;
      prog[n].has_src2 = $urandom_range(0, 1);
      prog[n].has_dst  = $urandom_range(0, 4) != 0;
      prog[n].lsrc1 = lreg_t'($urandom_range(0, NL - 1));
      prog[n].lsrc2 = lreg_t'($urandom_range(0, NL - 1));
      prog[n].ldst  = lreg_t'($urandom_range(0, NL - 1));
      prog[n].tsrc1 = rat[prog[n].lsrc1];
      prog[n].tsrc2 = rat[prog[n].lsrc2];
      prog[n].tdst  = preg_t'(128 + (n % 400));
      bad[n] = 0;
      if (corrupt && prog[n].has_src1 && $urandom_range(0, 49) == 0) begin
        prog[n].tsrc1 = prog[n].tsrc1 ^ preg_t'($urandom_range(1, 511));
        bad[n] = 1; nbad++;
      end
      prev[n] = rat[prog[n].ldst];
      if (prog[n].has_dst) rat[prog[n].ldst] = prog[n].tdst;
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    i = 0;
    while (i < N) begin
      logic exp;
      k = $urandom_range(0, W);
      c_valid = '0; exp = 0;
      for (int l = 0; l < k && i + l < N; l++) begin
        c_valid[l] = 1; c_ent[l] = prog[i + l];
        if (bad[i + l]) exp = 1;
      end
      #1;
      chk(dep_err == exp, $sformatf("dep_err near instruction %0d", i));
      for (int l = 0; l < W; l++) if (c_valid[l]) begin
        chk(free_valid[l] == prog[i + l].has_dst, "free_valid");
        if (prog[i + l].has_dst) chk(free_preg[l] == prev[i + l], "freed register is the previous mapping");
      end
      i += int'($countones(c_valid));
      @(negedge clk);
    end
    c_valid = '0;
    if (corrupt) chk(nbad > 0, "corruptions injected");
  endtask

  initial begin
    c_valid = 0;
    for (int l = 0; l < W; l++) c_ent[l] = '0;
    @(negedge clk);
    run(0);
    run(1);
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
