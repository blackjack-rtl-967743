// tb_trail_rename: self-checking test of the trailing renamer.
//
// Random packets of up to 4 independent instructions, named by leading
// physical registers (576 of them), are renamed against a reference table
// kept in this testbench. The trailing sources must be the reference
// mappings of the leading sources, a destination must take the offered free
// register of its own slot, NOP slots and slots without a destination must
// not take one, and the table must change only when the packet fires. The
// reset state (leading register i -> trailing register 64 + i) is checked
// first.
module tb_trail_rename;
  import bj_pkg::*;
  localparam int W = 4, NP = 576, NL = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_fire;
  tslot_t in_slot [W];
  preg_t new_preg [W], tsrc1 [W], tsrc2 [W], tdst [W];
  logic [W-1:0] need_preg;
  trail_rename #(.W(W), .NUM_PREGS(NP), .NUM_LREGS(NL)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  preg_t refmap [NP];

  initial begin
    in_fire = 0;
    for (int s = 0; s < W; s++) begin in_slot[s] = '0; new_preg[s] = '0; end
    for (int p = 0; p < NP; p++) refmap[p] = (p < NL) ? preg_t'(NL + p) : '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NL; p++) begin
      in_slot[0].rec.psrc1 = preg_t'(p); #1;
      chk(tsrc1[0] == preg_t'(NL + p), "reset mapping");
    end
    // make every entry defined before random use
    for (int p = NL; p < NP; p += W) begin
      @(negedge clk);
      in_fire = 1;
      for (int s = 0; s < W; s++) begin
        in_slot[s] = '0; in_slot[s].valid = 1; in_slot[s].rec.has_dst = 1;
        in_slot[s].rec.pdst = preg_t'((p + s) % NP);
        new_preg[s] = preg_t'($urandom_range(0, NP - 1));
        refmap[(p + s) % NP] = new_preg[s];
      end
    end
    for (int n = 0; n < 5000; n++) begin
      int used [$];
      used.delete();
      @(negedge clk);
      in_fire = $urandom_range(0, 3) != 0;
      for (int s = 0; s < W; s++) begin
        int d;
        in_slot[s] = '0;
        in_slot[s].valid = $urandom_range(0, 5) != 0;
        in_slot[s].nop   = $urandom_range(0, 4) == 0;
        in_slot[s].rec.has_dst = $urandom_range(0, 3) != 0;
        do d = $urandom_range(0, NP - 1); while (d inside {used});
        used.push_back(d);
        in_slot[s].rec.pdst = preg_t'(d);
        new_preg[s] = preg_t'($urandom_range(0, NP - 1));
      end
      for (int s = 0; s < W; s++) begin
        int a, b;
        do a = $urandom_range(0, NP - 1); while (a inside {used});
        do b = $urandom_range(0, NP - 1); while (b inside {used});
        in_slot[s].rec.psrc1 = preg_t'(a);
        in_slot[s].rec.psrc2 = preg_t'(b);
      end
      #1;
      for (int s = 0; s < W; s++) begin
        logic nd;
        nd = in_slot[s].valid && !in_slot[s].nop && in_slot[s].rec.has_dst;
        chk(need_preg[s] == nd, "need_preg");
        if (in_slot[s].valid && !in_slot[s].nop) begin
          chk(tsrc1[s] == refmap[in_slot[s].rec.psrc1], "tsrc1");
          chk(tsrc2[s] == refmap[in_slot[s].rec.psrc2], "tsrc2");
          if (nd) chk(tdst[s] == new_preg[s], "tdst");
        end
      end
      if (in_fire)
        for (int s = 0; s < W; s++)
          if (need_preg[s]) refmap[in_slot[s].rec.pdst] = new_preg[s];
    end
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
