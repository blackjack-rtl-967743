// tb_safe_shuffle: self-checking test of the safe-shuffle unit.
//
// Drives the example of two ALU instructions that swap backend ways (A on
// frontend 0/backend 0, B on frontend 1/backend 1: B must land in slot 0 and
// A in slot 1 behind a NOP that B replaced), then random packets. For every
// output packet it checks, from the slot positions alone, that each real
// instruction's trailing frontend way (its slot) and trailing backend way
// (number of same-class slots below it) differ from its leading ways, also
// when the unit had to use a filler NOP of another class; that every input
// instruction comes out exactly once; and it compares each packet with a
// reference model of the greedy rule written here separately.
module tb_safe_shuffle;
  import bj_pkg::*;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_split, out_fallback, out_ready;
  logic [W-1:0] in_mask;
  dtq_rec_t in_rec [W];
  tslot_t out_slot [W];

  safe_shuffle #(.W(W)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference: returns slot owner (-1 empty, -2 nop) for one output packet
  function automatic void ref_pack(input logic [W-1:0] mask, input dtq_rec_t r [W],
                                   output int owner [W], output fu_e ofu [W],
                                   output logic [W-1:0] used, output logic fb);
    int cnt; logic ok, stop;
    for (int s = 0; s < W; s++) begin owner[s] = -1; ofu[s] = FU_ALU; end
    used = '0; fb = 0; stop = 0;
    for (int i = 0; i < W; i++) begin
      if (!mask[i] || stop) continue;
      ok = 0; cnt = 0;
      for (int s = 0; s < W && !ok; s++) begin
        if (owner[s] == -1 || (owner[s] == -2 && ofu[s] == r[i].fu)) begin
          if (s != r[i].fe_way && cnt != r[i].be_way && cnt < int'(fu_count(r[i].fu))) begin
            owner[s] = i; ofu[s] = r[i].fu; ok = 1;
          end else begin
            if (owner[s] == -1) begin owner[s] = -2; ofu[s] = r[i].fu; end
            cnt++;
          end
        end else if (ofu[s] == r[i].fu) cnt++;
      end
      if (ok) used[i] = 1;
      else if (used == 0) begin
        for (int s = 0; s < W; s++) owner[s] = -1;
        if (r[i].fe_way == 0) begin
          owner[0] = -2; ofu[0] = FU_ALU; owner[1] = i; ofu[1] = r[i].fu;
        end else begin
          owner[0] = -2; ofu[0] = r[i].fu; owner[1] = -2; ofu[1] = FU_ALU;
          owner[2] = i;  ofu[2] = r[i].fu;
        end
        used[i] = 1; fb = 1;
      end else stop = 1;
    end
  endfunction

  int n_split = 0, n_fb = 0, n_nop = 0, n_pkts = 0;

  // send one packet and collect all output packets for it
  task automatic run_pkt(input logic [W-1:0] mask, input dtq_rec_t r [W]);
    logic [W-1:0] rem, seen;
    int owner [W]; fu_e ofu [W]; logic [W-1:0] used; logic fb;
    int top, cnt, id;
    rem = mask; seen = '0;
    @(negedge clk);
    in_valid = 1; in_mask = mask; in_rec = r;
    do begin
      #1;
      chk(out_valid, "output packet expected");
      ref_pack(rem, r, owner, ofu, used, fb);
      top = -1;
      for (int s = 0; s < W; s++) if (owner[s] >= 0) top = s;
      for (int s = 0; s < W; s++) begin
        chk(out_slot[s].valid == (s <= top), $sformatf("slot %0d valid", s));
        if (s <= top) begin
          chk(out_slot[s].nop == (owner[s] < 0), $sformatf("slot %0d nop", s));
          if (owner[s] >= 0) chk(out_slot[s].rec == r[owner[s]], $sformatf("slot %0d content", s));
          if (out_slot[s].nop) n_nop++;
        end
      end
      chk(out_fallback == fb, "fallback flag");
      // diversity, from positions only
      for (int s = 0; s < W; s++) if (out_slot[s].valid && !out_slot[s].nop) begin
        cnt = 0;
        for (int k = 0; k < s; k++) if (out_slot[k].valid && out_slot[k].fu == out_slot[s].fu) cnt++;
        chk(s != int'(out_slot[s].rec.fe_way), "frontend diverse");
        chk(cnt != int'(out_slot[s].rec.be_way), "backend diverse");
        chk(cnt < int'(fu_count(out_slot[s].fu)), "backend way exists");
        id = out_slot[s].rec.inst;
        chk(!seen[id], "instruction emitted twice");
        seen[id] = 1;
      end
      chk(out_split == ((rem & ~used) != 0), "split flag");
      if (out_split) n_split++;
      if (out_fallback) n_fb++;
      n_pkts++;
      rem = rem & ~used;
      @(negedge clk);
      in_valid = 0;
    end while (rem != 0);
    chk(seen == mask, "every instruction emitted once");
  endtask

  initial begin
    dtq_rec_t r [W];
    logic [W-1:0] m;
    in_valid = 0; in_mask = 0; out_ready = 1;
    for (int i = 0; i < W; i++) in_rec[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // swap example: A front 0 back 0, B front 1 back 1, both ALU
    for (int i = 0; i < W; i++) r[i] = '0;
    r[0].inst = 0; r[0].fu = FU_ALU; r[0].fe_way = 0; r[0].be_way = 0;
    r[1].inst = 1; r[1].fu = FU_ALU; r[1].fe_way = 1; r[1].be_way = 1;
    run_pkt(4'b0011, r);
    // (checked inside: reference gives B in slot 0, A in slot 1)
    // explicit check of the figure's end state
    begin
      int owner [W]; fu_e ofu [W]; logic [W-1:0] used; logic fb;
      ref_pack(4'b0011, r, owner, ofu, used, fb);
      chk(owner[0] == 1 && owner[1] == 0, "swap example: B slot 0, A slot 1");
    end
    // random packets
    for (int n = 0; n < 3000; n++) begin
      m = 4'($urandom_range(1, 15));
      for (int i = 0; i < W; i++) begin
        r[i] = '0;
        r[i].inst   = i;
        r[i].fu     = fu_e'($urandom_range(0, 4));
        r[i].be_way = way_t'($urandom_range(0, fu_count(r[i].fu) - 1));
        r[i].pc     = word_t'($urandom);
      end
      // leading frontend ways are distinct within one leading packet
      begin
        int perm [W];
        for (int i = 0; i < W; i++) perm[i] = i;
        perm.shuffle();
        for (int i = 0; i < W; i++) r[i].fe_way = way_t'(perm[i]);
      end
      run_pkt(m, r);
    end
    // back-pressure: output not ready for a while
    out_ready = 0;
    @(negedge clk); in_valid = 1; in_mask = 4'b0001; in_rec = r;
    @(negedge clk); in_valid = 0;
    repeat (3) begin @(negedge clk); chk(out_valid && !in_ready, "held under back-pressure"); end
    out_ready = 1;
    @(negedge clk);
    chk(in_ready, "released after back-pressure");
    chk(n_split > 0 && n_fb > 0 && n_nop > 0, "split, fallback and NOP cases all seen");
    $display("packets=%0d splits=%0d fallbacks=%0d nops=%0d", n_pkts, n_split, n_fb, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
