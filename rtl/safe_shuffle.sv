// safe_shuffle: reorders one leading issue packet into trailing packets whose
// instructions all use other frontend and backend ways than their leading
// copies.
//
// The trailing thread fetches a packet with a direct mapping (slot s goes to
// frontend way s) and the issue stage maps co-issued instructions oldest
// first onto the free ways of their class. So if a trailing packet issues
// whole and alone, an instruction in slot s uses frontend way s and backend
// way n, where n is the number of slots below s holding the same class.
// The greedy rule: each instruction of the input packet, in input order,
// takes the first slot that is empty, or holds a NOP of its own class, for
// which both s differs from its leading frontend way and n differs from its
// leading backend way (and n is a way that exists for its class). Each empty
// slot it passes over without taking becomes a NOP marked with its class,
// which keeps the following slots on the intended ways. Only an instruction
// of the same class may later replace such a NOP, so that no backend way
// count changes. When an instruction finds no slot, the output packet ends
// and the rest of the input packet starts a new one.
//
// Interface: in_* is a valid/ready packet (mask of live entries) from the
// DTQ; out_* is a valid/ready packet of W slots toward the trailing fetch
// queue. Timing: one output packet per cycle; a packet that is not split is
// accepted and produced in the same cycle (combinational path), a split
// packet takes one more cycle per extra output packet.
//
// Follows the document: the greedy algorithm, typed NOPs, same-class
// replacement, packet splitting. This design's choices: a backend way index
// must be below the number of ways of the class; slots above the last real
// instruction are left empty; and when even the first instruction of an
// empty output packet has no acceptable slot (this happens only in a class
// with two ways, when the leading ways were frontend 0 / backend 1 or
// frontend 1 / backend 0) a filler NOP of the ALU class is put below it. That
// NOP shifts the frontend way but takes no way of the instruction's class, so
// both ways still differ from the leading ones: frontend 1 / backend 0, or
// frontend 2 / backend 1 behind one NOP of its own class. out_fallback
// reports such a filler.
module safe_shuffle
  import bj_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   in_mask,
  input  dtq_rec_t       in_rec [W],
  output logic           in_ready,
  output logic           out_valid,
  output tslot_t         out_slot [W],
  output logic           out_split,     // more output packets follow for this input
  output logic           out_fallback,  // a filler NOP of another class was used
  input  logic           out_ready
);
  typedef enum logic [1:0] {S_EMPTY, S_NOP, S_INST} sstate_e;

  // pending input packet
  logic          busy_q;
  logic [W-1:0]  rem_q;
  dtq_rec_t      rec_q [W];

  // source of the packet being shuffled this cycle
  logic          src_valid;
  logic [W-1:0]  src_mask;
  dtq_rec_t      src_rec [W];
  always_comb begin
    src_valid = busy_q ? 1'b1 : in_valid;
    src_mask  = busy_q ? rem_q : in_mask;
    for (int i = 0; i < W; i++) src_rec[i] = busy_q ? rec_q[i] : in_rec[i];
  end

  // ---------------- greedy placement ----------------
  sstate_e       st   [W];
  fu_e           sfu  [W];
  int unsigned   ssrc [W];
  logic [W-1:0]  placed;
  logic          fallback;
  always_comb begin
    logic        failed, found;
    int unsigned cnt, f, b;
    fu_e         t;
    t = FU_ALU; f = 0; b = 0; found = 1'b0; cnt = 0;
    for (int s = 0; s < W; s++) begin
      st[s] = S_EMPTY; sfu[s] = FU_ALU; ssrc[s] = 0;
    end
    placed   = '0;
    fallback = 1'b0;
    failed   = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (src_mask[i] && !failed) begin
        t     = src_rec[i].fu;
        f     = int'(src_rec[i].fe_way);
        b     = int'(src_rec[i].be_way);
        found = 1'b0;
        cnt   = 0;
        for (int s = 0; s < W; s++) begin
          if (!found) begin
            if (st[s] == S_EMPTY || (st[s] == S_NOP && sfu[s] == t)) begin
              if (s != f && cnt != b && cnt < fu_count(t)) begin
                st[s] = S_INST; sfu[s] = t; ssrc[s] = i; found = 1'b1;
              end else begin
                if (st[s] == S_EMPTY) begin
                  st[s] = S_NOP; sfu[s] = t;
                end
                cnt++;
              end
            end else if (sfu[s] == t) begin
              cnt++;
            end
          end
        end
        if (found) begin
          placed[i] = 1'b1;
        end else if (placed == '0) begin
          // Alone in a fresh packet and still no diverse slot: a class with
          // two ways whose leading ways were 0 and 1. A filler NOP of the ALU
          // class moves the frontend way without using a way of class t.
          for (int s = 0; s < W; s++) st[s] = S_EMPTY;
          if (f == 0) begin
            // leading frontend 0 / backend 1 -> frontend 1 / backend 0
            st[0] = S_NOP;  sfu[0] = FU_ALU;
            st[1] = S_INST; sfu[1] = t; ssrc[1] = i;
          end else begin
            // leading frontend 1 / backend 0 -> frontend 2 / backend 1
            st[0] = S_NOP;  sfu[0] = t;
            st[1] = S_NOP;  sfu[1] = FU_ALU;
            st[2] = S_INST; sfu[2] = t; ssrc[2] = i;
          end
          placed[i] = 1'b1;
          fallback  = 1'b1;
        end else begin
          failed = 1'b1;
        end
      end
    end
  end

  // ---------------- output packet: trim above the last instruction ----------------
  logic [W-1:0] rem_next;
  always_comb begin
    int top;
    top = -1;
    for (int s = 0; s < W; s++) if (st[s] == S_INST) top = s;
    for (int s = 0; s < W; s++) begin
      out_slot[s]       = '0;
      out_slot[s].fu    = sfu[s];
      if (s <= top) begin
        out_slot[s].valid = 1'b1;
        out_slot[s].nop   = (st[s] != S_INST);
        if (st[s] == S_INST) out_slot[s].rec = src_rec[ssrc[s]];
      end
    end
    rem_next     = src_mask & ~placed;
    out_valid    = src_valid && (src_mask != '0);
    out_split    = (rem_next != '0);
    out_fallback = fallback;
  end

  assign in_ready = !busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      rem_q  <= '0;
    end else begin
      if (!busy_q && in_valid) begin
        for (int i = 0; i < W; i++) rec_q[i] <= in_rec[i];
        if (out_ready && rem_next == '0) begin
          busy_q <= 1'b0;
        end else begin
          busy_q <= 1'b1;
          rem_q  <= out_ready ? rem_next : in_mask;
        end
      end else if (busy_q && out_ready) begin
        rem_q <= rem_next;
        if (rem_next == '0) busy_q <= 1'b0;
      end
    end
  end

  // every output packet carries at least one real instruction
  a_progress: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid |-> placed != '0);

endmodule
