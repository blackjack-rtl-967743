// lvq: Load Value Queue.
//
// Only the leading thread accesses the data cache. When a leading load
// commits it leaves its address and loaded value here, so the trailing copy
// of the load needs no cache access, never misses, and sees the same value
// even if another agent changed memory in between. Because the trailing
// thread runs in leading issue order, its loads do not come in program
// order; each trailing load therefore reads the entry named by its virtual
// LVQ index (handed out by the DTQ at leading commit) and compares its own
// address with the leading one: a difference is an error. Entries are freed
// in program order as trailing loads commit.
//
// Interface: wr_* up to W leading load commits per cycle, in program order
// (entry = tail); wr_ready is low when W more would not fit and the leading
// commit must wait. rd_* is one combinational lookup; rd_hit says the
// index is live. free_n trailing loads committed this cycle.
//
// Follows the document for its role and depth (128). This design's choices:
// lookup by virtual index, the address check on lookup, and a power-of-two
// depth (the physical entry is the low bits of the virtual index).
module lvq
  import bj_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         wr_valid,
  input  word_t                wr_addr [W],
  input  word_t                wr_data [W],
  output logic                 wr_ready,
  input  logic                 rd_valid,
  input  vidx_t                rd_v,
  input  word_t                rd_addr,
  output word_t                rd_data,
  output logic                 rd_hit,
  output logic                 rd_err,
  input  logic [$clog2(W):0]   free_n,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t       addr_q [DEPTH];
  word_t       data_q [DEPTH];
  vidx_t       head_v_q, tail_v_q;

  vidx_t       off;
  always_comb begin
    count    = (AW+1)'(tail_v_q - head_v_q);
    wr_ready = (int'(count) + W <= DEPTH);
    off      = rd_v - head_v_q;
    rd_hit   = off < vidx_t'(count);
    rd_data  = data_q[rd_v[AW-1:0]];
    rd_err   = rd_valid && (!rd_hit || addr_q[rd_v[AW-1:0]] != rd_addr);
  end

  int unsigned n_wr;
  always_comb begin
    n_wr = 0;
    for (int i = 0; i < W; i++) if (wr_valid[i]) n_wr++;
  end

  always_ff @(posedge clk) begin
    if (wr_ready) begin
      for (int i = 0, k = 0; i < W; i++) if (wr_valid[i]) begin
        addr_q[AW'(tail_v_q + vidx_t'(k))] <= wr_addr[i];
        data_q[AW'(tail_v_q + vidx_t'(k))] <= wr_data[i];
        k++;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_v_q <= '0;
      tail_v_q <= '0;
    end else begin
      if (wr_ready) tail_v_q <= tail_v_q + vidx_t'(n_wr);
      head_v_q <= head_v_q + vidx_t'(free_n);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   int'(free_n) <= int'(count));
endmodule
