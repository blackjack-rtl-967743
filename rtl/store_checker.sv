// store_checker: store buffer with leading/trailing store comparison.
//
// A committed leading store does not go to memory at once: it waits in the
// store buffer for the trailing copy. When the trailing store commits, the
// two are compared; equal address and data release the store to the memory
// hierarchy, a difference (or a trailing store with no leading store
// waiting) is a detected error and the store is withheld. Register results
// are never compared: a wrong value shows up in a later store anyway. Both
// threads commit in program order, so the buffer is a FIFO matched at its
// head.
//
// Interface: ld_* up to W leading stores per cycle (ld_ready low when W more
// would not fit: leading commit must wait); tr_* up to W trailing stores per
// cycle, lanes in program order; mem_* the released stores, same lanes as
// tr_*; st_err pulses on a mismatch. Timing: the comparison is
// combinational, stores leave in the cycle their trailing copy commits.
//
// Follows the document (SRT's store check, 64-entry buffer). This design's
// choice: a mismatched store is dropped and not written.
module store_checker
  import bj_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         ld_valid,
  input  word_t                ld_addr [W],
  input  word_t                ld_data [W],
  output logic                 ld_ready,
  input  logic [W-1:0]         tr_valid,
  input  word_t                tr_addr [W],
  input  word_t                tr_data [W],
  output logic [W-1:0]         mem_valid,
  output word_t                mem_addr [W],
  output word_t                mem_data [W],
  output logic                 st_err,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;

  word_t       addr_q [DEPTH];
  word_t       data_q [DEPTH];
  ptr_t        head_q, tail_q;
  logic [AW:0] cnt_q;

  int unsigned n_ld, n_tr;
  always_comb begin
    ld_ready = (int'(cnt_q) + W <= DEPTH);
    n_ld = 0;
    for (int i = 0; i < W; i++) if (ld_valid[i]) n_ld++;
    n_tr   = 0;
    st_err = 1'b0;
    for (int i = 0; i < W; i++) begin
      mem_valid[i] = 1'b0;
      mem_addr[i]  = addr_q[ptr_t'(head_q + ptr_t'(n_tr))];
      mem_data[i]  = data_q[ptr_t'(head_q + ptr_t'(n_tr))];
      if (tr_valid[i]) begin
        if (n_tr < int'(cnt_q) && mem_addr[i] == tr_addr[i] && mem_data[i] == tr_data[i])
          mem_valid[i] = 1'b1;
        else
          st_err = 1'b1;
        if (n_tr < int'(cnt_q)) n_tr++;
      end
    end
  end
  assign count = cnt_q;

  always_ff @(posedge clk) begin
    if (ld_ready) begin
      for (int i = 0, k = 0; i < W; i++) if (ld_valid[i]) begin
        addr_q[ptr_t'(tail_q + ptr_t'(k))] <= ld_addr[i];
        data_q[ptr_t'(tail_q + ptr_t'(k))] <= ld_data[i];
        k++;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (ld_ready) tail_q <= ptr_t'(tail_q + ptr_t'(n_ld));
      head_q <= ptr_t'(head_q + ptr_t'(n_tr));
      cnt_q  <= cnt_q + (ld_ready ? (AW+1)'(n_ld) : '0) - (AW+1)'(n_tr);
    end
  end
endmodule
