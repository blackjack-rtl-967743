// trail_fetch: trailing-thread fetch queue and fetch stage.
//
// Safe-shuffle drops its packets into this queue, so the queue holds the
// leading thread's committed instructions in leading issue order across
// packets and in shuffled order within one. The trailing thread fetches at
// most one packet per cycle, even if it is narrower than the fetch width:
// slot s of the packet is presented on frontend way s, which is exactly the
// mapping safe-shuffle planned for; fetching two packets together would move
// instructions onto other ways. Fetch also respects the slack: a packet is
// fetched only while the trailing thread is at least SLACK instructions
// behind the leading thread's commit, unless drain is set (end of program,
// or a context switch), in which case the remaining packets flow freely.
//
// Interface: in_* valid/ready from shuffle; lead_commit_n is the number of
// leading instructions committed this cycle; out_* valid/ready toward the
// trailing rename stage; slack_stall tells that a packet waits only for the
// slack. Timing: a packet written in cycle t can be fetched in t+1.
//
// Follows the document: one packet per cycle, direct slot-to-way mapping,
// slack of 256 instructions. This design's choices: queue depth, counting
// the slack in real (non-NOP) instructions, and the drain input.
module trail_fetch
  import bj_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned SLACK = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  tslot_t               in_slot [W],
  output logic                 in_ready,
  input  logic [$clog2(W):0]   lead_commit_n,
  input  logic                 drain,
  output logic                 out_valid,
  output tslot_t               out_slot [W],
  input  logic                 out_ready,
  output logic                 slack_stall
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;

  tslot_t      q [DEPTH][W];
  ptr_t        rd_q, wr_q;
  logic [AW:0] cnt_q;
  logic [31:0] gap_q;   // leading commits not yet fetched by the trailing thread

  logic        fire_in, fire_out, head_ok;
  logic [$clog2(W):0] n_real;

  always_comb begin
    n_real = '0;
    for (int s = 0; s < W; s++) begin
      out_slot[s] = q[rd_q][s];
      if (q[rd_q][s].valid && !q[rd_q][s].nop) n_real++;
    end
    head_ok     = (gap_q >= SLACK) || drain;
    out_valid   = (cnt_q != 0) && head_ok;
    slack_stall = (cnt_q != 0) && !head_ok;
    in_ready    = (cnt_q != (AW+1)'(DEPTH));
    fire_in     = in_valid && in_ready;
    fire_out    = out_valid && out_ready;
  end

  always_ff @(posedge clk) begin
    if (fire_in) for (int s = 0; s < W; s++) q[wr_q][s] <= in_slot[s];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      gap_q <= '0;
    end else begin
      if (fire_in)  wr_q <= ptr_t'(wr_q + 1'b1);
      if (fire_out) rd_q <= ptr_t'(rd_q + 1'b1);
      cnt_q <= cnt_q + (AW+1)'(fire_in) - (AW+1)'(fire_out);
      gap_q <= gap_q + 32'(lead_commit_n) - (fire_out ? 32'(n_real) : 32'd0);
    end
  end
endmodule
