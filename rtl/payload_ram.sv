// payload_ram: issue-queue payload storage split by thread.
//
// Both copies of an instruction pass through the one, shared issue queue.
// Its wakeup and select logic is covered by other means (different broadcast
// buses per backend way, and the dependence check at commit), but a payload
// entry that corrupts its bits in a fixed way could give both copies the
// same wrong payload. The remedy is to keep a separate payload RAM for each
// of the two threads, so that the leading and the trailing copy can never
// share a payload entry.
//
// Interface: one write and one read port per thread (index = issue-queue
// entry). Timing: write at the clock edge, asynchronous read.
//
// Follows the document: two payload RAMs, one per thread, sized like the
// 32-entry issue queue. This design's choices: the port set and payload width.
module payload_ram #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned PW      = 64
) (
  input  logic                       clk,
  input  logic [1:0]                 wr_en,    // per thread: 0 leading, 1 trailing
  input  logic [$clog2(ENTRIES)-1:0] wr_idx  [2],
  input  logic [PW-1:0]              wr_data [2],
  input  logic [$clog2(ENTRIES)-1:0] rd_idx  [2],
  output logic [PW-1:0]              rd_data [2]
);
  logic [PW-1:0] lead_q  [ENTRIES];
  logic [PW-1:0] trail_q [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en[0]) lead_q[wr_idx[0]]  <= wr_data[0];
    if (wr_en[1]) trail_q[wr_idx[1]] <= wr_data[1];
  end

  assign rd_data[0] = lead_q[rd_idx[0]];
  assign rd_data[1] = trail_q[rd_idx[1]];
endmodule
