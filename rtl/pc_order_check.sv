// pc_order_check: program-order check at trailing commit.
//
// The trailing thread does not fetch on its own; it takes the instructions
// the leading thread committed. A fault that made the leading thread commit
// a wrong, missing or extra instruction would be copied by the trailing
// thread, so at commit each PC is checked against the previous committed
// instruction: after a taken branch the next PC must be the branch target,
// otherwise the previous PC plus the instruction size. The branch outcome
// and target come from the trailing thread's own execution of the branch.
//
// Interface: up to W commits per cycle, lanes 0..n-1 in program order;
// pc_err pulses in the cycle of a wrong PC, err_lane names the first bad lane.
// Timing: combinational check, expected PC registered for the next cycle.
//
// Follows the document for the rule. This design's choices: 4-byte
// instructions, and the first commit after reset sets the starting PC.
module pc_order_check
  import bj_pkg::*;
#(
  parameter int unsigned W          = 4,
  parameter int unsigned INST_SIZE  = INST_BYTES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  c_valid,
  input  word_t         c_pc     [W],
  input  logic [W-1:0]  c_taken,
  input  word_t         c_target [W],
  output logic          pc_err,
  output logic [$clog2(W)-1:0] err_lane
);
  word_t exp_q;
  logic  started_q;
  word_t exp_n;
  logic  started_n;

  always_comb begin
    exp_n     = exp_q;
    started_n = started_q;
    pc_err    = 1'b0;
    err_lane  = '0;
    for (int i = 0; i < W; i++) begin
      if (c_valid[i]) begin
        if (started_n && c_pc[i] != exp_n && !pc_err) begin
          pc_err   = 1'b1;
          err_lane = $clog2(W)'(i);
        end
        exp_n     = c_taken[i] ? c_target[i] : c_pc[i] + word_t'(INST_SIZE);
        started_n = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      exp_q     <= '0;
      started_q <= 1'b0;
    end else begin
      exp_q     <= exp_n;
      started_q <= started_n;
    end
  end
endmodule
