// commit_rename_check: dependence check at trailing commit.
//
// The trailing thread was renamed with dependence information borrowed from
// the leading thread (issue order and leading rename maps). A fault in that
// information would mislead both threads alike, so it is checked once more
// in program order with a second rename table, indexed by logical register
// and used only by the trailing thread. At commit each instruction looks up
// its logical sources and compares the trailing physical registers found
// there with the ones it actually read in execution; any difference is a
// dependence error. Its destination then installs its own trailing physical
// register (no new one is allocated), and the mapping it replaces is the
// register to free, since this table sees program order.
//
// Interface: up to W commits per cycle, lanes 0..n-1 in program order;
// free_valid/free_preg per lane; dep_err pulses in the cycle of a mismatch.
// A source written by an older lane of the same cycle is taken from that
// lane, as program order requires. Timing: combinational check, table
// written at the clock edge.
//
// Follows the document. This design's choices: W commits per cycle and the
// reset state (logical register r maps to trailing register NUM_LREGS + r).
module commit_rename_check
  import bj_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter int unsigned NUM_LREGS = N_LREGS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  c_valid,
  input  tal_static_t   c_ent [W],
  output logic [W-1:0]  free_valid,
  output preg_t         free_preg [W],
  output logic          dep_err
);
  preg_t rat_q [NUM_LREGS];
  preg_t rat_n [NUM_LREGS];

  always_comb begin
    for (int r = 0; r < NUM_LREGS; r++) rat_n[r] = rat_q[r];
    dep_err = 1'b0;
    for (int i = 0; i < W; i++) begin
      free_valid[i] = 1'b0;
      free_preg[i]  = '0;
      if (c_valid[i]) begin
        if (c_ent[i].has_src1 && rat_n[c_ent[i].lsrc1] != c_ent[i].tsrc1) dep_err = 1'b1;
        if (c_ent[i].has_src2 && rat_n[c_ent[i].lsrc2] != c_ent[i].tsrc2) dep_err = 1'b1;
        if (c_ent[i].has_dst) begin
          free_valid[i]         = 1'b1;
          free_preg[i]          = rat_n[c_ent[i].ldst];
          rat_n[c_ent[i].ldst]  = c_ent[i].tdst;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_LREGS; r++) rat_q[r] <= preg_t'(NUM_LREGS + r);
    end else begin
      for (int r = 0; r < NUM_LREGS; r++) rat_q[r] <= rat_n[r];
    end
  end
endmodule
