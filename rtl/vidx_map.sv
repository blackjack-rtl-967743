// vidx_map: virtual-to-physical index translation for the trailing active
// list and load/store queue.
//
// The trailing thread fetches in the leading thread's issue order, not in
// program order, yet its active-list and load/store-queue entries must sit in
// program order. Each instruction therefore carries a virtual index handed
// out at leading commit. Keeping the pair (virtual index, physical index) of
// the structure's head as a reference, an instruction whose virtual index is
// j past the head's is given the physical entry j places past the physical
// head; if j is not smaller than the structure's size the instruction must
// wait (the frontend stalls). Entries of instructions fetched early thus
// leave room in front of them for the ones still to come.
//
// Interface: purely combinational; head_v/head_p from the structure, v in,
// p and fits out. Virtual indices wrap at 2^VW, so at most 2^(VW-1)
// instructions may be between head and v.
//
// Follows the document exactly for the mapping and the stall rule; the
// virtual index width is this design's choice.
module vidx_map #(
  parameter int unsigned SIZE = 512,
  parameter int unsigned VW   = 16
) (
  input  logic [VW-1:0]            head_v,
  input  logic [$clog2(SIZE)-1:0]  head_p,
  input  logic [VW-1:0]            v,
  output logic [$clog2(SIZE)-1:0]  p,
  output logic                     fits
);
  localparam int unsigned PW = $clog2(SIZE);
  logic [VW-1:0] j;
  logic [PW:0]   sum;
  always_comb begin
    j    = v - head_v;
    fits = (j < VW'(SIZE));
    sum  = {1'b0, head_p} + (PW+1)'(j[PW-1:0]);
    if (sum >= (PW+1)'(SIZE)) sum = sum - (PW+1)'(SIZE);
    p    = sum[PW-1:0];
  end
endmodule
