// rob_flush_mask: branch-flush range of the reorder buffer.
//
// When the branch unit reports a mispredicted branch (flush_vld) held in
// entry flush_ptr, every entry younger than that branch is on the wrong path
// and must be discarded; the branch itself stays and commits normally. This
// block turns the request into a per-entry mask. The occupied entries run
// from read_ptr for used_cnt entries; the entries after flush_ptr in that run
// are flushed. A request whose flush_ptr is not an occupied entry is ignored
// (flush_ok low), since it cannot name an instruction in flight.
//
// Purely combinational. Clearing the entries after flush_ptr follows the
// description of the buffer; checking that flush_ptr is occupied is this
// design's choice.
module rob_flush_mask #(
  parameter int ROB_DEPTH = rob_pkg::DEF_ROB_DEPTH,
  parameter int PTR_WIDTH = $clog2(ROB_DEPTH),
  parameter int CNT_W     = PTR_WIDTH + 1
) (
  input  logic                 flush_vld,
  input  logic [PTR_WIDTH-1:0] flush_ptr,
  input  logic [PTR_WIDTH-1:0] read_ptr,
  input  logic [CNT_W-1:0]     used_cnt,
  output logic                 flush_ok,
  output logic [ROB_DEPTH-1:0] flush_mask,
  output logic [CNT_W-1:0]     flush_cnt
);

  import rob_pkg::*;

  always_comb begin
    int unsigned age;     // position of the branch counted from the head
    int unsigned after;   // occupied entries younger than the branch
    int unsigned d;
    age       = ptr_dist(int'(read_ptr), int'(flush_ptr), ROB_DEPTH);
    flush_ok  = flush_vld && (age < int'(used_cnt));
    after     = flush_ok ? int'(used_cnt) - age - 1 : 0;
    flush_cnt = CNT_W'(after);
    for (int e = 0; e < ROB_DEPTH; e++) begin
      d             = ptr_dist(int'(flush_ptr), e, ROB_DEPTH);
      flush_mask[e] = flush_ok && d >= 1 && d <= after;
    end
  end

endmodule
