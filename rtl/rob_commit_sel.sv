// rob_commit_sel: commit decision of the reorder buffer.
//
// Looks at the WAYS oldest entries (slot 0 is the head, at the read pointer)
// and picks the ones that leave the buffer this cycle. Walking from slot 0, an
// entry commits while it is valid, ready and free of an exception; the walk
// stops at the first entry that is not, so commits are always a run of the
// oldest entries and never skip one. A branch ends the run after itself, so at
// most one branch commits per cycle and each committed branch can report its
// outcome to the predictor (branch_slot tells which slot holds it).
// An exception is taken only once the excepting entry is the head: except_take
// is then raised and nothing commits; the entries ahead of it have committed
// in earlier cycles. 'enable' low (during a flush) stops all commits but not
// the exception report, since the head is older than any flushing branch.
//
// Purely combinational. Committing up to four completed entries in order from
// the read pointer follows the description of the buffer; ending the run at a
// branch, and taking exceptions at the head, are this design's choices.
module rob_commit_sel #(
  parameter int WAYS = rob_pkg::DEF_WAYS
) (
  input  logic                      enable,
  input  logic [WAYS-1:0]           slot_valid,
  input  logic [WAYS-1:0]           slot_ready,
  input  logic [WAYS-1:0]           slot_except,
  input  logic [WAYS-1:0]           slot_is_branch,
  output logic [WAYS-1:0]           commit_mask,
  output logic [$clog2(WAYS+1)-1:0] commit_cnt,
  output logic                      except_take,
  output logic                      branch_vld,
  output logic [$clog2(WAYS)-1:0]   branch_slot
);

  always_comb begin
    logic go;
    go          = enable;
    commit_mask = '0;
    commit_cnt  = '0;
    branch_vld  = 1'b0;
    branch_slot = '0;
    except_take = slot_valid[0] && slot_ready[0] && slot_except[0];
    for (int k = 0; k < WAYS; k++) begin
      if (go && slot_valid[k] && slot_ready[k] && !slot_except[k]) begin
        commit_mask[k] = 1'b1;
        commit_cnt     = commit_cnt + 1'b1;
        if (slot_is_branch[k]) begin
          branch_vld  = 1'b1;
          branch_slot = k[$clog2(WAYS)-1:0];
          go          = 1'b0;
        end
      end else begin
        go = 1'b0;
      end
    end
  end

endmodule
