// rob: 4-way reorder buffer for an out-of-order superscalar pipeline.
//
// Instructions enter in program order, up to WAYS per cycle, and each takes
// the next free entry of a circular buffer of ROB_DEPTH entries. They finish
// out of order: up to PORTS execution units write results back to the entries
// they name. They leave in program order: each cycle up to WAYS completed
// entries at the head commit and their destination register, result and PC
// go to the register-file side. Until it commits, a result can be forwarded
// from the buffer to an execution unit that needs it as an operand. A
// mispredicted branch discards every younger entry; an exception discards the
// whole buffer once the excepting instruction reaches the head.
//
// Structure (all inside this module):
//   rob_issue_arb   launch arbitration: how many issue lanes fit
//   rob_exec_arb    write-back arbitration, port 0 > 1 > 2 > 3
//   rob_ptr_mgmt    read/write pointers, used count, full / almost-full
//   rob_storage     the entry array
//   rob_commit_sel  which head entries commit this cycle
//   rob_fwd         operand forwarding for rs1 / rs2
//   rob_flush_mask  entries discarded by a branch flush
// plus the registered commit, branch-feedback and exception outputs and the
// debug and status outputs, which are wired straight from the state.
//
// Timing (one clock, asynchronous active-low reset):
//   issue      - rob_issue_ack / rob_issue_ptr are combinational in the issue
//                cycle; the entries are valid from the next cycle.
//   write-back - rob_exec_ack is combinational; ready is set next cycle.
//   commit     - entries ready in cycle t commit at the edge ending t; the
//                commit_* outputs are registered and show them during t+1.
//   branch     - when a committed group holds a branch, rob_branch_* report
//                its PC and actual direction during t+1, with the commit.
//   flush      - bp_flush_vld in cycle t clears the younger entries at the end
//                of t; issue and commit are held for that cycle.
//   exception  - an excepting entry at the head in cycle t empties the buffer
//                at the end of t; rob_except_* report it during t+1. It wins
//                over a flush in the same cycle, being older than any branch.
//   forwarding - rob_exec_data1/2 are combinational on the current contents.
//
// Following the description of this buffer: the parameters and their
// defaults, the port groups (control, issue, write-back, branch flush,
// forwarding, commit, debug), count-then-compare issue arbitration with
// lane-0-first partial acceptance, fixed-priority write-back arbitration,
// commit of up to four ready entries from the read pointer, clearing of the
// entries after bp_flush_ptr with the write pointer set to bp_flush_ptr + 1,
// branch feedback from the committing branch, and the debug outputs.
// This design's own choices: the read pointer is kept on a flush (so older
// entries still commit), the used count is a register, at most one branch
// commits per cycle, exceptions are taken at the head and discard all
// entries, the acknowledge / allocated-pointer outputs and the status and
// exception outputs.
module rob
  import rob_pkg::*;
#(
  parameter int DATA_WIDTH   = DEF_DATA_WIDTH,
  parameter int ROB_DEPTH    = DEF_ROB_DEPTH,
  parameter int PTR_WIDTH    = $clog2(ROB_DEPTH),
  parameter int REG_ADDR_WID = DEF_REG_ADDR_WID,
  parameter int PC_WIDTH     = DEF_PC_WIDTH,
  parameter int WAYS         = DEF_WAYS,   // issue and commit lanes
  parameter int PORTS        = DEF_WAYS,   // write-back ports
  parameter int AF_FREE      = WAYS,       // almost full below this many free
  localparam int CNT_W       = PTR_WIDTH + 1,
  localparam int NW          = $clog2(WAYS + 1)
) (
  // control
  input  logic                    clk,
  input  logic                    rst_n,
  // instruction issue
  input  logic                    issue_vld,
  input  logic [WAYS-1:0]         issue_inst_vld,
  input  logic [PC_WIDTH-1:0]     issue_inst_pc        [WAYS],
  input  logic [REG_ADDR_WID-1:0] issue_inst_rd_phy    [WAYS],
  input  logic [WAYS-1:0]         issue_inst_is_branch,
  output logic [WAYS-1:0]         rob_issue_ack,
  output logic [PTR_WIDTH-1:0]    rob_issue_ptr        [WAYS],
  // execution write-back
  input  logic [PORTS-1:0]        exec_vld,
  input  logic [PTR_WIDTH-1:0]    exec_rob_ptr         [PORTS],
  input  logic [DATA_WIDTH-1:0]   exec_result          [PORTS],
  input  logic [PORTS-1:0]        exec_branch_taken,
  input  logic [PORTS-1:0]        exec_except,
  output logic [PORTS-1:0]        rob_exec_ack,
  // branch flush
  input  logic                    bp_flush_vld,
  input  logic [PTR_WIDTH-1:0]    bp_flush_ptr,
  // data forwarding
  input  logic [REG_ADDR_WID-1:0] exec_rs1_phy,
  input  logic [REG_ADDR_WID-1:0] exec_rs2_phy,
  output logic [DATA_WIDTH-1:0]   rob_exec_data1,
  output logic [DATA_WIDTH-1:0]   rob_exec_data2,
  output logic                    rob_exec_data1_vld,
  output logic                    rob_exec_data2_vld,
  // commit
  output logic [WAYS-1:0]         commit_vld,
  output logic [NW-1:0]           commit_cnt,
  output logic [REG_ADDR_WID-1:0] commit_rd_phy        [WAYS],
  output logic [DATA_WIDTH-1:0]   commit_result        [WAYS],
  output logic [PC_WIDTH-1:0]     commit_pc            [WAYS],
  // branch predictor feedback
  output logic                    rob_branch_update_vld,
  output logic [PC_WIDTH-1:0]     rob_branch_pc,
  output logic                    rob_branch_taken,
  // exception report
  output logic                    rob_except_vld,
  output logic [PC_WIDTH-1:0]     rob_except_pc,
  // status
  output logic                    rob_full,
  output logic                    rob_almost_full,
  output logic                    rob_empty,
  output logic [CNT_W-1:0]        rob_used_cnt,
  // debug
  output logic [ROB_DEPTH-1:0]    dbg_rob_valid,
  output logic [ROB_DEPTH-1:0]    dbg_rob_ready,
  output logic [PTR_WIDTH-1:0]    dbg_write_ptr,
  output logic [PTR_WIDTH-1:0]    dbg_read_ptr
);

  // ---------------------------------------------------------------- state
  logic [PTR_WIDTH-1:0]    write_ptr, read_ptr, next_write_ptr, read_ptr_next;
  logic [CNT_W-1:0]        used_cnt, free_cnt;
  logic                    full, almost_full, empty;

  logic [ROB_DEPTH-1:0]    ent_valid, ent_ready, ent_except, ent_is_branch, ent_taken;
  logic [REG_ADDR_WID-1:0] ent_rd_phy [ROB_DEPTH];
  logic [PC_WIDTH-1:0]     ent_pc     [ROB_DEPTH];
  logic [DATA_WIDTH-1:0]   ent_result [ROB_DEPTH];

  // ---------------------------------------------------------------- head window
  logic [PTR_WIDTH-1:0] head_idx [WAYS];
  logic [WAYS-1:0]      slot_valid, slot_ready, slot_except, slot_is_branch;

  always_comb begin
    for (int k = 0; k < WAYS; k++) begin
      head_idx[k]       = PTR_WIDTH'(ptr_add(int'(read_ptr), k, ROB_DEPTH));
      slot_valid[k]     = ent_valid[head_idx[k]];
      slot_ready[k]     = ent_ready[head_idx[k]];
      slot_except[k]    = ent_except[head_idx[k]];
      slot_is_branch[k] = ent_is_branch[head_idx[k]];
    end
  end

  // ---------------------------------------------------------------- commit / exception / flush
  logic [WAYS-1:0]         cm_mask;
  logic [NW-1:0]           cm_cnt;
  logic                    except_take;
  logic                    cm_br_vld;
  logic [$clog2(WAYS)-1:0] cm_br_slot;
  logic                    flush_ok, flush_do;
  logic [ROB_DEPTH-1:0]    flush_mask;
  logic [CNT_W-1:0]        flush_cnt;

  rob_flush_mask #(.ROB_DEPTH(ROB_DEPTH), .PTR_WIDTH(PTR_WIDTH)) u_flush (
    .flush_vld (bp_flush_vld),
    .flush_ptr (bp_flush_ptr),
    .read_ptr  (read_ptr),
    .used_cnt  (used_cnt),
    .flush_ok  (flush_ok),
    .flush_mask(flush_mask),
    .flush_cnt (flush_cnt)
  );

  // Commit is held in a flush cycle. An exception at the head is taken even
  // then, being older than the branch.
  rob_commit_sel #(.WAYS(WAYS)) u_commit (
    .enable        (!flush_ok),
    .slot_valid    (slot_valid),
    .slot_ready    (slot_ready),
    .slot_except   (slot_except),
    .slot_is_branch(slot_is_branch),
    .commit_mask   (cm_mask),
    .commit_cnt    (cm_cnt),
    .except_take   (except_take),
    .branch_vld    (cm_br_vld),
    .branch_slot   (cm_br_slot)
  );

  assign flush_do    = flush_ok && !except_take;

  // ---------------------------------------------------------------- issue
  logic [WAYS-1:0]         acc;
  logic [NW-1:0]           acc_cnt, valid_cnt;
  logic [$clog2(WAYS)-1:0] slot_off [WAYS];

  rob_issue_arb #(.WAYS(WAYS), .CNT_W(CNT_W)) u_issue_arb (
    .issue_vld (issue_vld),
    .lane_vld  (issue_inst_vld),
    .free_cnt  (free_cnt),
    .block     (flush_ok || except_take),
    .accept    (acc),
    .valid_cnt (valid_cnt),
    .accept_cnt(acc_cnt),
    .slot_off  (slot_off)
  );

  always_comb
    for (int i = 0; i < WAYS; i++)
      rob_issue_ptr[i] = PTR_WIDTH'(ptr_add(int'(write_ptr), int'(slot_off[i]), ROB_DEPTH));
  assign rob_issue_ack = acc;

  // ---------------------------------------------------------------- write-back
  logic [PORTS-1:0] wb_grant;

  rob_exec_arb #(.PORTS(PORTS), .PTR_WIDTH(PTR_WIDTH)) u_exec_arb (
    .exec_vld    (exec_vld),
    .exec_rob_ptr(exec_rob_ptr),
    .grant       (wb_grant)
  );

  // A result is taken when it wins arbitration and its entry is in flight.
  always_comb
    for (int p = 0; p < PORTS; p++)
      rob_exec_ack[p] = wb_grant[p] && ent_valid[exec_rob_ptr[p]];

  // ---------------------------------------------------------------- pointers
  rob_ptr_mgmt #(.ROB_DEPTH(ROB_DEPTH), .PTR_WIDTH(PTR_WIDTH), .WAYS(WAYS),
                 .AF_FREE(AF_FREE)) u_ptr (
    .clk           (clk),
    .rst_n         (rst_n),
    .alloc_cnt     (acc_cnt),
    .commit_cnt    (cm_cnt),
    .flush_vld     (flush_do),
    .flush_ptr     (bp_flush_ptr),
    .clear_all     (except_take),
    .write_ptr     (write_ptr),
    .read_ptr      (read_ptr),
    .next_write_ptr(next_write_ptr),
    .read_ptr_next (read_ptr_next),
    .used_cnt      (used_cnt),
    .free_cnt      (free_cnt),
    .full          (full),
    .almost_full   (almost_full),
    .empty         (empty)
  );

  // ---------------------------------------------------------------- storage
  logic [ROB_DEPTH-1:0] clr_mask;

  always_comb begin
    if (except_take) clr_mask = '1;
    else begin
      clr_mask = flush_do ? flush_mask : '0;
      for (int k = 0; k < WAYS; k++)
        if (cm_mask[k]) clr_mask[head_idx[k]] = 1'b1;
    end
  end

  rob_storage #(.DATA_WIDTH(DATA_WIDTH), .ROB_DEPTH(ROB_DEPTH), .PTR_WIDTH(PTR_WIDTH),
                .REG_ADDR_WID(REG_ADDR_WID), .PC_WIDTH(PC_WIDTH), .WAYS(WAYS),
                .PORTS(PORTS)) u_store (
    .clk            (clk),
    .rst_n          (rst_n),
    .alloc_en       (acc),
    .alloc_idx      (rob_issue_ptr),
    .alloc_pc       (issue_inst_pc),
    .alloc_rd_phy   (issue_inst_rd_phy),
    .alloc_is_branch(issue_inst_is_branch),
    .wb_en          (wb_grant),
    .wb_idx         (exec_rob_ptr),
    .wb_result      (exec_result),
    .wb_taken       (exec_branch_taken),
    .wb_except      (exec_except),
    .clr_mask       (clr_mask),
    .ent_valid      (ent_valid),
    .ent_ready      (ent_ready),
    .ent_except     (ent_except),
    .ent_is_branch  (ent_is_branch),
    .ent_taken      (ent_taken),
    .ent_rd_phy     (ent_rd_phy),
    .ent_pc         (ent_pc),
    .ent_result     (ent_result)
  );

  // ---------------------------------------------------------------- forwarding
  logic [REG_ADDR_WID-1:0] fwd_src  [2];
  logic [DATA_WIDTH-1:0]   fwd_data [2];
  logic [1:0]              fwd_vld;

  assign fwd_src[0] = exec_rs1_phy;
  assign fwd_src[1] = exec_rs2_phy;

  rob_fwd #(.DATA_WIDTH(DATA_WIDTH), .ROB_DEPTH(ROB_DEPTH), .PTR_WIDTH(PTR_WIDTH),
            .REG_ADDR_WID(REG_ADDR_WID), .NSRC(2)) u_fwd (
    .read_ptr  (read_ptr),
    .ent_valid (ent_valid),
    .ent_ready (ent_ready),
    .ent_rd_phy(ent_rd_phy),
    .ent_result(ent_result),
    .src_phy   (fwd_src),
    .data      (fwd_data),
    .data_vld  (fwd_vld)
  );

  assign rob_exec_data1     = fwd_data[0];
  assign rob_exec_data2     = fwd_data[1];
  assign rob_exec_data1_vld = fwd_vld[0];
  assign rob_exec_data2_vld = fwd_vld[1];

  // ---------------------------------------------------------------- registered outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      commit_vld            <= '0;
      commit_cnt            <= '0;
      rob_branch_update_vld <= 1'b0;
      rob_branch_pc         <= '0;
      rob_branch_taken      <= 1'b0;
      rob_except_vld        <= 1'b0;
      rob_except_pc         <= '0;
      for (int k = 0; k < WAYS; k++) begin
        commit_rd_phy[k] <= '0;
        commit_result[k] <= '0;
        commit_pc[k]     <= '0;
      end
    end else begin
      commit_vld <= cm_mask;
      commit_cnt <= cm_cnt;
      for (int k = 0; k < WAYS; k++) begin
        commit_rd_phy[k] <= cm_mask[k] ? ent_rd_phy[head_idx[k]] : '0;
        commit_result[k] <= cm_mask[k] ? ent_result[head_idx[k]] : '0;
        commit_pc[k]     <= cm_mask[k] ? ent_pc[head_idx[k]]     : '0;
      end
      rob_branch_update_vld <= cm_br_vld;
      rob_branch_pc         <= cm_br_vld ? ent_pc[head_idx[cm_br_slot]] : '0;
      rob_branch_taken      <= cm_br_vld && ent_taken[head_idx[cm_br_slot]];
      rob_except_vld        <= except_take;
      rob_except_pc         <= except_take ? ent_pc[head_idx[0]] : '0;
    end
  end

  // ---------------------------------------------------------------- status and debug
  assign rob_full        = full;
  assign rob_almost_full = almost_full;
  assign rob_empty       = empty;
  assign rob_used_cnt    = used_cnt;
  assign dbg_rob_valid   = ent_valid;
  assign dbg_rob_ready   = ent_ready;
  assign dbg_write_ptr   = write_ptr;
  assign dbg_read_ptr    = read_ptr;

  // ---------------------------------------------------------------- rules
  // The occupancy never exceeds the depth, and the valid bits agree with it.
  a_used_le_depth: assert property (@(posedge clk) disable iff (!rst_n)
    used_cnt <= CNT_W'(ROB_DEPTH));
  a_valid_count: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(ent_valid) == int'(used_cnt));
  // Nothing commits while a flush is being applied.
  a_no_commit_in_flush: assert property (@(posedge clk) disable iff (!rst_n)
    flush_ok |-> cm_cnt == '0);
  // The head entry commits before any younger one.
  a_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    cm_cnt != '0 |-> cm_mask[0]);

endmodule
