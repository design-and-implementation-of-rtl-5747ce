// rob_ptr_mgmt: pointer management of the reorder buffer.
//
// Holds the circular write pointer (next entry to allocate), the read pointer
// (oldest entry, the head) and the count of used entries. From them it derives
// the free count, the full and almost-full status and the next values of both
// pointers, which the rest of the buffer uses to place the next issue group.
//
// Per clock edge, in priority order:
//   clear_all  - the whole buffer is discarded (exception at the head): the
//                write pointer is set to the read pointer, the count to 0;
//   flush_vld  - every entry younger than flush_ptr is discarded: the write
//                pointer becomes flush_ptr + 1 and the count is recomputed
//                from the read pointer to flush_ptr, less this cycle's commits;
//   otherwise  - write pointer += alloc_cnt, read pointer += commit_cnt.
// The read pointer always advances by commit_cnt.
//
// The count is kept in a register of PTR_WIDTH+1 bits, so a full buffer and an
// empty one (both with equal pointers) are told apart; this replaces a count
// computed from the two pointers alone. A flush keeps the read pointer, so
// entries older than the branch still commit in order. rob_almost_full is set
// when fewer than AF_FREE entries are free (by default: fewer than one full
// issue group). Those three points are this design's choices. Reset is
// asynchronous and active low, as in the rest of the buffer.
module rob_ptr_mgmt #(
  parameter int ROB_DEPTH = rob_pkg::DEF_ROB_DEPTH,
  parameter int PTR_WIDTH = $clog2(ROB_DEPTH),
  parameter int WAYS      = rob_pkg::DEF_WAYS,
  parameter int AF_FREE   = WAYS,
  parameter int CNT_W     = PTR_WIDTH + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(WAYS+1)-1:0] alloc_cnt,
  input  logic [$clog2(WAYS+1)-1:0] commit_cnt,
  input  logic                     flush_vld,
  input  logic [PTR_WIDTH-1:0]     flush_ptr,
  input  logic                     clear_all,
  output logic [PTR_WIDTH-1:0]     write_ptr,
  output logic [PTR_WIDTH-1:0]     read_ptr,
  output logic [PTR_WIDTH-1:0]     next_write_ptr,
  output logic [PTR_WIDTH-1:0]     read_ptr_next,
  output logic [CNT_W-1:0]         used_cnt,
  output logic [CNT_W-1:0]         free_cnt,
  output logic                     full,
  output logic                     almost_full,
  output logic                     empty
);

  import rob_pkg::*;

  logic [CNT_W-1:0] used_next;

  always_comb begin
    read_ptr_next = PTR_WIDTH'(ptr_add(int'(read_ptr), int'(commit_cnt), ROB_DEPTH));
    if (clear_all) begin
      next_write_ptr = read_ptr_next;
      used_next      = '0;
    end else if (flush_vld) begin
      next_write_ptr = PTR_WIDTH'(ptr_add(int'(flush_ptr), 1, ROB_DEPTH));
      used_next      = CNT_W'(ptr_dist(int'(read_ptr), int'(flush_ptr), ROB_DEPTH) + 1)
                     - CNT_W'(commit_cnt);
    end else begin
      next_write_ptr = PTR_WIDTH'(ptr_add(int'(write_ptr), int'(alloc_cnt), ROB_DEPTH));
      used_next      = used_cnt + CNT_W'(alloc_cnt) - CNT_W'(commit_cnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      write_ptr <= '0;
      read_ptr  <= '0;
      used_cnt  <= '0;
    end else begin
      write_ptr <= next_write_ptr;
      read_ptr  <= read_ptr_next;
      used_cnt  <= used_next;
    end
  end

  assign free_cnt    = CNT_W'(ROB_DEPTH) - used_cnt;
  assign full        = (used_cnt == CNT_W'(ROB_DEPTH));
  assign almost_full = (free_cnt < CNT_W'(AF_FREE));
  assign empty       = (used_cnt == '0);

endmodule
