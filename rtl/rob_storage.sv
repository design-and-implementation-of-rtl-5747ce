// rob_storage: the entry array of the reorder buffer (rob_array).
//
// ROB_DEPTH entries, each holding one in-flight instruction:
//   valid      - entry allocated and not yet committed or discarded
//   ready      - the execution result has been written back
//   except     - the instruction raised an exception
//   is_branch  - the instruction is a branch
//   taken      - actual branch direction, written back with the result
//   rd_phy     - destination physical register
//   pc         - instruction address
//   result     - execution result
//
// Allocation (WAYS ports): a port writes pc, rd_phy and is_branch into entry
// alloc_idx and sets valid = 1, ready = 0. Write-back (PORTS ports): a port
// writes result, taken and except into entry wb_idx and sets ready = 1, but
// only if that entry is valid; write-backs to free entries are dropped. The
// clear mask discards entries (commit, flush or exception) and wins over a
// write-back to the same entry in the same cycle. All updates take effect at
// the next rising clock edge; the contents are visible on the outputs at all
// times. The caller guarantees that allocation ports name distinct free
// entries and that granted write-back ports name distinct entries.
//
// Reset is asynchronous and active low and clears every field of every entry,
// as the buffer's description states. The field list follows the description;
// dropping write-backs to free entries is this design's choice.
module rob_storage #(
  parameter int DATA_WIDTH   = rob_pkg::DEF_DATA_WIDTH,
  parameter int ROB_DEPTH    = rob_pkg::DEF_ROB_DEPTH,
  parameter int PTR_WIDTH    = $clog2(ROB_DEPTH),
  parameter int REG_ADDR_WID = rob_pkg::DEF_REG_ADDR_WID,
  parameter int PC_WIDTH     = rob_pkg::DEF_PC_WIDTH,
  parameter int WAYS         = rob_pkg::DEF_WAYS,
  parameter int PORTS        = rob_pkg::DEF_WAYS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // allocation
  input  logic [WAYS-1:0]         alloc_en,
  input  logic [PTR_WIDTH-1:0]    alloc_idx       [WAYS],
  input  logic [PC_WIDTH-1:0]     alloc_pc        [WAYS],
  input  logic [REG_ADDR_WID-1:0] alloc_rd_phy    [WAYS],
  input  logic [WAYS-1:0]         alloc_is_branch,
  // write-back
  input  logic [PORTS-1:0]        wb_en,
  input  logic [PTR_WIDTH-1:0]    wb_idx          [PORTS],
  input  logic [DATA_WIDTH-1:0]   wb_result       [PORTS],
  input  logic [PORTS-1:0]        wb_taken,
  input  logic [PORTS-1:0]        wb_except,
  // discard
  input  logic [ROB_DEPTH-1:0]    clr_mask,
  // contents
  output logic [ROB_DEPTH-1:0]    ent_valid,
  output logic [ROB_DEPTH-1:0]    ent_ready,
  output logic [ROB_DEPTH-1:0]    ent_except,
  output logic [ROB_DEPTH-1:0]    ent_is_branch,
  output logic [ROB_DEPTH-1:0]    ent_taken,
  output logic [REG_ADDR_WID-1:0] ent_rd_phy      [ROB_DEPTH],
  output logic [PC_WIDTH-1:0]     ent_pc          [ROB_DEPTH],
  output logic [DATA_WIDTH-1:0]   ent_result      [ROB_DEPTH]
);

  for (genvar e = 0; e < ROB_DEPTH; e++) begin : g_entry
    logic                    alloc_hit, wb_hit;
    logic [PC_WIDTH-1:0]     a_pc;
    logic [REG_ADDR_WID-1:0] a_rd;
    logic                    a_br;
    logic [DATA_WIDTH-1:0]   w_res;
    logic                    w_tk, w_ex;

    // Select the allocation and write-back port aimed at this entry.
    always_comb begin
      alloc_hit = 1'b0;
      a_pc      = '0;
      a_rd      = '0;
      a_br      = 1'b0;
      for (int i = 0; i < WAYS; i++)
        if (alloc_en[i] && alloc_idx[i] == PTR_WIDTH'(e)) begin
          alloc_hit = 1'b1;
          a_pc      = alloc_pc[i];
          a_rd      = alloc_rd_phy[i];
          a_br      = alloc_is_branch[i];
        end
      wb_hit = 1'b0;
      w_res  = '0;
      w_tk   = 1'b0;
      w_ex   = 1'b0;
      for (int p = 0; p < PORTS; p++)
        if (wb_en[p] && wb_idx[p] == PTR_WIDTH'(e)) begin
          wb_hit = 1'b1;
          w_res  = wb_result[p];
          w_tk   = wb_taken[p];
          w_ex   = wb_except[p];
        end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ent_valid[e]     <= 1'b0;
        ent_ready[e]     <= 1'b0;
        ent_except[e]    <= 1'b0;
        ent_is_branch[e] <= 1'b0;
        ent_taken[e]     <= 1'b0;
        ent_rd_phy[e]    <= '0;
        ent_pc[e]        <= '0;
        ent_result[e]    <= '0;
      end else if (clr_mask[e]) begin
        ent_valid[e] <= 1'b0;
        ent_ready[e] <= 1'b0;
      end else if (alloc_hit) begin
        ent_valid[e]     <= 1'b1;
        ent_ready[e]     <= 1'b0;
        ent_except[e]    <= 1'b0;
        ent_taken[e]     <= 1'b0;
        ent_is_branch[e] <= a_br;
        ent_rd_phy[e]    <= a_rd;
        ent_pc[e]        <= a_pc;
      end else if (wb_hit && ent_valid[e]) begin
        ent_ready[e]  <= 1'b1;
        ent_result[e] <= w_res;
        ent_taken[e]  <= w_tk;
        ent_except[e] <= w_ex;
      end
    end
  end

endmodule
