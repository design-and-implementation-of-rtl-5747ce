// rob_fwd: data forwarding from the reorder buffer to the execution units.
//
// A completed instruction keeps its result in the buffer until it commits;
// until then the register file does not hold it, so an instruction that reads
// that physical register must take the value from the buffer. For each of
// NSRC source registers (rs1 and rs2 by default) this block searches the
// entries for one that is valid and names that register as its destination.
// The search runs in age order from the read pointer, so when several entries
// name the register the youngest one is used, being the latest write in
// program order. If that entry is also ready, its result is forwarded and
// data_vld is set; if it is not ready yet, data_vld stays low and the operand
// must wait.
//
// Purely combinational, on the current contents of the array. Forwarding the
// result of a valid, ready entry whose rd_phy matches follows the description
// of the buffer; choosing the youngest match, and withholding a stale older
// result while a younger writer is pending, are this design's choices.
module rob_fwd #(
  parameter int DATA_WIDTH   = rob_pkg::DEF_DATA_WIDTH,
  parameter int ROB_DEPTH    = rob_pkg::DEF_ROB_DEPTH,
  parameter int PTR_WIDTH    = $clog2(ROB_DEPTH),
  parameter int REG_ADDR_WID = rob_pkg::DEF_REG_ADDR_WID,
  parameter int NSRC         = 2
) (
  input  logic [PTR_WIDTH-1:0]    read_ptr,
  input  logic [ROB_DEPTH-1:0]    ent_valid,
  input  logic [ROB_DEPTH-1:0]    ent_ready,
  input  logic [REG_ADDR_WID-1:0] ent_rd_phy [ROB_DEPTH],
  input  logic [DATA_WIDTH-1:0]   ent_result [ROB_DEPTH],
  input  logic [REG_ADDR_WID-1:0] src_phy    [NSRC],
  output logic [DATA_WIDTH-1:0]   data       [NSRC],
  output logic [NSRC-1:0]         data_vld
);

  import rob_pkg::*;

  always_comb begin
    int unsigned e;
    for (int s = 0; s < NSRC; s++) begin
      data[s]     = '0;
      data_vld[s] = 1'b0;
      for (int k = 0; k < ROB_DEPTH; k++) begin
        e = ptr_add(int'(read_ptr), k, ROB_DEPTH);
        if (ent_valid[e] && ent_rd_phy[e] == src_phy[s]) begin
          data_vld[s] = ent_ready[e];
          data[s]     = ent_result[e];
        end
      end
      if (!data_vld[s]) data[s] = '0;
    end
  end

endmodule
