// rob_issue_arb: launch (issue-port) arbitration of the reorder buffer.
//
// Each cycle the front end offers up to WAYS instructions: a group strobe
// issue_vld plus one valid bit per lane. The arbiter counts the valid lanes
// (valid_cnt) and compares that with the number of free entries. If the whole
// group fits, every valid lane is accepted (accept == lane_vld). Otherwise the
// lanes are accepted in priority order, lane 0 first, until the free entries
// are used up; the remaining lanes are refused and must be offered again.
// Accepted lanes are packed: the k-th accepted lane (counting from lane 0)
// gets slot offset k from the write pointer, so a group with holes in its
// valid mask still fills consecutive entries.
//
// Purely combinational. 'block' refuses the whole group; the buffer raises it
// in a cycle in which it flushes. The count-then-compare structure and the
// lane-0-first partial acceptance follow the description of the buffer; the
// packing of lanes with holes and the 'block' input are this design's choices.
module rob_issue_arb #(
  parameter int WAYS  = rob_pkg::DEF_WAYS,
  parameter int CNT_W = $clog2(rob_pkg::DEF_ROB_DEPTH) + 1
) (
  input  logic                      issue_vld,   // group strobe
  input  logic [WAYS-1:0]           lane_vld,    // per-lane valid
  input  logic [CNT_W-1:0]          free_cnt,    // free entries this cycle
  input  logic                      block,       // refuse everything
  output logic [WAYS-1:0]           accept,      // lanes written this cycle
  output logic [$clog2(WAYS+1)-1:0] valid_cnt,   // lanes offered
  output logic [$clog2(WAYS+1)-1:0] accept_cnt,  // lanes accepted
  output logic [$clog2(WAYS)-1:0]   slot_off [WAYS] // entry offset per lane
);

  localparam int NW = $clog2(WAYS + 1);

  always_comb begin
    logic [NW-1:0] taken;
    valid_cnt  = '0;
    accept     = '0;
    accept_cnt = '0;
    taken      = '0;
    for (int i = 0; i < WAYS; i++) begin
      slot_off[i] = '0;
      if (issue_vld && lane_vld[i]) valid_cnt = valid_cnt + NW'(1);
    end
    if (issue_vld && !block) begin
      if (CNT_W'(valid_cnt) <= free_cnt) begin
        accept = lane_vld;                       // the whole group fits
      end else begin
        for (int i = 0; i < WAYS; i++)           // lane 0 has priority
          if (lane_vld[i] && CNT_W'(taken) < free_cnt) begin
            accept[i] = 1'b1;
            taken     = taken + NW'(1);
          end
      end
    end
    for (int i = 0; i < WAYS; i++) begin
      slot_off[i] = accept_cnt[$clog2(WAYS)-1:0];
      if (accept[i]) accept_cnt = accept_cnt + NW'(1);
    end
  end

endmodule
