// rob_pkg: constants and helpers shared by the reorder-buffer modules.
//
// The default sizes are those of the 4-way, 32-entry, 64-bit reorder buffer:
// data width 64, depth 32, 5-bit entry pointers, 5-bit physical register
// addresses and 64-bit PCs. The number of issue, write-back and commit lanes
// (4) follows from the 4-way pipeline the buffer serves. The almost-full
// threshold is this design's own choice.
//
// ptr_add() advances a circular entry pointer by a small count and wraps it at
// the buffer depth, so depths that are not powers of two also work.
package rob_pkg;

  localparam int DEF_DATA_WIDTH   = 64;
  localparam int DEF_ROB_DEPTH    = 32;
  localparam int DEF_PTR_WIDTH    = 5;
  localparam int DEF_REG_ADDR_WID = 5;
  localparam int DEF_PC_WIDTH     = 64;
  localparam int DEF_WAYS         = 4;

  // Circular addition: (ptr + inc) mod depth, for inc <= depth.
  function automatic int unsigned ptr_add(int unsigned ptr, int unsigned inc,
                                          int unsigned depth);
    int unsigned s;
    s = ptr + inc;
    if (s >= depth) s = s - depth;
    return s;
  endfunction

  // Circular distance from 'from' forward to 'to': (to - from) mod depth.
  function automatic int unsigned ptr_dist(int unsigned from, int unsigned to,
                                           int unsigned depth);
    if (to >= from) return to - from;
    else            return depth - from + to;
  endfunction

endpackage
