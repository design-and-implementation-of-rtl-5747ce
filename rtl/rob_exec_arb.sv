// rob_exec_arb: execution-port (write-back) arbitration of the reorder buffer.
//
// Up to PORTS execution units return a result in the same cycle, each naming
// the entry it completes. Two ports naming the same entry conflict; the
// conflict is resolved by fixed priority, port 0 first, then 1, 2 and 3: a
// port is granted when it is valid and no lower-numbered valid port names the
// same entry. Ports naming different entries are all granted.
//
// Purely combinational. The fixed 0-1-2-3 priority and the same-entry check
// follow the description of the buffer; dropping the losing port's result
// (rather than holding it for a later cycle) is this design's choice, and the
// grant vector tells each unit whether its result was taken.
module rob_exec_arb #(
  parameter int PORTS     = rob_pkg::DEF_WAYS,
  parameter int PTR_WIDTH = rob_pkg::DEF_PTR_WIDTH
) (
  input  logic [PORTS-1:0]     exec_vld,
  input  logic [PTR_WIDTH-1:0] exec_rob_ptr [PORTS],
  output logic [PORTS-1:0]     grant
);

  always_comb begin
    for (int i = 0; i < PORTS; i++) begin
      grant[i] = exec_vld[i];
      for (int j = 0; j < i; j++)
        if (exec_vld[j] && exec_rob_ptr[j] == exec_rob_ptr[i]) grant[i] = 1'b0;
    end
  end

endmodule
