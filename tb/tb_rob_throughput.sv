// tb_rob_throughput: sustained-rate and latency test of the reorder buffer.
//
// The buffer is meant to carry four instructions per cycle from issue to
// commit. This test issues a full group of four ordinary instructions every
// cycle for NGROUPS cycles and returns their results out of order. The
// results of group 2k arrive in cycle 2k + L + 1 and those of group 2k + 1 in
// cycle 2k + L, one cycle before its older neighbour, so every odd group
// completes before the even group ahead of it. The four lanes of a group use
// the four write-back ports in a rotating order. Exactly four results arrive
// per cycle, so four must also commit per cycle.
//
// Checked: every issue lane is accepted every cycle; commits come out in
// program order with the right PC, register and result; once the pipeline is
// full every cycle commits exactly four; and the first instruction, whose
// result arrives in cycle L + 1, is on the commit port in cycle L + 3 (ready
// at the write-back edge, committed at the next edge, registered output).
module tb_rob_throughput;
  import rob_pkg::*;

  localparam int DW = DEF_DATA_WIDTH, D = DEF_ROB_DEPTH, PW = $clog2(D);
  localparam int RW = DEF_REG_ADDR_WID, PCW = DEF_PC_WIDTH, W = DEF_WAYS;
  localparam int L = 3;            // nominal execution latency in cycles
  localparam int NGROUPS = 400;    // even

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           issue_vld;
  logic [W-1:0]   issue_inst_vld, issue_inst_is_branch, rob_issue_ack;
  logic [PCW-1:0] issue_inst_pc [W];
  logic [RW-1:0]  issue_inst_rd_phy [W];
  logic [PW-1:0]  rob_issue_ptr [W];
  logic [W-1:0]   exec_vld, exec_branch_taken, exec_except, rob_exec_ack;
  logic [PW-1:0]  exec_rob_ptr [W];
  logic [DW-1:0]  exec_result [W];
  logic           bp_flush_vld;
  logic [PW-1:0]  bp_flush_ptr;
  logic [RW-1:0]  exec_rs1_phy, exec_rs2_phy;
  logic [DW-1:0]  rob_exec_data1, rob_exec_data2;
  logic           rob_exec_data1_vld, rob_exec_data2_vld;
  logic [W-1:0]   commit_vld;
  logic [2:0]     commit_cnt;
  logic [RW-1:0]  commit_rd_phy [W];
  logic [DW-1:0]  commit_result [W];
  logic [PCW-1:0] commit_pc [W];
  logic           rob_branch_update_vld, rob_branch_taken;
  logic [PCW-1:0] rob_branch_pc;
  logic           rob_except_vld;
  logic [PCW-1:0] rob_except_pc;
  logic           rob_full, rob_almost_full, rob_empty;
  logic [PW:0]    rob_used_cnt;
  logic [D-1:0]   dbg_rob_valid, dbg_rob_ready;
  logic [PW-1:0]  dbg_write_ptr, dbg_read_ptr;

  rob dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (NGROUPS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Instruction n (program order): PC, register and result are functions of n.
  function automatic logic [PCW-1:0] pc_of(int n);  return 64'h1000 + PCW'(4 * n); endfunction
  function automatic logic [RW-1:0]  rd_of(int n);  return RW'(n * 7 + 3); endfunction
  function automatic logic [DW-1:0]  res_of(int n); return {32'(n), 32'(n) ^ 32'hA5A5_0F0F}; endfunction

  int cyc = 0;
  int ptr_of [NGROUPS * W];
  int next_commit = 0;           // next instruction expected on the commit port
  int first_commit_cyc = -1;
  int full_rate_cycles = 0;

  initial begin
    issue_vld = 0; issue_inst_vld = '0; issue_inst_is_branch = '0; exec_vld = '0;
    exec_branch_taken = '0; exec_except = '0; bp_flush_vld = 0; bp_flush_ptr = '0;
    exec_rs1_phy = '0; exec_rs2_phy = '0;
    for (int i = 0; i < W; i++) begin
      issue_inst_pc[i] = '0; issue_inst_rd_phy[i] = '0; exec_rob_ptr[i] = '0;
      exec_result[i] = '0;
    end
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;

    for (cyc = 0; cyc < NGROUPS + L + 12; cyc++) begin
      int g;
      @(negedge clk);
      // issue group 'cyc'
      issue_vld = cyc < NGROUPS;
      issue_inst_vld = (cyc < NGROUPS) ? '1 : '0;
      for (int i = 0; i < W; i++) begin
        issue_inst_pc[i] = pc_of(cyc * W + i);
        issue_inst_rd_phy[i] = rd_of(cyc * W + i);
      end
      // results: group 2k in cycle 2k+L+1, group 2k+1 in cycle 2k+L
      exec_vld = '0;
      g = -1;
      if (cyc - L >= 0) begin
        int c;
        c = cyc - L;                       // c = 2k   -> group 2k+1 ; c = 2k+1 -> group 2k
        g = (c % 2 == 0) ? c + 1 : c - 1;
        if (g >= NGROUPS) g = -1;
      end
      if (g >= 0)
        for (int i = 0; i < W; i++) begin
          int port, n;
          port = (i + g) % W;
          n = g * W + i;
          exec_vld[port] = 1'b1;
          exec_rob_ptr[port] = PW'(ptr_of[n]);
          exec_result[port] = res_of(n);
        end
      #1;
      if (cyc < NGROUPS) begin
        check(rob_issue_ack == '1, $sformatf("issue refused in cycle %0d", cyc));
        for (int i = 0; i < W; i++) ptr_of[cyc * W + i] = int'(rob_issue_ptr[i]);
      end
      if (g >= 0) check(rob_exec_ack == '1, "write-back refused");
      @(posedge clk);
      #1;
      // commit outputs of the decision made in this cycle
      for (int k = 0; k < int'(commit_cnt); k++) begin
        check(commit_pc[k] == pc_of(next_commit) && commit_rd_phy[k] == rd_of(next_commit) &&
              commit_result[k] == res_of(next_commit),
              $sformatf("commit slot %0d: pc %h expected %h", k, commit_pc[k],
                        pc_of(next_commit)));
        if (first_commit_cyc < 0) first_commit_cyc = cyc;
        next_commit++;
      end
      // steady state: the first group's results land at cycle L (group 1) and
      // L+1 (group 0); full-rate commits run from L+2 until the last group
      if (cyc >= L + 2 && cyc < NGROUPS + L) begin
        check(commit_cnt == 3'(W), $sformatf("cycle %0d committed %0d", cyc, commit_cnt));
        if (commit_cnt == 3'(W)) full_rate_cycles++;
      end
    end
    check(next_commit == NGROUPS * W,
          $sformatf("committed %0d of %0d", next_commit, NGROUPS * W));
    // instruction 0: issued in cycle 0, written back in cycle L+1, committed
    // at the edge ending L+2, visible after that edge (tested at cycle L+2)
    check(first_commit_cyc == L + 2,
          $sformatf("first commit seen in cycle %0d, expected %0d", first_commit_cyc, L + 2));
    check(rob_empty, "buffer not empty at the end");
    $display("sustained 4-wide commit for %0d cycles; issue-to-commit-output %0d cycles",
             full_rate_cycles, first_commit_cyc + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
