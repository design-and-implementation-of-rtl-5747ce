// tb_rob: end-to-end self-checking test of the reorder buffer at its default
// size (64-bit data and PCs, 32 entries, 4 issue / write-back / commit lanes).
//
// A reference model in the testbench keeps the in-flight instructions as a
// queue in program order, each with its entry number, PC, destination
// register, branch flag and, once written back, its result, direction and
// exception flag. Every cycle the testbench chooses the issue group, the
// write-backs, an optional branch flush and two forwarding lookups, derives
// from the model what the buffer must answer, and checks:
//   - in the same cycle: issue acknowledge and allocated entries, write-back
//     acknowledge, forwarded operands;
//   - after the clock edge: the commit group (count, registers, results,
//     PCs, in program order), branch feedback, exception report, used count,
//     full / almost-full, read and write pointers and the valid / ready
//     debug vectors.
// Commit is expected one cycle after the last result of a group is written
// (write-back edge, then the commit edge), and the commit outputs one cycle
// after the commit decision.
//
// The first part replays the nine verification scenarios of the buffer's
// design (issue of 4, issue of 2, write-backs to 0 and 2 and to 1, 3 and 4,
// a branch, its result, a flush at the branch, issue after the flush and the
// results after it) and then an asynchronous reset. Then come directed tests
// of forwarding, a write-back conflict, a divide-by-zero style exception and
// a full buffer, and finally random traffic. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_rob;
  import rob_pkg::*;

  localparam int DW = DEF_DATA_WIDTH, D = DEF_ROB_DEPTH, PW = $clog2(D);
  localparam int RW = DEF_REG_ADDR_WID, PCW = DEF_PC_WIDTH, W = DEF_WAYS;

  // ------------------------------------------------------------ DUT signals
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

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int n_full = 0, n_almost_full = 0, n_partial = 0, n_conflict = 0, n_flush = 0;
  int n_except = 0, n_fwd_hit = 0, n_fwd_pending = 0, n_commit4 = 0, n_branch_fb = 0;
  int n_wrap = 0, n_reset = 0, n_drop_wb = 0, n_committed = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference model
  typedef struct {
    int            ptr;
    logic [PCW-1:0] pc;
    logic [RW-1:0]  rd;
    bit            br, rdy, tk, exc;
    logic [DW-1:0]  res;
  } inst_t;

  inst_t q[$];          // in flight, oldest first
  int    m_wp = 0, m_rp = 0;
  logic [PCW-1:0] next_pc = 64'h0000_0000_8000_0000;

  // plan for the next cycle
  bit            p_iss_vld;
  bit   [W-1:0]  p_lane, p_br;
  logic [RW-1:0] p_rd [W];
  bit   [W-1:0]  p_wb, p_tk, p_exc;
  int            p_wb_ptr [W];
  logic [DW-1:0] p_wb_res [W];
  bit            p_fl;
  int            p_fl_ptr;
  logic [RW-1:0] p_rs1, p_rs2;

  function automatic int qidx(int ptr);
    foreach (q[i]) if (q[i].ptr == ptr) return i;
    return -1;
  endfunction

  task automatic clear_plan();
    p_iss_vld = 0; p_lane = '0; p_br = '0; p_wb = '0; p_tk = '0; p_exc = '0; p_fl = 0;
    p_fl_ptr = 0; p_rs1 = '0; p_rs2 = '0;
    for (int i = 0; i < W; i++) begin p_rd[i] = '0; p_wb_ptr[i] = 0; p_wb_res[i] = '0; end
  endtask

  // result a unit would produce for an entry (any value will do, it only has
  // to differ between writes)
  function automatic logic [DW-1:0] mkres();
    return {$urandom, $urandom};
  endfunction

  task automatic fwd_expect(logic [RW-1:0] rs, output bit v, output logic [DW-1:0] d);
    v = 0; d = '0;
    for (int i = q.size() - 1; i >= 0; i--)
      if (q[i].rd == rs) begin
        v = q[i].rdy; d = v ? q[i].res : '0;
        return;
      end
  endtask

  // One clock cycle: drive the plan, check the combinational answers, step
  // the model across the edge and check the registered answers.
  task automatic cycle();
    bit            exc_take, fl_ok;
    int            fl_pos, ncommit, offered, free, nacc;
    bit   [W-1:0]  exp_ack, exp_wb_ack;
    int            exp_ptr [W];
    inst_t         committed[$];
    bit            br_fb;
    inst_t         br_inst;
    logic [PCW-1:0] exc_pc;
    bit            fv1, fv2;
    logic [DW-1:0] fd1, fd2;
    inst_t         newq[$];

    @(negedge clk);
    issue_vld = p_iss_vld;
    issue_inst_vld = p_lane;
    issue_inst_is_branch = p_br;
    for (int i = 0; i < W; i++) begin
      issue_inst_pc[i] = next_pc + PCW'(4 * i);
      issue_inst_rd_phy[i] = p_rd[i];
      exec_vld[i] = p_wb[i];
      exec_rob_ptr[i] = PW'(p_wb_ptr[i]);
      exec_result[i] = p_wb_res[i];
      exec_branch_taken[i] = p_tk[i];
      exec_except[i] = p_exc[i];
    end
    bp_flush_vld = p_fl;
    bp_flush_ptr = PW'(p_fl_ptr);
    exec_rs1_phy = p_rs1;
    exec_rs2_phy = p_rs2;
    #1;

    // --- model: decisions of this cycle
    exc_take = q.size() > 0 && q[0].rdy && q[0].exc;
    fl_pos   = p_fl ? qidx(p_fl_ptr) : -1;
    fl_ok    = fl_pos >= 0;
    ncommit  = 0;
    if (!fl_ok && !exc_take)
      while (ncommit < W && ncommit < q.size() && q[ncommit].rdy && !q[ncommit].exc) begin
        ncommit++;
        if (q[ncommit-1].br) break;
      end
    // issue acceptance, lane 0 first, packed
    offered = 0;
    for (int i = 0; i < W; i++) if (p_iss_vld && p_lane[i]) offered++;
    free = D - q.size();
    exp_ack = '0; nacc = 0;
    if (p_iss_vld && !fl_ok && !exc_take)
      for (int i = 0; i < W; i++)
        if (p_lane[i] && nacc < free) begin
          exp_ack[i] = 1; exp_ptr[i] = (m_wp + nacc) % D; nacc++;
        end
    if (nacc > 0 && nacc < offered) n_partial++;
    if (offered > 0 && free == 0 && !fl_ok && !exc_take) n_full++;
    check(rob_issue_ack === exp_ack, $sformatf("issue ack %b exp %b", rob_issue_ack, exp_ack));
    for (int i = 0; i < W; i++)
      if (exp_ack[i])
        check(int'(rob_issue_ptr[i]) == exp_ptr[i],
              $sformatf("issue lane %0d ptr %0d exp %0d", i, rob_issue_ptr[i], exp_ptr[i]));
    // write-back acknowledge: first port per entry, entry in flight
    for (int p = 0; p < W; p++) begin
      bit lost;
      lost = 0;
      for (int j = 0; j < p; j++) if (p_wb[j] && p_wb_ptr[j] == p_wb_ptr[p]) lost = 1;
      if (p_wb[p] && lost) n_conflict++;
      exp_wb_ack[p] = p_wb[p] && !lost && qidx(p_wb_ptr[p]) >= 0;
      if (p_wb[p] && !lost && qidx(p_wb_ptr[p]) < 0) n_drop_wb++;
    end
    check(rob_exec_ack === exp_wb_ack, $sformatf("exec ack %b exp %b", rob_exec_ack, exp_wb_ack));
    // forwarding
    fwd_expect(p_rs1, fv1, fd1);
    fwd_expect(p_rs2, fv2, fd2);
    check(rob_exec_data1_vld === fv1 && rob_exec_data1 === fd1,
          $sformatf("fwd rs1=%0d vld %b/%b data %h/%h", p_rs1, rob_exec_data1_vld, fv1,
                    rob_exec_data1, fd1));
    check(rob_exec_data2_vld === fv2 && rob_exec_data2 === fd2,
          $sformatf("fwd rs2=%0d vld %b/%b", p_rs2, rob_exec_data2_vld, fv2));
    if (fv1) n_fwd_hit++;
    if (fv2) n_fwd_hit++;
    if (!fv1 && q.size() > 0) begin
      foreach (q[i]) if (q[i].rd == p_rs1 && !q[i].rdy) begin n_fwd_pending++; break; end
    end

    // --- model: state after the edge
    br_fb = 0; exc_pc = '0;
    if (exc_take) begin
      exc_pc = q[0].pc;
      q.delete();
      m_wp = m_rp;
      n_except++;
    end else begin
      for (int k = 0; k < ncommit; k++) begin
        committed.push_back(q[k]);
        if (q[k].br) begin br_fb = 1; br_inst = q[k]; end
      end
      if (fl_ok) begin
        n_flush++;
        while (q.size() > fl_pos + 1) void'(q.pop_back());
        m_wp = (p_fl_ptr + 1) % D;
      end
      // write-backs to entries still in flight before the edge
      for (int p = 0; p < W; p++)
        if (exp_wb_ack[p]) begin
          int i;
          i = qidx(p_wb_ptr[p]);
          if (!(fl_ok && i > fl_pos)) begin
            q[i].rdy = 1; q[i].res = p_wb_res[p]; q[i].tk = p_tk[p]; q[i].exc = p_exc[p];
          end
        end
      for (int k = 0; k < ncommit; k++) void'(q.pop_front());
      m_rp = (m_rp + ncommit) % D;
      for (int i = 0; i < W; i++)
        if (exp_ack[i]) begin
          inst_t n;
          n.ptr = exp_ptr[i]; n.pc = issue_inst_pc[i]; n.rd = p_rd[i]; n.br = p_br[i];
          n.rdy = 0; n.tk = 0; n.exc = 0; n.res = '0;
          q.push_back(n);
        end
      if (m_wp + nacc >= D) n_wrap++;
      m_wp = (m_wp + nacc) % D;
    end
    if (nacc > 0) next_pc = next_pc + PCW'(4 * W);

    @(posedge clk);
    #1;
    // --- registered answers
    check(int'(commit_cnt) == ncommit, $sformatf("commit_cnt %0d exp %0d", commit_cnt, ncommit));
    check(commit_vld === W'((1 << ncommit) - 1), $sformatf("commit_vld %b", commit_vld));
    for (int k = 0; k < committed.size(); k++)
      check(commit_pc[k] === committed[k].pc && commit_rd_phy[k] === committed[k].rd &&
            commit_result[k] === committed[k].res,
            $sformatf("commit slot %0d pc %h exp %h", k, commit_pc[k], committed[k].pc));
    n_committed += ncommit;
    if (ncommit == W) n_commit4++;
    check(rob_branch_update_vld === br_fb, "branch feedback valid");
    if (br_fb) begin
      n_branch_fb++;
      check(rob_branch_pc === br_inst.pc && rob_branch_taken === br_inst.tk,
            $sformatf("branch feedback pc %h/%h taken %b/%b", rob_branch_pc, br_inst.pc,
                      rob_branch_taken, br_inst.tk));
    end
    check(rob_except_vld === exc_take && (!exc_take || rob_except_pc === exc_pc),
          "exception report");
    check(int'(rob_used_cnt) == q.size(), $sformatf("used %0d exp %0d", rob_used_cnt, q.size()));
    check(rob_full === (q.size() == D) && rob_empty === (q.size() == 0) &&
          rob_almost_full === (D - q.size() < W), "status flags");
    if (rob_almost_full) n_almost_full++;
    check(int'(dbg_write_ptr) == m_wp && int'(dbg_read_ptr) == m_rp,
          $sformatf("pointers w %0d/%0d r %0d/%0d", dbg_write_ptr, m_wp, dbg_read_ptr, m_rp));
    begin
      logic [D-1:0] ev, er;
      ev = '0; er = '0;
      foreach (q[i]) begin ev[q[i].ptr] = 1; er[q[i].ptr] = q[i].rdy; end
      check(dbg_rob_valid === ev && dbg_rob_ready === er,
            $sformatf("debug valid %h/%h ready %h/%h", dbg_rob_valid, ev, dbg_rob_ready, er));
    end
    clear_plan();
  endtask

  // ------------------------------------------------------------ plan helpers
  task automatic plan_issue(bit [W-1:0] lanes, bit [W-1:0] br = '0);
    p_iss_vld = 1; p_lane = lanes; p_br = br;
    for (int i = 0; i < W; i++) p_rd[i] = RW'($urandom);
  endtask

  task automatic plan_wb(int port, int ptr, bit tk = 0, bit exc = 0);
    p_wb[port] = 1; p_wb_ptr[port] = ptr; p_wb_res[port] = mkres();
    p_tk[port] = tk; p_exc[port] = exc;
  endtask

  task automatic do_reset();
    issue_vld = 0; issue_inst_vld = '0; exec_vld = '0; bp_flush_vld = 0;
    rst_n = 1'b0;
    #3;
    q.delete(); m_wp = 0; m_rp = 0;
    check(dbg_rob_valid === '0 && rob_used_cnt === '0 && dbg_write_ptr === '0 &&
          dbg_read_ptr === '0 && commit_vld === '0, "asynchronous reset clears the buffer");
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // ------------------------------------------------------------ test sequence
  initial begin
    issue_vld = 0; issue_inst_vld = '0; issue_inst_is_branch = '0; exec_vld = '0;
    exec_branch_taken = '0; exec_except = '0; bp_flush_vld = 0; bp_flush_ptr = '0;
    exec_rs1_phy = '0; exec_rs2_phy = '0;
    for (int i = 0; i < W; i++) begin
      issue_inst_pc[i] = '0; issue_inst_rd_phy[i] = '0; exec_rob_ptr[i] = '0;
      exec_result[i] = '0;
    end
    clear_plan();
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;

    // Scenario 1: four ordinary instructions -> entries 0..3
    plan_issue(4'b1111); cycle();
    check(dbg_write_ptr == 4 && dbg_rob_valid[3:0] == 4'hF, "S1 allocation of 4");
    // Scenario 2: two instructions on the low lanes -> entries 4, 5
    plan_issue(4'b0011); cycle();
    check(dbg_write_ptr == 6 && dbg_rob_valid[5:4] == 2'b11, "S2 allocation of 2");
    // Scenario 3: results for entries 0 and 2
    plan_wb(0, 0); plan_wb(1, 2); cycle();
    check(dbg_rob_ready[0] && dbg_rob_ready[2], "S3 ready after write-back");
    // Scenario 4: results for entries 1, 3 and 4 (entry 0 commits meanwhile)
    plan_wb(0, 1); plan_wb(1, 3); plan_wb(2, 4); cycle();
    // Scenario 5: one branch -> entry 6
    plan_issue(4'b0001, 4'b0001); cycle();
    check(dut.u_store.ent_is_branch[6] && dbg_write_ptr == 7, "S5 branch marked");
    // Scenario 6: branch result, taken
    plan_wb(3, 6, 1'b1); cycle();
    check(dbg_rob_ready[6] && dut.u_store.ent_taken[6], "S6 branch outcome stored");
    // wrong-path instructions behind the branch
    plan_issue(4'b0111); cycle();
    check(dbg_write_ptr == 10, "wrong path allocated");
    // Scenario 7: misprediction at entry 6: 7..9 cleared, write pointer 7
    p_fl = 1; p_fl_ptr = 6; cycle();
    check(dbg_write_ptr == 7 && dbg_rob_valid[9:7] == 3'b000 && dbg_rob_valid[6],
          "S7 flush after the branch");
    // Scenario 8: correct-path instructions -> 7..10
    plan_issue(4'b1111); cycle();
    check(dbg_write_ptr == 11, "S8 issue after flush");
    // Scenario 9: their results, plus entry 5; everything drains in order
    plan_wb(0, 7); plan_wb(1, 8); plan_wb(2, 9); plan_wb(3, 10); cycle();
    plan_wb(0, 5); cycle();
    repeat (4) cycle();
    check(rob_empty && n_branch_fb == 1, "S9 drained with branch feedback");

    // asynchronous reset during operation
    plan_issue(4'b1111); cycle();
    plan_wb(0, int'(dbg_write_ptr) - 4); cycle();
    do_reset(); n_reset++;

    // forwarding: producer of r7 pending, then ready, then a younger writer
    clear_plan();
    plan_issue(4'b0001); p_rd[0] = 7; cycle();
    p_rs1 = 7; cycle();                                  // pending: not available
    check(!rob_exec_data1_vld, "forward withheld while pending");
    plan_wb(0, 0); cycle();
    p_rs1 = 7; p_rs2 = 7; cycle();                       // committed by now
    plan_issue(4'b0011); p_rd[0] = 9; p_rd[1] = 9; cycle();
    plan_wb(0, 1); p_rs1 = 9; cycle();                   // older r9 writer ready ...
    p_rs1 = 9; cycle();                                  // ... but younger one pending
    plan_wb(0, 2); p_rs1 = 9; cycle();
    repeat (3) cycle();

    // write-back conflict: ports 1 and 3 on one entry, port 1 wins
    plan_issue(4'b0011); cycle();
    plan_wb(1, 3); plan_wb(3, 3); plan_wb(0, 4); cycle();
    repeat (3) cycle();

    // exception (divide by zero) in the middle of a group
    plan_issue(4'b1111); cycle();
    plan_wb(0, 5); plan_wb(1, 6, 0, 1); plan_wb(2, 7); plan_wb(3, 8); cycle();
    repeat (3) cycle();
    check(rob_empty && n_except == 1, "exception empties the buffer");

    // full load: issue without results until refused, then drain
    for (int c = 0; c < 10; c++) begin plan_issue(4'b1111); cycle(); end
    check(rob_full, "buffer full");
    for (int k = 0; k < D; k++) begin
      plan_wb(k % W, (int'(dbg_read_ptr) + k) % D);
      if (k % W == W - 1) cycle();
    end
    repeat (10) cycle();

    // random traffic
    for (int c = 0; c < 6000; c++) begin
      int mode;
      mode = (c / 500) % 3;            // 0: balanced, 1: slow results, 2: fast results
      if ($urandom_range(0, 3) != 0) begin
        plan_issue(4'($urandom));
        for (int i = 0; i < W; i++) begin
          p_br[i] = ($urandom_range(0, 5) == 0);
          p_rd[i] = RW'($urandom_range(0, 15));
        end
      end
      for (int p = 0; p < W; p++) begin
        int pick;
        if ($urandom_range(0, 9) < (mode == 1 ? 2 : (mode == 2 ? 9 : 5)) && q.size() > 0) begin
          pick = $urandom_range(0, q.size() - 1);
          if (!q[pick].rdy)
            plan_wb(p, q[pick].ptr, 1'($urandom), $urandom_range(0, 80) == 0);
        end else if ($urandom_range(0, 40) == 0) begin
          plan_wb(p, $urandom_range(0, D - 1));           // may name a free entry
        end
      end
      if ($urandom_range(0, 25) == 0 && q.size() > 0) begin
        int pick;
        pick = $urandom_range(0, q.size() - 1);
        if (q[pick].br) begin p_fl = 1; p_fl_ptr = q[pick].ptr; end
      end
      p_rs1 = RW'($urandom_range(0, 15));
      p_rs2 = RW'($urandom_range(0, 15));
      cycle();
      if (c == 3000) begin do_reset(); n_reset++; end
    end

    // every mechanism must have happened
    check(n_full > 0, "full never reached");
    check(n_almost_full > 0, "almost full never reached");
    check(n_partial > 0, "partial issue never happened");
    check(n_conflict > 0, "write-back conflict never happened");
    check(n_flush > 2, "branch flush too rare");
    check(n_except > 1, "exception too rare");
    check(n_fwd_hit > 0, "no operand forwarded");
    check(n_fwd_pending > 0, "no pending forward");
    check(n_commit4 > 0, "never committed 4 in a cycle");
    check(n_branch_fb > 1, "branch feedback too rare");
    check(n_wrap > 0, "pointers never wrapped");
    check(n_reset == 2, "reset test");
    check(n_drop_wb > 0, "no write-back to a free entry");
    $display("mechanisms: full=%0d almost_full=%0d partial_issue=%0d wb_conflict=%0d flush=%0d",
             n_full, n_almost_full, n_partial, n_conflict, n_flush);
    $display("mechanisms: exception=%0d fwd_hit=%0d fwd_pending=%0d commit4=%0d branch_fb=%0d",
             n_except, n_fwd_hit, n_fwd_pending, n_commit4, n_branch_fb);
    $display("mechanisms: wrap=%0d reset=%0d dropped_wb=%0d committed=%0d",
             n_wrap, n_reset, n_drop_wb, n_committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
