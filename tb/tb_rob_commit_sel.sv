// tb_rob_commit_sel: self-checking test of the commit decision.
//
// Runs all 2^16 combinations of valid, ready, except and is_branch over the
// four head slots, with enable high and low, against a reference written as
// "length of the run of committable slots from slot 0, cut after the first
// branch". Named cases: four ready entries commit together, a not-ready head
// blocks everything behind it, an exception at the head is reported and
// blocks commit, and a branch in slot 1 ends the group after slot 1.
module tb_rob_commit_sel;
  localparam int W = 4;

  logic         clk = 1'b0;
  logic         enable;
  logic [W-1:0] slot_valid, slot_ready, slot_except, slot_is_branch, commit_mask;
  logic [2:0]   commit_cnt;
  logic         except_take, branch_vld;
  logic [1:0]   branch_slot;

  int checks = 0, failures = 0;

  rob_commit_sel #(.WAYS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(bit en, logic [W-1:0] v, r, e, b);
    int n, bslot;
    bit bv;
    logic [W-1:0] m;
    enable = en; slot_valid = v; slot_ready = r; slot_except = e; slot_is_branch = b;
    #1;
    n = 0; bv = 0; bslot = 0;
    if (en)
      while (n < W && v[n] && r[n] && !e[n]) begin
        n++;
        if (b[n-1]) begin bv = 1; bslot = n - 1; break; end
      end
    m = W'((1 << n) - 1);
    checks++;
    if (commit_mask !== m || int'(commit_cnt) != n || branch_vld !== bv ||
        (bv && int'(branch_slot) != bslot) || except_take !== (v[0] & r[0] & e[0])) begin
      failures++;
      $display("FAIL en=%b v=%b r=%b e=%b b=%b: mask=%b exp=%b br=%b/%0d exp %b/%0d exc=%b",
               en, v, r, e, b, commit_mask, m, branch_vld, branch_slot, bv, bslot, except_take);
    end
  endtask

  initial begin
    apply(1, 4'hF, 4'hF, 4'h0, 4'h0);
    checks++; if (commit_cnt != 4) failures++;
    apply(1, 4'hF, 4'hE, 4'h0, 4'h0);
    checks++; if (commit_cnt != 0) failures++;
    apply(1, 4'hF, 4'hF, 4'h1, 4'h0);
    checks++; if (!except_take || commit_cnt != 0) failures++;
    apply(1, 4'hF, 4'hF, 4'h0, 4'h2);
    checks++; if (commit_cnt != 2 || !branch_vld || branch_slot != 1) failures++;
    for (int en = 0; en < 2; en++)
      for (int x = 0; x < 65536; x++) begin
        apply(en[0], x[3:0], x[7:4], x[11:8], x[15:12]);
        if (x % 64 == 0) @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
