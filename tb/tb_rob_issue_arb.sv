// tb_rob_issue_arb: self-checking test of the launch arbitration.
//
// Drives every combination of group strobe, lane mask, block and a free count
// from 0 to 6, then random ones, and compares accept, valid_cnt, accept_cnt
// and the slot offsets with a reference that accepts lanes one by one, lane 0
// first, while free entries remain. Cases checked by name: a full group that
// fits, a group larger than the free space (partial acceptance), a group with
// holes (lanes 0 and 2) packed into consecutive slots, and a blocked cycle.
module tb_rob_issue_arb;
  localparam int WAYS  = 4;
  localparam int CNT_W = 6;

  logic                      clk = 1'b0;
  logic                      issue_vld, block;
  logic [WAYS-1:0]           lane_vld, accept;
  logic [CNT_W-1:0]          free_cnt;
  logic [$clog2(WAYS+1)-1:0] valid_cnt, accept_cnt;
  logic [$clog2(WAYS)-1:0]   slot_off [WAYS];

  int checks = 0, failures = 0;

  rob_issue_arb #(.WAYS(WAYS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_case();
    logic [WAYS-1:0] exp_acc;
    int exp_vcnt, exp_acnt, room;
    #1;
    exp_vcnt = 0;
    for (int i = 0; i < WAYS; i++) if (issue_vld && lane_vld[i]) exp_vcnt++;
    exp_acc = '0;
    exp_acnt = 0;
    room = int'(free_cnt);
    if (issue_vld && !block)
      for (int i = 0; i < WAYS; i++)
        if (lane_vld[i] && room > 0) begin
          exp_acc[i] = 1'b1;
          room--;
        end
    checks++;
    if (accept !== exp_acc || int'(valid_cnt) != exp_vcnt) begin
      failures++;
      $display("FAIL vld=%b lanes=%b free=%0d blk=%b: acc=%b exp=%b vcnt=%0d exp=%0d",
               issue_vld, lane_vld, free_cnt, block, accept, exp_acc, valid_cnt, exp_vcnt);
    end
    for (int i = 0; i < WAYS; i++) begin
      if (exp_acc[i]) begin
        checks++;
        if (int'(slot_off[i]) != exp_acnt) begin
          failures++;
          $display("FAIL lane %0d slot %0d exp %0d", i, slot_off[i], exp_acnt);
        end
        exp_acnt++;
      end
    end
    checks++;
    if (int'(accept_cnt) != exp_acnt) begin
      failures++;
      $display("FAIL accept_cnt %0d exp %0d", accept_cnt, exp_acnt);
    end
    @(posedge clk);
  endtask

  task automatic drive(logic v, logic [WAYS-1:0] l, int f, logic b);
    issue_vld = v; lane_vld = l; free_cnt = CNT_W'(f); block = b;
    check_case();
  endtask

  initial begin
    // named cases
    drive(1, 4'b1111, 32, 0);
    if (accept !== 4'b1111) begin failures++; $display("FAIL full group"); end
    checks++;
    drive(1, 4'b1111, 2, 0);
    if (accept !== 4'b0011) begin failures++; $display("FAIL partial group"); end
    checks++;
    drive(1, 4'b0101, 32, 0);
    if (slot_off[2] != 1) begin failures++; $display("FAIL packing"); end
    checks++;
    drive(1, 4'b1111, 32, 1);
    if (accept !== 4'b0000) begin failures++; $display("FAIL block"); end
    checks++;
    // exhaustive over small free counts
    for (int v = 0; v < 2; v++)
      for (int l = 0; l < 16; l++)
        for (int f = 0; f <= 6; f++)
          for (int b = 0; b < 2; b++)
            drive(v[0], l[3:0], f, b[0]);
    // random
    repeat (2000) drive($urandom_range(0, 3) != 0, 4'($urandom), $urandom_range(0, 32),
                        $urandom_range(0, 7) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
