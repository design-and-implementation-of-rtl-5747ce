// tb_rob_ptr_mgmt: self-checking test of the pointer management.
//
// A reference model of the two pointers and the occupancy runs next to the
// block. The test fills the buffer to full in groups of four (checking full,
// almost-full and free count on the way), drains it, applies a flush at a
// chosen entry (write pointer = entry + 1, read pointer kept), a clear-all,
// and then random legal mixes of allocation, commit and flush with the
// pointers wrapping many times. Every cycle it compares all outputs.
module tb_rob_ptr_mgmt;
  localparam int D  = 32;
  localparam int PW = 5;
  localparam int W  = 4;
  localparam int CW = PW + 1;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [2:0]    alloc_cnt, commit_cnt;
  logic          flush_vld, clear_all;
  logic [PW-1:0] flush_ptr;
  logic [PW-1:0] write_ptr, read_ptr, next_write_ptr, read_ptr_next;
  logic [CW-1:0] used_cnt, free_cnt;
  logic          full, almost_full, empty;

  int checks = 0, failures = 0;
  int m_wp = 0, m_rp = 0, m_used = 0;
  int saw_full = 0, saw_af = 0, saw_flush = 0, saw_wrap = 0;

  rob_ptr_mgmt #(.ROB_DEPTH(D), .PTR_WIDTH(PW), .WAYS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (int'(write_ptr) != m_wp || int'(read_ptr) != m_rp || int'(used_cnt) != m_used ||
        int'(free_cnt) != D - m_used || full != (m_used == D) ||
        almost_full != (D - m_used < W) || empty != (m_used == 0)) begin
      failures++;
      $display("FAIL t=%0t wp=%0d/%0d rp=%0d/%0d used=%0d/%0d full=%b af=%b",
               $time, write_ptr, m_wp, read_ptr, m_rp, used_cnt, m_used, full, almost_full);
    end
  endtask

  // one clock step with the model updated the same way
  task automatic step(int a, int c, bit fl, int fp, bit clr);
    alloc_cnt = 3'(a); commit_cnt = 3'(c); flush_vld = fl; flush_ptr = PW'(fp);
    clear_all = clr;
    @(posedge clk);
    if (clr) begin
      m_rp = (m_rp + c) % D; m_wp = m_rp; m_used = 0;
    end else if (fl) begin
      m_used = ((fp - m_rp + D) % D) + 1 - c;
      m_rp = (m_rp + c) % D; m_wp = (fp + 1) % D; saw_flush++;
    end else begin
      if (m_wp + a >= D) saw_wrap++;
      m_rp = (m_rp + c) % D; m_wp = (m_wp + a) % D; m_used = m_used + a - c;
    end
    #1;
    if (full) saw_full++;
    if (almost_full && !full) saw_af++;
    compare();
  endtask

  initial begin
    alloc_cnt = '0; commit_cnt = '0; flush_vld = 1'b0; flush_ptr = '0; clear_all = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 compare();
    // fill to full
    for (int i = 0; i < D / W; i++) step(W, 0, 0, 0, 0);
    checks++;
    if (!full || used_cnt != CW'(D)) begin failures++; $display("FAIL not full"); end
    // drain
    for (int i = 0; i < D / W; i++) step(0, W, 0, 0, 0);
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty"); end
    // 10 in flight, flush at the 4th: 4 remain
    step(4, 0, 0, 0, 0); step(4, 0, 0, 0, 0); step(2, 0, 0, 0, 0);
    step(0, 0, 1, (m_rp + 3) % D, 0);
    checks++;
    if (used_cnt != 4) begin failures++; $display("FAIL flush count %0d", used_cnt); end
    step(0, 0, 0, 0, 1);
    // random legal traffic
    for (int i = 0; i < 4000; i++) begin
      int a, c, fp;
      bit fl, clr;
      c   = $urandom_range(0, (m_used < W) ? m_used : W);
      a   = $urandom_range(0, (D - m_used + c < W) ? D - m_used + c : W);
      a   = (D - m_used < a) ? D - m_used : a;
      fl  = ($urandom_range(0, 30) == 0) && m_used > c;
      fp  = (m_rp + $urandom_range(c, m_used - 1)) % D;
      clr = $urandom_range(0, 200) == 0;
      if (fl || clr) a = 0;
      if (clr) c = 0;
      step(a, c, fl, fp, clr);
    end
    checks++;
    if (saw_full == 0 || saw_af == 0 || saw_flush == 0 || saw_wrap == 0) begin
      failures++;
      $display("FAIL coverage full=%0d af=%0d flush=%0d wrap=%0d",
               saw_full, saw_af, saw_flush, saw_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
