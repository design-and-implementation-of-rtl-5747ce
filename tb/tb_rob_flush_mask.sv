// tb_rob_flush_mask: self-checking test of the branch-flush range.
//
// For every head position, every occupancy 0..32 and every flush entry, the
// expected mask is built by walking the occupied entries from the head and
// marking those that come after the flushing branch. Named cases: a flush in
// the middle of a wrapped range, a flush at the youngest entry (nothing to
// clear), a flush of a full buffer at its head (31 entries cleared), and a
// flush naming a free entry (ignored).
module tb_rob_flush_mask;
  localparam int D  = 32;
  localparam int PW = 5;
  localparam int CW = 6;

  logic          clk = 1'b0;
  logic          flush_vld, flush_ok;
  logic [PW-1:0] flush_ptr, read_ptr;
  logic [CW-1:0] used_cnt, flush_cnt;
  logic [D-1:0]  flush_mask;

  int checks = 0, failures = 0;

  rob_flush_mask #(.ROB_DEPTH(D), .PTR_WIDTH(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(bit v, int rp, int used, int fp);
    logic [D-1:0] m;
    bit ok, after;
    int n;
    flush_vld = v; read_ptr = PW'(rp); used_cnt = CW'(used); flush_ptr = PW'(fp);
    #1;
    m = '0; ok = 0; after = 0; n = 0;
    for (int k = 0; k < used; k++) begin
      int e;
      e = (rp + k) % D;
      if (after) begin m[e] = v; n++; end
      if (e == fp) begin ok = v; after = 1; end
    end
    if (!ok) begin m = '0; n = 0; end
    checks++;
    if (flush_mask !== m || flush_ok !== ok || int'(flush_cnt) != n) begin
      failures++;
      $display("FAIL rp=%0d used=%0d fp=%0d mask=%h exp=%h ok=%b", rp, used, fp,
               flush_mask, m, flush_ok);
    end
  endtask

  initial begin
    apply(1, 28, 10, 30);                 // wrapped: clears 31,0..5
    checks++; if (flush_mask != 32'h8000_003F) failures++;
    apply(1, 3, 5, 7);                    // youngest entry: nothing cleared
    checks++; if (!flush_ok || flush_mask != 0) failures++;
    apply(1, 9, 32, 9);                   // full, branch at head
    checks++; if (flush_cnt != 31) failures++;
    apply(1, 3, 5, 8);                    // free entry: ignored
    checks++; if (flush_ok) failures++;
    for (int rp = 0; rp < D; rp++) begin
      for (int used = 0; used <= D; used++)
        for (int fp = 0; fp < D; fp++) apply(1, rp, used, fp);
      apply(0, rp, 20, rp);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
