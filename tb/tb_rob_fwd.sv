// tb_rob_fwd: self-checking test of the operand forwarding search.
//
// Fills the entry fields with random contents (valid, ready, destination
// register, result, head position) and checks both source lookups against a
// reference that walks the entries from youngest to oldest and stops at the
// first valid entry writing the register: forward if that entry is ready,
// otherwise report "not available". Named cases: a single ready producer, a
// younger not-ready producer hiding an older ready one, and two ready
// producers where the younger wins across the wrap point.
module tb_rob_fwd;
  localparam int DW = 64;
  localparam int D  = 32;
  localparam int PW = 5;
  localparam int RW = 5;

  logic          clk = 1'b0;
  logic [PW-1:0] read_ptr;
  logic [D-1:0]  ent_valid, ent_ready;
  logic [RW-1:0] ent_rd_phy [D];
  logic [DW-1:0] ent_result [D];
  logic [RW-1:0] src_phy    [2];
  logic [DW-1:0] data       [2];
  logic [1:0]    data_vld;

  int checks = 0, failures = 0, fwd_hits = 0;

  rob_fwd #(.DATA_WIDTH(DW), .ROB_DEPTH(D), .PTR_WIDTH(PW), .REG_ADDR_WID(RW),
            .NSRC(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // youngest-first reference search over the occupied order
  task automatic check_src(int s);
    bit found, v;
    logic [DW-1:0] d;
    found = 0; v = 0; d = '0;
    for (int k = D - 1; k >= 0 && !found; k--) begin
      int e;
      e = (int'(read_ptr) + k) % D;
      if (ent_valid[e] && ent_rd_phy[e] == src_phy[s]) begin
        found = 1; v = ent_ready[e]; d = v ? ent_result[e] : '0;
      end
    end
    checks++;
    if (data_vld[s] !== v || data[s] !== d) begin
      failures++;
      $display("FAIL src%0d reg %0d: vld=%b/%b data=%h/%h", s, src_phy[s], data_vld[s], v,
               data[s], d);
    end
    if (v) fwd_hits++;
  endtask

  task automatic clear_all();
    ent_valid = '0; ent_ready = '0; read_ptr = '0;
    for (int e = 0; e < D; e++) begin ent_rd_phy[e] = '0; ent_result[e] = '0; end
  endtask

  initial begin
    // single producer
    clear_all();
    ent_valid[4] = 1; ent_ready[4] = 1; ent_rd_phy[4] = 9; ent_result[4] = 64'hDEAD;
    src_phy[0] = 9; src_phy[1] = 10;
    #1 check_src(0); check_src(1);
    checks++; if (!data_vld[0] || data[0] != 64'hDEAD || data_vld[1]) failures++;
    // younger pending producer hides an older ready one
    ent_valid[6] = 1; ent_ready[6] = 0; ent_rd_phy[6] = 9;
    #1 check_src(0);
    checks++; if (data_vld[0]) failures++;
    // wrap: head at 30, older producer at 31, younger at 1
    clear_all(); read_ptr = 30;
    ent_valid[31] = 1; ent_ready[31] = 1; ent_rd_phy[31] = 3; ent_result[31] = 64'h1111;
    ent_valid[1]  = 1; ent_ready[1]  = 1; ent_rd_phy[1]  = 3; ent_result[1]  = 64'h2222;
    src_phy[0] = 3;
    #1 check_src(0);
    checks++; if (data[0] != 64'h2222) failures++;
    // random
    repeat (3000) begin
      read_ptr = PW'($urandom);
      ent_valid = $urandom; ent_ready = $urandom;
      for (int e = 0; e < D; e++) begin
        ent_rd_phy[e] = RW'($urandom_range(0, 11));
        ent_result[e] = {$urandom, $urandom};
      end
      src_phy[0] = RW'($urandom_range(0, 13));
      src_phy[1] = RW'($urandom_range(0, 13));
      #1 check_src(0); check_src(1);
      @(posedge clk);
    end
    checks++;
    if (fwd_hits < 100) begin failures++; $display("FAIL too few forwards %0d", fwd_hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
