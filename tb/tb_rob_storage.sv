// tb_rob_storage: self-checking test of the entry array.
//
// A reference array in the testbench is updated with the same allocation,
// write-back and clear requests as the block, using the rules: allocation sets
// valid and clears ready; a write-back to a valid entry sets ready and stores
// result, taken and except; a write-back to a free entry is dropped; a clear
// wins over everything. Random requests (distinct free entries for the
// allocation ports, distinct entries for the write-back ports) run for a few
// thousand cycles and all fields of all entries are compared every cycle.
// Then an asynchronous reset in mid-clock is checked to empty every entry.
module tb_rob_storage;
  localparam int DW = 64, D = 32, PW = 5, RW = 5, PCW = 64, W = 4, P = 4;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0]   alloc_en, alloc_is_branch;
  logic [PW-1:0]  alloc_idx [W];
  logic [PCW-1:0] alloc_pc [W];
  logic [RW-1:0]  alloc_rd_phy [W];
  logic [P-1:0]   wb_en, wb_taken, wb_except;
  logic [PW-1:0]  wb_idx [P];
  logic [DW-1:0]  wb_result [P];
  logic [D-1:0]   clr_mask;
  logic [D-1:0]   ent_valid, ent_ready, ent_except, ent_is_branch, ent_taken;
  logic [RW-1:0]  ent_rd_phy [D];
  logic [PCW-1:0] ent_pc [D];
  logic [DW-1:0]  ent_result [D];

  typedef struct {
    bit v, r, x, b, t;
    logic [RW-1:0] rd;
    logic [PCW-1:0] pc;
    logic [DW-1:0] res;
  } ent_t;
  ent_t m [D];

  int checks = 0, failures = 0, dropped_wb = 0;

  rob_storage #(.DATA_WIDTH(DW), .ROB_DEPTH(D), .PTR_WIDTH(PW), .REG_ADDR_WID(RW),
                .PC_WIDTH(PCW), .WAYS(W), .PORTS(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int e = 0; e < D; e++) begin
      checks++;
      if (ent_valid[e] !== m[e].v || ent_ready[e] !== m[e].r ||
          (m[e].v && (ent_rd_phy[e] !== m[e].rd || ent_pc[e] !== m[e].pc ||
                      ent_is_branch[e] !== m[e].b)) ||
          (m[e].v && m[e].r && (ent_result[e] !== m[e].res || ent_taken[e] !== m[e].t ||
                                ent_except[e] !== m[e].x))) begin
        failures++;
        $display("FAIL t=%0t entry %0d v=%b/%b r=%b/%b pc=%h/%h res=%h/%h", $time, e,
                 ent_valid[e], m[e].v, ent_ready[e], m[e].r, ent_pc[e], m[e].pc,
                 ent_result[e], m[e].res);
      end
    end
  endtask

  initial begin
    alloc_en = '0; wb_en = '0; clr_mask = '0; alloc_is_branch = '0; wb_taken = '0;
    wb_except = '0;
    for (int i = 0; i < W; i++) begin alloc_idx[i] = '0; alloc_pc[i] = '0; alloc_rd_phy[i] = '0; end
    for (int p = 0; p < P; p++) begin wb_idx[p] = '0; wb_result[p] = '0; end
    for (int e = 0; e < D; e++) m[e] = '{default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit used [D];
      // allocation: distinct free entries
      for (int e = 0; e < D; e++) used[e] = 0;
      for (int i = 0; i < W; i++) begin
        int e;
        e = $urandom_range(0, D - 1);
        alloc_en[i] = 0;
        if (!m[e].v && !used[e] && $urandom_range(0, 1)) begin
          alloc_en[i] = 1; used[e] = 1;
        end
        alloc_idx[i] = PW'(e); alloc_pc[i] = {$urandom, $urandom};
        alloc_rd_phy[i] = RW'($urandom); alloc_is_branch[i] = 1'($urandom);
      end
      // write-back: distinct entries, valid or not
      for (int e = 0; e < D; e++) used[e] = 0;
      for (int p = 0; p < P; p++) begin
        int e;
        e = $urandom_range(0, D - 1);
        wb_en[p] = !used[e] && $urandom_range(0, 2) != 0;
        for (int i = 0; i < W; i++) if (alloc_en[i] && alloc_idx[i] == PW'(e)) wb_en[p] = 0;
        if (wb_en[p]) used[e] = 1;
        wb_idx[p] = PW'(e); wb_result[p] = {$urandom, $urandom};
        wb_taken[p] = 1'($urandom); wb_except[p] = ($urandom_range(0, 15) == 0);
      end
      // clear: some valid entries
      for (int e = 0; e < D; e++) clr_mask[e] = m[e].v && ($urandom_range(0, 9) == 0);
      @(posedge clk);
      // reference update
      for (int e = 0; e < D; e++) begin
        if (clr_mask[e]) begin m[e].v = 0; m[e].r = 0; end
        else begin
          for (int i = 0; i < W; i++)
            if (alloc_en[i] && int'(alloc_idx[i]) == e) begin
              m[e].v = 1; m[e].r = 0; m[e].x = 0; m[e].t = 0;
              m[e].pc = alloc_pc[i]; m[e].rd = alloc_rd_phy[i]; m[e].b = alloc_is_branch[i];
            end
          for (int p = 0; p < P; p++)
            if (wb_en[p] && int'(wb_idx[p]) == e) begin
              if (m[e].v) begin
                m[e].r = 1; m[e].res = wb_result[p]; m[e].t = wb_taken[p]; m[e].x = wb_except[p];
              end else dropped_wb++;
            end
        end
      end
      #1 compare();
    end
    // asynchronous reset in mid-clock
    alloc_en = '0; wb_en = '0; clr_mask = '0;
    #2 rst_n = 1'b0;
    #1;
    checks++;
    if (ent_valid !== '0 || ent_ready !== '0) begin
      failures++; $display("FAIL asynchronous reset");
    end
    checks++;
    if (dropped_wb == 0) begin failures++; $display("FAIL no dropped write-back seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
