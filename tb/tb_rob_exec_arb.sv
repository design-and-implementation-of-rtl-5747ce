// tb_rob_exec_arb: self-checking test of the write-back port arbitration.
//
// Checks named conflict cases (ports 0 and 2 on one entry, all four ports on
// one entry, four distinct entries) and random patterns against a reference
// in which a port loses exactly when a lower-numbered valid port names the
// same entry.
module tb_rob_exec_arb;
  localparam int PORTS = 4;
  localparam int PW    = 5;

  logic             clk = 1'b0;
  logic [PORTS-1:0] exec_vld, grant;
  logic [PW-1:0]    exec_rob_ptr [PORTS];

  int checks = 0, failures = 0;

  rob_exec_arb #(.PORTS(PORTS), .PTR_WIDTH(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(logic [PORTS-1:0] v, int p0, int p1, int p2, int p3,
                       logic [PORTS-1:0] expect_grant, bit use_expect = 1'b1);
    logic [PORTS-1:0] ref_g;
    exec_vld = v;
    exec_rob_ptr[0] = PW'(p0); exec_rob_ptr[1] = PW'(p1);
    exec_rob_ptr[2] = PW'(p2); exec_rob_ptr[3] = PW'(p3);
    #1;
    // independent reference: mark entries already claimed, port by port
    begin
      bit claimed [int];
      for (int i = 0; i < PORTS; i++) begin
        ref_g[i] = v[i] && !claimed.exists(int'(exec_rob_ptr[i]));
        if (v[i]) claimed[int'(exec_rob_ptr[i])] = 1;
      end
    end
    checks++;
    if (grant !== ref_g || (use_expect && expect_grant !== grant)) begin
      failures++;
      $display("FAIL vld=%b ptr=%0d,%0d,%0d,%0d grant=%b ref=%b",
               v, p0, p1, p2, p3, grant, ref_g);
    end
    @(posedge clk);
  endtask

  initial begin
    drive(4'b1111, 1, 3, 4, 5, 4'b1111);   // distinct entries, all granted
    drive(4'b0101, 2, 0, 2, 0, 4'b0001);   // ports 0 and 2 collide: port 0 wins
    drive(4'b1111, 7, 7, 7, 7, 4'b0001);   // all on one entry
    drive(4'b1110, 7, 7, 7, 7, 4'b0010);   // port 1 wins when 0 is idle
    drive(4'b1111, 0, 2, 0, 2, 4'b0011);
    repeat (3000)
      drive(4'($urandom), $urandom_range(0, 7), $urandom_range(0, 7),
            $urandom_range(0, 7), $urandom_range(0, 7), '0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
