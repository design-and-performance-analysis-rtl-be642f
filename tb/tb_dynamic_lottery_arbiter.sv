// Testbench of dynamic_lottery_arbiter.
// 1. With all four masters requesting, the tickets and 4-bit partial sums of
//    the first 14 cycles after reset must be the known values (tickets
//    1,2,3,4 stepping by one; s3 = 0,A,E,2,6,... wrapping at 16) and the
//    random number the LFSR sequence.
// 2. With random requests, the grants must match a cycle-accurate model.
// 3. Cycles where the number exceeds the ticket total must grant nobody;
//    the test counts such cycles and requires some.
module tb_dynamic_lottery_arbiter;
  import lottery_pkg::*;

  logic        clk = 0, rst = 1;
  req_vec_t    req = '0, gnt;
  ticket_vec_t tickets;
  rand_t       num;
  logic [3:0][3:0] psum;
  int checks = 0, failures = 0;

  dynamic_lottery_arbiter dut (.clk(clk), .rst(rst), .req(req), .gnt(gnt),
                               .tickets(tickets), .num(num), .psum(psum));

  always #5 clk = ~clk;

  // ---- reference model ----
  logic [3:0]      m_num, m_base;
  logic [3:0][3:0] m_sum;
  logic [3:0]      m_gnt, m_req;

  always @(posedge clk) begin
    if (rst) begin
      m_num <= 4'hF; m_sum <= '0; m_gnt <= '0; m_base <= 4'd1; m_req <= '0;
    end else begin
      logic [3:0] g;
      logic [3:0] acc;
      g = '0;
      for (int i = 3; i >= 0; i--) if (m_num <= m_sum[i]) g = 4'(1 << i);
      if ($countones(m_req) == 1) g = m_req;   // trivial lottery
      m_gnt <= g;
      m_req <= req;
      acc = 0;
      for (int i = 0; i < 4; i++) begin
        if (req[i]) acc += m_base + 4'(i);
        m_sum[i] <= acc;
      end
      m_num  <= {m_num[2:0], m_num[3] ^ m_num[0]};
      m_base <= m_base + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] s0 [14] = '{0,1,2,3,4,5,6,7,8,9,10,11,12,13};
    logic [3:0] s1 [14] = '{0,3,5,7,9,11,13,15,1,3,5,7,9,11};
    logic [3:0] s2 [14] = '{0,6,9,12,15,2,5,8,11,14,1,4,7,10};
    logic [3:0] s3 [14] = '{0,10,14,2,6,10,14,2,6,10,14,2,6,10};
    logic [3:0] n1 [14] = '{15,14,13,10,5,11,6,12,9,2,4,8,1,3};
    int none = 0, granted = 0;
    req = 4'b1111;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int k = 0; k < 14; k++) begin
      check(tickets[0] == 4'(k + 1) && tickets[3] == 4'(k + 4), $sformatf("tickets k=%0d", k));
      check(psum[0] == s0[k] && psum[1] == s1[k] && psum[2] == s2[k] && psum[3] == s3[k],
            $sformatf("psum k=%0d got %h", k, psum));
      check(num == n1[k], $sformatf("num k=%0d got %h", k, num));
      check(gnt === m_gnt, $sformatf("gnt k=%0d", k));
      @(negedge clk);
    end
    for (int k = 0; k < 800; k++) begin
      req = 4'($urandom);
      @(negedge clk);
      check(gnt === m_gnt, $sformatf("random k=%0d gnt=%b want %b", k, gnt, m_gnt));
      if (gnt == 0) none++; else granted++;
    end
    check(none > 0, "no empty lottery seen");
    check(granted > 0, "no grant seen");
    $display("dynamic lottery: %0d granted cycles, %0d cycles without winner", granted, none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
