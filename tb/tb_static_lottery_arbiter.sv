// Testbench of static_lottery_arbiter (tickets 1,2,3,4).
// 1. All four masters request: over each 15-cycle LFSR period masters 0..3
//    must be granted 1, 2, 3 and 4 times (their ticket counts) and 5 cycles
//    must stay idle; the order of winners must be 3,2,2,3,1,2,3,0,1,3.
// 2. Random requests: the grant must match a cycle-accurate model built from
//    the LFSR sequence, registered partial sums, the interval rule and the
//    trivial lottery of a lone request, which also fixes the two-clock
//    request-to-grant latency.
// 3. Master 0 (one ticket) requesting alone must be granted every cycle.
module tb_static_lottery_arbiter;
  import lottery_pkg::*;

  logic                 clk = 0, rst = 1;
  req_vec_t             req = '0, gnt;
  rand_t                num;
  logic [3:0][3:0]      psum;
  int checks = 0, failures = 0;

  static_lottery_arbiter dut (.clk(clk), .rst(rst), .req(req), .gnt(gnt), .num(num), .psum(psum));

  always #5 clk = ~clk;

  // ---- reference model ----
  logic [3:0]      m_num;
  logic [3:0][7:0] m_sum;
  logic [3:0]      m_gnt, m_req;
  localparam int T [4] = '{1, 2, 3, 4};

  always @(posedge clk) begin
    if (rst) begin
      m_num <= 4'hF; m_sum <= '0; m_gnt <= '0; m_req <= '0;
    end else begin
      logic [3:0] g;
      int acc;
      g = '0;
      for (int i = 3; i >= 0; i--) if (m_num <= m_sum[i]) g = 4'(1 << i);
      if ($countones(m_req) == 1) g = m_req;   // trivial lottery
      m_gnt <= g;
      m_req <= req;
      acc = 0;
      for (int i = 0; i < 4; i++) begin
        if (req[i]) acc += T[i];
        m_sum[i] <= 8'(acc);
      end
      m_num <= {m_num[2:0], m_num[3] ^ m_num[0]};
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [10] = '{3, 2, 2, 3, 1, 2, 3, 0, 1, 3};
    int got [$];
    int cnt [4];
    int idle;
    @(negedge clk); @(negedge clk);
    rst = 0;
    req = 4'b1111;
    // wait out the two pipeline stages, then watch 30 cycles
    @(negedge clk); @(negedge clk);
    idle = 0;
    for (int k = 0; k < 30; k++) begin
      if (gnt == 0) idle++;
      for (int i = 0; i < 4; i++) if (gnt[i]) begin cnt[i]++; got.push_back(i); end
      checks++;
      if (gnt !== m_gnt) begin failures++; $display("FAIL model k=%0d gnt=%b want %b", k, gnt, m_gnt); end
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (cnt[i] != 2 * T[i]) begin failures++; $display("FAIL M%0d won %0d of 30", i, cnt[i]); end
    end
    checks++;
    if (idle != 10) begin failures++; $display("FAIL idle %0d", idle); end
    // restart the number sequence with a reset
    rst = 1; @(negedge clk); rst = 0;
    got.delete();
    repeat (2) @(negedge clk);
    for (int k = 0; k < 15; k++) begin
      for (int i = 0; i < 4; i++) if (gnt[i]) got.push_back(i);
      @(negedge clk);
    end
    // after reset the winners must come in the order fixed by the number
    // sequence; at least the first nine fall inside this 15-cycle window
    checks++;
    if (got.size() < 9) begin failures++; $display("FAIL only %0d grants", got.size()); end
    else for (int k = 0; k < 9; k++) begin
      checks++;
      if (got[k] != order[k]) begin failures++; $display("FAIL order %0d: %0d want %0d", k, got[k], order[k]); end
    end
    // lone low-ticket master
    req = 4'b0001;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      checks++;
      if (gnt != 4'b0001) begin failures++; $display("FAIL lone M0 k=%0d gnt=%b", k, gnt); end
      @(negedge clk);
    end
    // random requests against the model
    for (int k = 0; k < 600; k++) begin
      req = 4'($urandom);
      @(negedge clk);
      checks++;
      if (gnt !== m_gnt) begin failures++; $display("FAIL random k=%0d gnt=%b want %b", k, gnt, m_gnt); end
      checks++;
      if (psum !== {m_sum[3][3:0], m_sum[2][3:0], m_sum[1][3:0], m_sum[0][3:0]}) begin
        failures++; $display("FAIL psum k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
