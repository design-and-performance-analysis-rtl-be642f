// Testbench of atm_switch_arbiter (tickets 1,2,3,4, 4 extra adaptive tickets).
// 1. Worked case r=1011, a=1000: m=1000, extra g3=4, effective partial sums
//    1,3,3,11, base total 7; every grant must follow the model, and numbers
//    above 7 must go to master 0 with the inversion flag.
// 2. Random requests and adaptive signals against a cycle-accurate model
//    (two register stages from request to grant); counts inversions, boosted
//    wins and idle cycles, and requires that a grant is given in every cycle
//    whose lottery had a request.
module tb_atm_switch_arbiter;
  import lottery_pkg::*;

  logic            clk = 0, rst = 1;
  req_vec_t        req = '0, adapt = '0, gnt, boost;
  ticket_vec_t     extra;
  logic            inverted;
  rand_t           num;
  logic [3:0][7:0] psum;
  logic [7:0]      total;
  int checks = 0, failures = 0;

  atm_switch_arbiter dut (.clk(clk), .rst(rst), .req(req), .adapt(adapt), .gnt(gnt),
                          .inverted(inverted), .boost(boost), .extra(extra), .num(num),
                          .psum(psum), .total(total));

  always #5 clk = ~clk;

  // ---- reference model ----
  localparam int T [4] = '{1, 2, 3, 4};
  logic [3:0] m_num, m_req, m_gnt, m_req_q;
  int         m_f [4];
  int         m_v;
  logic       m_inv;

  always @(posedge clk) begin
    if (rst) begin
      m_num <= 4'hF; m_gnt <= '0; m_inv <= 0; m_req <= '0; m_req_q <= '0;
      m_v <= 0; m_f <= '{0, 0, 0, 0};
    end else begin
      logic [3:0] g; logic inv; int acc, v;
      g = '0; inv = 0;
      if (m_req != 0) begin
        if (int'(m_num) > m_v) begin
          // fewest tickets among requesters: with 1,2,3,4 the lowest index
          for (int i = 3; i >= 0; i--) if (m_req[i]) g = 4'(1 << i);
          inv = 1;
        end else
          for (int i = 3; i >= 0; i--) if (int'(m_num) <= m_f[i]) g = 4'(1 << i);
      end
      m_gnt <= g; m_inv <= inv;
      acc = 0; v = 0;
      for (int i = 0; i < 4; i++) begin
        if (req[i]) begin acc += T[i] + (adapt[i] ? 4 : 0); v += T[i]; end
        m_f[i] <= acc;
      end
      m_v   <= v;
      m_req <= req;
      m_req_q <= m_req;
      m_num <= {m_num[2:0], m_num[3] ^ m_num[0]};
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int inversions = 0, boosted_wins = 0, idle = 0, wins [4];
    @(negedge clk); @(negedge clk);
    rst = 0;
    req = 4'b1011; adapt = 4'b1000;
    #1;
    check(boost == 4'b1000, "m = r & a");
    check(extra == {4'd4, 4'd0, 4'd0, 4'd0}, "g from lookup");
    @(negedge clk);
    check(total == 8'd7, $sformatf("total %0d", total));
    check(psum == {8'd11, 8'd3, 8'd3, 8'd1}, $sformatf("psum %h", psum));
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      check(gnt === m_gnt && inverted === m_inv, $sformatf("worked case k=%0d gnt=%b want %b", k, gnt, m_gnt));
      if (inverted) check(gnt == 4'b0001, "inversion to master 0");
    end
    for (int k = 0; k < 1500; k++) begin
      req = 4'($urandom); adapt = 4'($urandom);
      @(negedge clk);
      check(gnt === m_gnt && inverted === m_inv, $sformatf("random k=%0d gnt=%b want %b", k, gnt, m_gnt));
      check((m_req_q == 0) == (gnt == 0), "grant whenever someone requested");
      if (inverted) inversions++;
      if (gnt == 0) idle++;
      for (int i = 0; i < 4; i++) if (gnt[i]) wins[i]++;
    end
    // boosted master: master 0 requests with the adaptive signal against the
    // others, and its share must grow
    begin
      int plain = 0, boosted = 0;
      req = 4'b1111; adapt = 4'b0000;
      repeat (2) @(negedge clk);
      repeat (150) begin @(negedge clk); if (gnt[0] && !inverted) plain++; end
      adapt = 4'b0001;
      repeat (2) @(negedge clk);
      repeat (150) begin @(negedge clk); if (gnt[0] && !inverted) boosted++; end
      boosted_wins = boosted;
      check(boosted > plain, $sformatf("adaptive tickets raise share: %0d vs %0d", boosted, plain));
    end
    check(inversions > 0, "no priority inversion seen");
    $display("ATM: wins %0d %0d %0d %0d, inversions %0d, idle %0d, boosted M0 wins %0d",
             wins[0], wins[1], wins[2], wins[3], inversions, idle, boosted_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
