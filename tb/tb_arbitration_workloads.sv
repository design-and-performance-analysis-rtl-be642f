// Workload testbench: the three arbiters under the four-master conditions
// they are characterised with, measuring acceptance rate (share of lottery
// cycles won) and request latency per master.
//
// Part 1, saturated requests. Over whole periods of the number sequence the
// grant counts are known exactly:
//   * static lottery, all four request, tickets 1,2,3,4: per 15 cycles
//     masters 0..3 win 1,2,3,4 times and 5 cycles have no winner;
//   * dynamic lottery, all four request: the generated tickets repeat every
//     16 cycles and the numbers every 15, so 240 cycles cover every pairing;
//     the expected counts come from a direct evaluation of the rule;
//   * ATM switch, requests 1011, adaptive 1000, tickets 1,2,3,4: base total
//     7, effective sums 1,3,3,11, so per 15 cycles master 0 wins 1 + 8
//     (by inversion), master 1 wins 2, master 3 wins 4, master 2 never.
// Part 2, persistent requests. Every master raises a request at random and
// holds it until granted (one word per grant), the same request stream for
// all three arbiters. Static and ATM must serve every request within 45
// cycles, three periods of the number sequence (no starvation), and the ATM
// arbiter's mean latency must be below the static lottery's; the dynamic
// lottery is only measured. Average and worst latency per master are printed.
module tb_arbitration_workloads;
  import lottery_pkg::*;

  logic        clk = 0, rst = 1;
  req_vec_t    st_req = '0, dy_req = '0, at_req = '0, at_adapt = '0;
  req_vec_t    st_gnt, dy_gnt, at_gnt, at_boost;
  ticket_vec_t dy_tickets, at_extra;
  rand_t       st_num, dy_num, at_num;
  logic [3:0][3:0] st_psum, dy_psum;
  logic [3:0][7:0] at_psum;
  logic [7:0]  at_total;
  logic        at_inv;
  int checks = 0, failures = 0;

  static_lottery_arbiter u_st (.clk(clk), .rst(rst), .req(st_req), .gnt(st_gnt), .num(st_num), .psum(st_psum));
  dynamic_lottery_arbiter u_dy (.clk(clk), .rst(rst), .req(dy_req), .gnt(dy_gnt), .tickets(dy_tickets),
                                .num(dy_num), .psum(dy_psum));
  atm_switch_arbiter u_at (.clk(clk), .rst(rst), .req(at_req), .adapt(at_adapt), .gnt(at_gnt),
                           .inverted(at_inv), .boost(at_boost), .extra(at_extra), .num(at_num),
                           .psum(at_psum), .total(at_total));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] lfsr_step(input logic [3:0] n);
    return {n[2:0], n[3] ^ n[0]};
  endfunction

  // expected dynamic-lottery winners over 240 draws: the drawn number n_k
  // meets sums built from tickets (b_k + i) mod 16, with b_k and n_k both
  // stepping once per cycle; the alignment of b to n is set by 'offset'
  task automatic dynamic_expect(input int offset, input logic [3:0] n0,
                                output int cnt [5]);
    logic [3:0] n, b;
    cnt = '{0, 0, 0, 0, 0};
    n = n0; b = 4'(offset);
    for (int k = 0; k < 240; k++) begin
      logic [3:0] s; int w;
      s = 0; w = 4;
      for (int i = 0; i < 4; i++) begin
        s += b + 4'(i);
        if (w == 4 && n <= s) w = i;
      end
      cnt[w]++;
      n = lfsr_step(n); b = b + 1;
    end
  endtask

  initial begin
    int c_st [5], c_dy [5], c_at [5], e_dy [5];
    int inv;
    logic [3:0] n_at_start, b_at_start;
    // ---------------- part 1: saturated ----------------
    st_req = 4'b1111; dy_req = 4'b1111; at_req = 4'b1011; at_adapt = 4'b1000;
    @(negedge clk); @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    // the grant now showing was drawn with the number of two clocks ago and
    // the tickets of three clocks ago
    n_at_start = dy_num; b_at_start = dy_tickets[0];
    for (int k = 0; k < 2; k++) begin n_at_start = lfsr_step(n_at_start); end
    c_st = '{0, 0, 0, 0, 0}; c_dy = '{0, 0, 0, 0, 0}; c_at = '{0, 0, 0, 0, 0}; inv = 0;
    for (int k = 0; k < 240; k++) begin
      int w;
      w = 4; for (int i = 0; i < 4; i++) if (st_gnt[i]) w = i; c_st[w]++;
      w = 4; for (int i = 0; i < 4; i++) if (dy_gnt[i]) w = i; c_dy[w]++;
      w = 4; for (int i = 0; i < 4; i++) if (at_gnt[i]) w = i; c_at[w]++;
      if (at_inv) inv++;
      @(negedge clk);
    end
    // number drawn for the first counted grant: two steps before the value
    // on num at that time; tickets: three steps before
    dynamic_expect(int'(b_at_start) - 3, lfsr_step_back(lfsr_step_back(n_at_start)), e_dy);
    check(c_st[0] == 16 && c_st[1] == 32 && c_st[2] == 48 && c_st[3] == 64 && c_st[4] == 80,
          $sformatf("static counts %0d %0d %0d %0d none %0d", c_st[0], c_st[1], c_st[2], c_st[3], c_st[4]));
    check(c_at[0] == 144 && c_at[1] == 32 && c_at[2] == 0 && c_at[3] == 64 && c_at[4] == 0 && inv == 128,
          $sformatf("ATM counts %0d %0d %0d %0d none %0d inv %0d", c_at[0], c_at[1], c_at[2], c_at[3], c_at[4], inv));
    for (int i = 0; i < 5; i++)
      check(c_dy[i] == e_dy[i], $sformatf("dynamic count %0d: %0d want %0d", i, c_dy[i], e_dy[i]));
    $display("saturated, 240 lotteries: acceptance (M0 M1 M2 M3 none)");
    $display("  static  %5.1f%% %5.1f%% %5.1f%% %5.1f%% %5.1f%%", 100.0*c_st[0]/240, 100.0*c_st[1]/240, 100.0*c_st[2]/240, 100.0*c_st[3]/240, 100.0*c_st[4]/240);
    $display("  dynamic %5.1f%% %5.1f%% %5.1f%% %5.1f%% %5.1f%%", 100.0*c_dy[0]/240, 100.0*c_dy[1]/240, 100.0*c_dy[2]/240, 100.0*c_dy[3]/240, 100.0*c_dy[4]/240);
    $display("  ATM     %5.1f%% %5.1f%% %5.1f%% %5.1f%% %5.1f%%", 100.0*c_at[0]/240, 100.0*c_at[1]/240, 100.0*c_at[2]/240, 100.0*c_at[3]/240, 100.0*c_at[4]/240);
    part2();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] lfsr_step_back(input logic [3:0] n);
    // inverse of lfsr_step: the bit shifted out was q[3] = n[0] ^ q[0] = n[0] ^ n[1]
    return {n[0] ^ n[1], n[3:1]};
  endfunction

  // ---------------- part 2: persistent requests ----------------
  task automatic part2();
    localparam int CYC = 20000;
    int since [3][4];               // cycles waited by the pending request
    int lat [3][4], served [3][4], worst [3][4];
    req_vec_t pend [3];
    req_vec_t gnt_v;
    rst = 1; @(negedge clk); rst = 0;
    for (int s = 0; s < 3; s++) begin
      pend[s] = '0;
      for (int i = 0; i < 4; i++) begin since[s][i] = 0; lat[s][i] = 0; served[s][i] = 0; worst[s][i] = 0; end
    end
    at_adapt = '0;
    for (int k = 0; k < CYC; k++) begin
      req_vec_t arrive;
      arrive = '0;
      for (int i = 0; i < 4; i++) arrive[i] = ($urandom_range(99) < 12);
      for (int s = 0; s < 3; s++) begin
        gnt_v = (s == 0) ? st_gnt : (s == 1) ? dy_gnt : at_gnt;
        for (int i = 0; i < 4; i++) begin
          if (gnt_v[i] && pend[s][i]) begin
            // clock edges from raising the request to the grant (2 at best)
            lat[s][i] += since[s][i] + 1;
            if (since[s][i] + 1 > worst[s][i]) worst[s][i] = since[s][i] + 1;
            served[s][i]++;
            pend[s][i] = 0;
          end
          if (pend[s][i]) since[s][i]++;
          else if (arrive[i]) begin pend[s][i] = 1; since[s][i] = 0; end
        end
      end
      // a request is dropped the moment its grant arrives; the two-clock
      // pipeline may grant it once more, which then goes unused
      st_req = pend[0]; dy_req = pend[1]; at_req = pend[2];
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      check(worst[0][i] <= 45, $sformatf("static M%0d waited %0d cycles", i, worst[0][i]));
      check(worst[2][i] <= 45, $sformatf("ATM M%0d waited %0d cycles", i, worst[2][i]));
      check(served[0][i] > 0 && served[1][i] > 0 && served[2][i] > 0, $sformatf("M%0d never served", i));
    end
    begin
      real m_st, m_at;
      m_st = 0; m_at = 0;
      for (int i = 0; i < 4; i++) begin
        m_st += real'(lat[0][i]) / served[0][i] / 4;
        m_at += real'(lat[2][i]) / served[2][i] / 4;
      end
      check(m_at < m_st, $sformatf("ATM mean latency %f not below static %f", m_at, m_st));
      $display("  mean latency over the masters: static %0.2f, ATM %0.2f cycles/word", m_st, m_at);
    end
    $display("persistent requests (12%% arrival per master per cycle), %0d cycles:", CYC);
    $display("  average latency in cycles/word (M0 M1 M2 M3), worst in brackets");
    for (int s = 0; s < 3; s++)
      $display("  %-8s %6.2f [%0d] %6.2f [%0d] %6.2f [%0d] %6.2f [%0d]",
               s == 0 ? "static" : s == 1 ? "dynamic" : "ATM",
               real'(lat[s][0]) / served[s][0], worst[s][0], real'(lat[s][1]) / served[s][1], worst[s][1],
               real'(lat[s][2]) / served[s][2], worst[s][2], real'(lat[s][3]) / served[s][3], worst[s][3]);
  endtask
endmodule
