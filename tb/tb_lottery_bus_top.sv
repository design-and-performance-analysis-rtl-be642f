// End-to-end testbench of lottery_bus_top at its default parameters.
//
// ATM switch system: four masters receive cells at different rates (master 3
// the busiest), enough to fill buffers. Every word on the shared bus must be
// the oldest outstanding cell of its owner, in order, and after a drain phase
// every accepted cell must have crossed the bus exactly once. The test counts
// the mechanisms of the design and fails if one never happened: a grant to
// each master, priority inversion, the adaptive signal, an adaptive-boosted
// win, a dropped cell at a full buffer and a grant that found its buffer
// already empty. It prints per-master average latency (cycles from push to
// transfer) and share of grants.
//
// Every ATM grant is also compared with a cycle-accurate model of the
// arbiter fed from the top's request and adaptive outputs.
//
// Static and dynamic lottery arbiters: random requests; every grant must be
// one-hot and go to a master that requested two clocks before, and a master
// that requested alone must be granted. Each must have granted every master
// and must have had lotteries without a winner.
module tb_lottery_bus_top;
  import lottery_pkg::*;

  localparam int CYCLES = 6000;

  logic                  clk = 0, rst = 1;
  req_vec_t              cell_push = '0, cell_full, cell_drop;
  logic [3:0][31:0]      cell_data = '0;
  req_vec_t              atm_req, atm_adapt, atm_gnt;
  logic                  atm_inverted, bus_valid;
  logic [1:0]            bus_owner;
  logic [31:0]           bus_data;
  req_vec_t              st_req = '0, st_gnt, dy_req = '0, dy_gnt;
  ticket_vec_t           dy_tickets;
  int checks = 0, failures = 0;

  lottery_bus_top dut (
    .clk(clk), .rst(rst),
    .cell_push(cell_push), .cell_data(cell_data), .cell_full(cell_full), .cell_drop(cell_drop),
    .atm_req(atm_req), .atm_adapt(atm_adapt), .atm_gnt(atm_gnt), .atm_inverted(atm_inverted),
    .bus_valid(bus_valid), .bus_owner(bus_owner), .bus_data(bus_data),
    .st_req(st_req), .st_gnt(st_gnt), .dy_req(dy_req), .dy_gnt(dy_gnt), .dy_tickets(dy_tickets)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle-accurate model of the ATM arbiter, fed from the top's own request
  // and adaptive outputs: tickets 1,2,3,4, 4 extra tickets when adaptive
  localparam int T [4] = '{1, 2, 3, 4};
  logic [3:0] m_num, m_req, m_gnt;
  int         m_f [4];
  int         m_v;

  always @(posedge clk) begin
    if (rst) begin
      m_num <= 4'hF; m_gnt <= '0; m_req <= '0; m_v <= 0; m_f <= '{0, 0, 0, 0};
    end else begin
      logic [3:0] g; int acc, v;
      g = '0;
      if (m_req != 0) begin
        if (int'(m_num) > m_v) begin
          for (int i = 3; i >= 0; i--) if (m_req[i]) g = 4'(1 << i);
        end else
          for (int i = 3; i >= 0; i--) if (int'(m_num) <= m_f[i]) g = 4'(1 << i);
      end
      m_gnt <= g;
      acc = 0; v = 0;
      for (int i = 0; i < 4; i++) begin
        if (atm_req[i]) begin acc += T[i] + (atm_adapt[i] ? 4 : 0); v += T[i]; end
        m_f[i] <= acc;
      end
      m_v   <= v;
      m_req <= atm_req;
      m_num <= {m_num[2:0], m_num[3] ^ m_num[0]};
    end
  end

  // scoreboard
  logic [31:0] q [4][$];
  int          t_push [4][$];
  int          cyc = 0;
  int          lat_sum [4], moved [4], gnts [4], st_g [4], dy_g [4];
  int          n_inv = 0, n_adapt = 0, n_boost_win = 0, n_drop = 0, n_wasted = 0;
  int          n_st_none = 0, n_dy_none = 0, accepted = 0, n_st_lone = 0, n_dy_lone = 0;
  req_vec_t    st_r1 = 0, st_r2 = 0, dy_r1 = 0, dy_r2 = 0, ad1 = 0, ad2 = 0;
  int          seq [4];

  initial begin
    static int rate [4] = '{15, 20, 25, 40};   // percent chance of a new cell per cycle
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int phase = 0; phase < 2; phase++) begin
      int len;
      len = (phase == 0) ? CYCLES : 200;
      for (int k = 0; k < len; k++) begin
        cyc++;
        // ---- observe the cycle that just ended ----
        if (bus_valid) begin
          int o;
          o = int'(bus_owner);
          check(q[o].size() > 0, "transfer from a master with nothing outstanding");
          if (q[o].size() > 0) begin
            check(bus_data == q[o][0], $sformatf("M%0d word %h want %h", o, bus_data, q[o][0]));
            void'(q[o].pop_front());
            lat_sum[o] += cyc - t_push[o].pop_front();
            moved[o]++;
          end
          check(atm_gnt == 4'(1 << o), "bus owner is the granted master");
        end
        check(atm_gnt == m_gnt, $sformatf("ATM grant %b, model %b", atm_gnt, m_gnt));
        if (atm_gnt != 0 && !bus_valid) n_wasted++;
        for (int i = 0; i < 4; i++) if (atm_gnt[i]) begin
          gnts[i]++;
          if (ad2[i] && !atm_inverted) n_boost_win++;
        end
        if (atm_inverted) n_inv++;
        if (atm_adapt != 0) n_adapt++;
        check($onehot0(atm_gnt) && $onehot0(st_gnt) && $onehot0(dy_gnt), "one-hot grants");
        check((st_gnt & ~st_r2) == 0, "static grant without request");
        check((dy_gnt & ~dy_r2) == 0, "dynamic grant without request");
        if ($countones(st_r2) == 1) begin
          check(st_gnt == st_r2, "static: lone request not granted");
          n_st_lone++;
        end
        if ($countones(dy_r2) == 1) begin
          check(dy_gnt == dy_r2, "dynamic: lone request not granted");
          n_dy_lone++;
        end
        if (st_gnt == 0 && st_r2 != 0) n_st_none++;
        if (dy_gnt == 0 && dy_r2 != 0) n_dy_none++;
        for (int i = 0; i < 4; i++) begin
          if (st_gnt[i]) st_g[i]++;
          if (dy_gnt[i]) dy_g[i]++;
        end
        // request history: grants follow requests by two clocks
        st_r2 = st_r1; dy_r2 = dy_r1; ad2 = ad1;
        // ---- drive the next cycle ----
        for (int i = 0; i < 4; i++) begin
          cell_push[i] = (phase == 0) && ($urandom_range(99) < rate[i]);
          cell_data[i] = {8'(i), 24'(seq[i])};
        end
        st_req = 4'($urandom); dy_req = 4'($urandom);
        st_r1 = st_req; dy_r1 = dy_req; ad1 = atm_adapt & atm_req;
        #1;
        for (int i = 0; i < 4; i++) begin
          if (cell_drop[i]) n_drop++;
          if (cell_push[i] && !cell_drop[i]) begin
            q[i].push_back(cell_data[i]);
            t_push[i].push_back(cyc);
            seq[i]++;
            accepted++;
          end
        end
        @(negedge clk);
      end
    end
    for (int i = 0; i < 4; i++) begin
      check(q[i].size() == 0, $sformatf("M%0d has %0d cells left after drain", i, q[i].size()));
      check(gnts[i] > 0, $sformatf("ATM never granted M%0d", i));
      check(st_g[i] > 0, $sformatf("static never granted M%0d", i));
      check(dy_g[i] > 0, $sformatf("dynamic never granted M%0d", i));
    end
    check(n_inv > 0, "no priority inversion");
    check(n_adapt > 0, "no adaptive signal");
    check(n_boost_win > 0, "no adaptive-boosted win");
    check(n_drop > 0, "no cell dropped at a full buffer");
    check(n_wasted > 0, "no grant to an emptied buffer");
    check(n_st_none > 0, "static: no lottery without winner");
    check(n_dy_none > 0, "dynamic: no lottery without winner");
    check(n_st_lone > 0 && n_dy_lone > 0, "no lone-request lottery");
    $display("ATM: accepted %0d cells, dropped %0d, inversions %0d, adaptive cycles %0d, boosted wins %0d, empty grants %0d",
             accepted, n_drop, n_inv, n_adapt, n_boost_win, n_wasted);
    for (int i = 0; i < 4; i++)
      $display("ATM M%0d: %0d words, avg latency %0d.%02d cycles/word, %0d grants",
               i, moved[i], (moved[i] != 0) ? lat_sum[i] / moved[i] : 0,
               (moved[i] != 0) ? (100 * lat_sum[i] / moved[i]) % 100 : 0, gnts[i]);
    $display("static grants %0d %0d %0d %0d, no-winner %0d; dynamic grants %0d %0d %0d %0d, no-winner %0d",
             st_g[0], st_g[1], st_g[2], st_g[3], n_st_none, dy_g[0], dy_g[1], dy_g[2], dy_g[3], n_dy_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
