// Testbench of atm_lottery_block.
// Worked case: requests 1011, tickets 1,2,3,4, effective partial sums
// 1,3,3,11, base total 7. Numbers A,5,B,6,C,9,2 must grant masters
// 0,3,0,3,0,0,1, with the inversion flag set for A, B, C and 9.
// Random case: grant and flag against an independent model; no request must
// give no grant.
module tb_atm_lottery_block;
  import lottery_pkg::*;

  logic            clk = 0, rst = 1;
  req_vec_t        req, gnt;
  ticket_vec_t     tickets;
  logic [3:0][7:0] psum;
  logic [7:0]      total;
  rand_t           num;
  logic            inverted;
  int checks = 0, failures = 0;

  atm_lottery_block dut (.clk(clk), .rst(rst), .req(req), .tickets(tickets), .psum(psum),
                         .total(total), .num(num), .gnt(gnt), .inverted(inverted));

  always #5 clk = ~clk;

  task automatic model(input req_vec_t r, input ticket_vec_t t, input logic [3:0][7:0] s,
                       input logic [7:0] v, input rand_t n,
                       output req_vec_t g, output logic inv);
    g = '0; inv = 0;
    if (r == 0) return;
    if (int'(n) > int'(v)) begin
      int best;
      best = -1;
      for (int i = 0; i < 4; i++)
        if (r[i] && (best < 0 || t[i] < t[best])) best = i;
      g = 4'(1 << best); inv = 1;
      return;
    end
    for (int i = 0; i < 4; i++)
      if (int'(n) <= int'(s[i])) begin g = 4'(1 << i); return; end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rand_t nseq [7] = '{4'hA, 4'h5, 4'hB, 4'h6, 4'hC, 4'h9, 4'h2};
    int    wseq [7] = '{0, 3, 0, 3, 0, 0, 1};
    req = 0; tickets = 0; psum = 0; total = 0; num = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    req = 4'b1011; tickets = {4'd4, 4'd3, 4'd2, 4'd1};
    psum = {8'd11, 8'd3, 8'd3, 8'd1}; total = 8'd7;
    for (int k = 0; k < 7; k++) begin
      num = nseq[k];
      @(negedge clk);
      checks++;
      if (gnt != 4'(1 << wseq[k]) || inverted != (nseq[k] > 7)) begin
        failures++; $display("FAIL n=%h gnt=%b inv=%b", nseq[k], gnt, inverted);
      end
    end
    for (int k = 0; k < 1000; k++) begin
      req_vec_t g; logic inv;
      logic [3:0][4:0] f;
      int acc, v;
      req = 4'($urandom); tickets = 16'($urandom);
      acc = 0; v = 0;
      for (int i = 0; i < 4; i++) begin
        f[i] = req[i] ? 5'(tickets[i]) + (($urandom & 1) ? 5'd4 : 5'd0) : 5'd0;
        acc += f[i];
        psum[i] = 8'(acc);
        if (req[i]) v += tickets[i];
      end
      total = 8'(v);
      num = 4'($urandom_range(1, 15));
      model(req, tickets, psum, total, num, g, inv);
      @(negedge clk);
      checks++;
      if (gnt !== g || inverted !== inv) begin
        failures++; $display("FAIL k=%0d gnt=%b want %b inv=%b", k, gnt, g, inverted);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
