// Testbench of lottery_grant: for random partial sums and numbers the grant
// one clock later must select the lowest master i with num <= S_i, and be
// zero when num exceeds every S_i; a lone request must be granted whatever
// the number. Also replays the fixed sums 1,3,6,10 with
// the 15 LFSR values, which must grant masters 3,2,2,3,1,2,3,0,1,3 in that
// order with 5 empty cycles.
module tb_lottery_grant;
  logic            clk = 0, rst = 1;
  logic [3:0][3:0] psum;
  logic [3:0]      num;
  logic [3:0]      gnt;
  logic [3:0]      req;
  int checks = 0, failures = 0;

  lottery_grant dut (.clk(clk), .rst(rst), .req(req), .psum(psum), .num(num), .gnt(gnt));

  always #5 clk = ~clk;

  function automatic logic [3:0] ref_gnt(input logic [3:0] r, input logic [3:0][3:0] s,
                                         input logic [3:0] n);
    if (r == 4'b0001 || r == 4'b0010 || r == 4'b0100 || r == 4'b1000) return r;
    for (int i = 0; i < 4; i++)
      if (n <= s[i]) return 4'(1 << i);
    return 4'b0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] seq [15] = '{4'hF, 4'hE, 4'hD, 4'hA, 4'h5, 4'hB, 4'h6, 4'hC,
                             4'h9, 4'h2, 4'h4, 4'h8, 4'h1, 4'h3, 4'h7};
    int order [10] = '{3, 2, 2, 3, 1, 2, 3, 0, 1, 3};
    int got [$];
    int idle = 0;
    psum = '0; num = 4'hF; req = 4'b1111;
    @(negedge clk); @(negedge clk);
    checks++; if (gnt != 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    psum = {4'd10, 4'd6, 4'd3, 4'd1};
    for (int k = 0; k < 15; k++) begin
      num = seq[k];
      @(negedge clk);
      if (gnt == 0) idle++;
      else for (int i = 0; i < 4; i++) if (gnt[i]) got.push_back(i);
    end
    checks++;
    if (idle != 5) begin failures++; $display("FAIL idle=%0d", idle); end
    checks++;
    if (got.size() != 10) begin failures++; $display("FAIL %0d grants", got.size()); end
    else for (int k = 0; k < 10; k++) begin
      checks++;
      if (got[k] != order[k]) begin failures++; $display("FAIL order %0d: %0d want %0d", k, got[k], order[k]); end
    end
    for (int k = 0; k < 1000; k++) begin
      logic [3:0][3:0] s;
      logic [3:0] n;
      logic [3:0] r;
      s = 16'($urandom);
      n = 4'($urandom_range(1, 15));
      r = 4'($urandom);
      psum = s; num = n; req = r;
      @(negedge clk);
      checks++;
      if (gnt !== ref_gnt(r, s, n)) begin
        failures++;
        $display("FAIL r=%b s=%h n=%h gnt=%b want %b", r, s, n, gnt, ref_gnt(r, s, n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
