// Testbench of lottery_manager: random requests and tickets; one clock later
// every partial sum must equal the sum over j <= i of (r_j ? t_j : 0), taken
// modulo 2^SUM_W, and req_q must be the requests. Also checks the sums 1, 3, 6, 10 of tickets 1..4.
module tb_lottery_manager;
  logic                 clk = 0, rst = 1;
  logic [3:0]           req;
  logic [3:0][3:0]      tickets;
  logic [3:0][3:0]      psum;
  logic [3:0]           req_q;
  int checks = 0, failures = 0;

  lottery_manager dut (.clk(clk), .rst(rst), .req(req), .tickets(tickets), .psum(psum), .req_q(req_q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    req = '0; tickets = '0;
    @(negedge clk); @(negedge clk);
    checks++; if (psum != '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    req = 4'b1111; tickets = {4'd4, 4'd3, 4'd2, 4'd1};
    @(negedge clk);
    checks++;
    if (psum != {4'd10, 4'd6, 4'd3, 4'd1}) begin failures++; $display("FAIL 1,3,6,10 got %h", psum); end
    for (int k = 0; k < 500; k++) begin
      logic [3:0]      r;
      logic [3:0][3:0] t;
      r = 4'($urandom); t = 16'($urandom);
      req = r; tickets = t;
      @(negedge clk);
      checks++;
      if (req_q != r) begin failures++; $display("FAIL req_q k=%0d", k); end
      want = 0;
      for (int i = 0; i < 4; i++) begin
        if (r[i]) want += t[i];
        checks++;
        if (psum[i] != 4'(want)) begin
          failures++;
          $display("FAIL k=%0d i=%0d psum=%0d want=%0d", k, i, psum[i], want % 16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
