// Testbench of lfsr_rng: after reset the generator must produce the 15-value
// sequence F E D A 5 B 6 C 9 2 4 8 1 3 7 and repeat it, must never show 0,
// must visit each of 1..15 once per period and must hold while 'en' is low.
module tb_lfsr_rng;
  import lottery_pkg::*;

  logic  clk = 0, rst = 1, en = 0;
  rand_t num;
  int    checks = 0, failures = 0;

  localparam rand_t SEQ [15] = '{4'hF, 4'hE, 4'hD, 4'hA, 4'h5, 4'hB, 4'h6, 4'hC,
                                 4'h9, 4'h2, 4'h4, 4'h8, 4'h1, 4'h3, 4'h7};

  lfsr_rng dut (.clk(clk), .rst(rst), .en(en), .num(num));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [16];
    @(negedge clk); @(negedge clk);
    rst = 0; en = 1;
    for (int k = 0; k < 45; k++) begin
      check(num == SEQ[k % 15], $sformatf("step %0d: num=%h want %h", k, num, SEQ[k % 15]));
      check(num != 0, "zero state");
      if (k < 15) seen[num]++;
      @(negedge clk);
    end
    for (int v = 1; v < 16; v++) check(seen[v] == 1, $sformatf("value %0d seen %0d times", v, seen[v]));
    // hold with en low
    begin
      rand_t held;
      en = 0; held = num;
      repeat (5) begin
        @(negedge clk);
        check(num == held, "held while en low");
      end
    end
    // reset returns to seed
    rst = 1; @(negedge clk); rst = 0;
    check(num == 4'hF, "reset seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
