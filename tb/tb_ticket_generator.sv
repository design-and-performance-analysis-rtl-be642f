// Testbench of ticket_generator: after reset master i must hold 1+i tickets,
// every clock all values step by one (4-bit wrap), and 'en' low holds them.
module tb_ticket_generator;
  logic            clk = 0, rst = 1, en = 0;
  logic [3:0][3:0] tickets;
  int checks = 0, failures = 0;

  ticket_generator dut (.clk(clk), .rst(rst), .en(en), .tickets(tickets));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0; en = 1;
    for (int k = 0; k < 40; k++) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (tickets[i] != 4'(1 + k + i)) begin
          failures++;
          $display("FAIL k=%0d t%0d=%0d want %0d", k, i, tickets[i], (1 + k + i) % 16);
        end
      end
      @(negedge clk);
    end
    en = 0;
    begin
      logic [3:0][3:0] h;
      h = tickets;
      repeat (3) begin
        @(negedge clk);
        checks++;
        if (tickets != h) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
