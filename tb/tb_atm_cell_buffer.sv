// Testbench of atm_cell_buffer (depth 8, adaptive level 6): random pushes and
// pops against a queue model. Checks the head word, the count, 'req' (not
// empty), 'adapt' (count >= 6), 'full' and the 'drop' of a push into a full
// buffer; requires each of full, drop and adapt to have happened.
module tb_atm_cell_buffer;
  logic        clk = 0, rst = 1, push = 0, pop = 0;
  logic [31:0] din = 0, dout;
  logic [3:0]  count;
  logic        full, drop, req, adapt;
  int checks = 0, failures = 0;

  atm_cell_buffer dut (.clk(clk), .rst(rst), .push(push), .din(din), .pop(pop), .dout(dout),
                       .count(count), .full(full), .drop(drop), .req(req), .adapt(adapt));

  always #5 clk = ~clk;

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
    logic [31:0] q [$];
    int n_full = 0, n_drop = 0, n_adapt = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int k = 0; k < 2000; k++) begin
      // phases: filling, balanced, draining
      int p_push, p_pop;
      case ((k / 200) % 3)
        0: begin p_push = 80; p_pop = 20; end
        1: begin p_push = 50; p_pop = 50; end
        default: begin p_push = 20; p_pop = 80; end
      endcase
      push = ($urandom_range(99) < p_push);
      pop  = ($urandom_range(99) < p_pop);
      din  = $urandom;
      #1;
      check(int'(count) == q.size(), $sformatf("count %0d want %0d", count, q.size()));
      check(req == (q.size() != 0), "req");
      check(adapt == (q.size() >= 6), "adapt");
      check(full == (q.size() == 8), "full");
      if (q.size() != 0) check(dout == q[0], "head word");
      check(drop == (push && q.size() == 8 && !pop), "drop");
      if (full) n_full++;
      if (drop) n_drop++;
      if (adapt) n_adapt++;
      @(posedge clk);
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push && q.size() < 8) q.push_back(din);
      @(negedge clk);
    end
    check(n_full > 0, "never full");
    check(n_drop > 0, "never dropped");
    check(n_adapt > 0, "adaptive signal never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
