// Testbench of shared_bus: for random one-hot (or empty) grants, ready bits
// and words, the bus must carry exactly the granted, ready master's word.
module tb_shared_bus;
  logic [3:0]       gnt, ready, take;
  logic [3:0][31:0] wdata;
  logic             bus_valid;
  logic [1:0]       bus_owner;
  logic [31:0]      bus_data;
  int checks = 0, failures = 0;

  shared_bus dut (.gnt(gnt), .ready(ready), .wdata(wdata), .take(take),
                  .bus_valid(bus_valid), .bus_owner(bus_owner), .bus_data(bus_data));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      int w;
      w = $urandom_range(0, 4);
      gnt = (w == 4) ? 4'b0 : 4'(1 << w);
      ready = 4'($urandom);
      for (int i = 0; i < 4; i++) wdata[i] = $urandom;
      #1;
      checks++;
      if (w < 4 && ready[w]) begin
        if (!bus_valid || bus_owner != 2'(w) || bus_data != wdata[w] || take != gnt) begin
          failures++; $display("FAIL k=%0d owner=%0d want %0d", k, bus_owner, w);
        end
      end else if (bus_valid || take != 0 || bus_data != 0) begin
        failures++; $display("FAIL k=%0d bus driven without ready grant", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
