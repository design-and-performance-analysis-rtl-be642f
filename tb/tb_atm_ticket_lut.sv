// Testbench of atm_ticket_lut: m = r & a; g_i = 4 where m_i is set, else 0;
// f_i = r_i t_i + g_i. Checks the worked case r=1011, a=1000, tickets 1..4
// (m=1000, g=0,0,0,4, f=1,2,0,8) and random vectors.
module tb_atm_ticket_lut;
  import lottery_pkg::*;

  req_vec_t    req, adapt, boost;
  ticket_vec_t tickets, extra;
  logic [3:0][4:0] eff;
  int checks = 0, failures = 0;

  atm_ticket_lut dut (.req(req), .adapt(adapt), .tickets(tickets), .boost(boost),
                      .extra(extra), .eff_tickets(eff));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 4'b1011; adapt = 4'b1000; tickets = {4'd4, 4'd3, 4'd2, 4'd1};
    #1;
    checks++; if (boost != 4'b1000) begin failures++; $display("FAIL m=%b", boost); end
    checks++; if (extra != {4'd4, 4'd0, 4'd0, 4'd0}) begin failures++; $display("FAIL g=%h", extra); end
    checks++; if (eff != {5'd8, 5'd0, 5'd2, 5'd1}) begin failures++; $display("FAIL f=%h", eff); end
    for (int k = 0; k < 500; k++) begin
      req = 4'($urandom); adapt = 4'($urandom); tickets = 16'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        int want;
        want = (req[i] ? int'(tickets[i]) : 0) + ((req[i] && adapt[i]) ? 4 : 0);
        checks++;
        if (int'(eff[i]) != want || boost[i] != (req[i] & adapt[i])) begin
          failures++; $display("FAIL k=%0d i=%0d f=%0d want %0d", k, i, eff[i], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
