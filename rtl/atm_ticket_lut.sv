// Adaptive ticket lookup of the ATM switch arbiter.
//
// A master that raises its adaptive signal while it requests the bus receives
// extra lottery tickets from a lookup table. The request and adaptive vectors
// are ANDed bit by bit (m = r & a); for every master with m_i set the table
// entry g_i = ADD_TICKETS[i] is added to its ticket count, so the effective
// tickets are f_i = r_i*t_i + m_i*ADD_TICKETS[i]. The AND, the lookup and the
// addition follow the source design. The table contents are not given there;
// the default of 4 extra tickets per master matches its one printed example
// (master 3: t3 = 4, g3 = 4, f3 = 8).
//
// Purely combinational. 'boost' is m, 'extra' is g and 'eff_tickets' is f,
// one TICKET_W+1-bit value per master.
module atm_ticket_lut
  import lottery_pkg::*;
#(
  parameter ticket_vec_t ADD_TICKETS = {4'd4, 4'd4, 4'd4, 4'd4}
) (
  input  req_vec_t                                 req,
  input  req_vec_t                                 adapt,
  input  ticket_vec_t                              tickets,
  output req_vec_t                                 boost,
  output ticket_vec_t                              extra,
  output logic [NUM_MASTERS-1:0][TICKET_W:0]       eff_tickets
);

  always_comb begin
    boost = req & adapt;
    for (int i = 0; i < NUM_MASTERS; i++) begin
      extra[i]       = ADD_TICKETS[i] & {TICKET_W{boost[i]}};
      eff_tickets[i] = {1'b0, tickets[i] & {TICKET_W{req[i]}}} + {1'b0, extra[i]};
    end
  end

endmodule
