// ATM switch bus arbiter: a static lottery with adaptive extra tickets and
// priority inversion.
//
// Inputs per master are its request r_i and its adaptive signal a_i, which a
// master raises when its ATM cell buffer is close to full. Tickets t_i are
// fixed (parameter TICKETS, default 1,2,3,4 as in the source example). A
// master that requests with a_i set gets ADD_TICKETS[i] extra tickets from a
// lookup table, so its chance of winning becomes
//     P(i) = r_i (t_i + a_i g_i) / sum_j r_j (t_j + a_j g_j).
// A 4-bit LFSR draws n in 1..15 every cycle. If n is within the base ticket
// total V = sum r_j t_j, the master whose slice of the effective ticket range
// holds n wins; if n is above V the bus is not left idle but given to the
// requesting master with the fewest tickets (priority inversion).
//
// Structure: atm_ticket_lut (m = r & a, lookup, addition) feeds two
// lottery_manager adder chains, one over the effective tickets (partial sums
// F_i) and one over the base tickets (total V); atm_lottery_block compares.
//
// Timing: stage 1 registers F, V and, alongside them, the requests; stage 2
// registers the one-cycle one-hot grant. A request therefore shows on the
// grant lines two clocks after it is raised. Partial sums are SUM_W = 8 bits,
// wide enough that the largest total, 4 * (15 + 15) = 120, does not wrap.
module atm_switch_arbiter
  import lottery_pkg::*;
#(
  parameter ticket_vec_t TICKETS     = {4'd4, 4'd3, 4'd2, 4'd1},
  parameter ticket_vec_t ADD_TICKETS = {4'd4, 4'd4, 4'd4, 4'd4},
  parameter int unsigned SUM_W       = 8
) (
  input  logic                               clk,
  input  logic                               rst,
  input  req_vec_t                           req,
  input  req_vec_t                           adapt,
  output req_vec_t                           gnt,
  output logic                               inverted,
  output req_vec_t                           boost,
  output ticket_vec_t                        extra,
  output rand_t                              num,
  output logic [NUM_MASTERS-1:0][SUM_W-1:0]  psum,
  output logic [SUM_W-1:0]                   total
);

  logic [NUM_MASTERS-1:0][TICKET_W:0]       eff_tickets;
  logic [NUM_MASTERS-1:0][SUM_W-1:0]        base_psum;
  req_vec_t                                 req_q;

  atm_ticket_lut #(
    .ADD_TICKETS (ADD_TICKETS)
  ) u_lut (
    .req         (req),
    .adapt       (adapt),
    .tickets     (TICKETS),
    .boost       (boost),
    .extra       (extra),
    .eff_tickets (eff_tickets)
  );

  // Effective tickets are already masked by the requests.
  lottery_manager #(
    .N        (NUM_MASTERS),
    .TICKET_W (TICKET_W + 1),
    .SUM_W    (SUM_W)
  ) u_eff_sums (
    .clk     (clk),
    .rst     (rst),
    .req     ('1),
    .tickets (eff_tickets),
    .psum    (psum),
    .req_q   ()
  );

  lottery_manager #(
    .N        (NUM_MASTERS),
    .TICKET_W (TICKET_W),
    .SUM_W    (SUM_W)
  ) u_base_sums (
    .clk     (clk),
    .rst     (rst),
    .req     (req),
    .tickets (TICKETS),
    .psum    (base_psum),
    .req_q   (req_q)
  );

  assign total = base_psum[NUM_MASTERS-1];

  lfsr_rng u_rng (
    .clk (clk),
    .rst (rst),
    .en  (1'b1),
    .num (num)
  );

  atm_lottery_block #(
    .SUM_W (SUM_W)
  ) u_block (
    .clk      (clk),
    .rst      (rst),
    .req      (req_q),
    .tickets  (TICKETS),
    .psum     (psum),
    .total    (total),
    .num      (num),
    .gnt      (gnt),
    .inverted (inverted)
  );

endmodule
