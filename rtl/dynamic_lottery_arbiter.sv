// Dynamic lottery bus arbiter for four masters.
//
// Works like the static lottery arbiter, but the ticket counts are not fixed:
// a ticket generator supplies new values every cycle, so both which masters
// compete and how many tickets each holds vary from lottery to lottery. The
// lottery manager ANDs every ticket value with its request bit and sums the
// results in an adder chain into the partial sums S_0..S_3; a 4-bit LFSR draws
// n in 1..15 and the lowest master with n <= S_i gets a one-cycle grant. If n
// is above every partial sum no master is granted in that cycle. A master
// that requests alone is always granted (trivial lottery).
//
// The partial sums are 4 bits wide by default and wrap, as in the values the
// source design prints (s3 = 22 mod 16 = 6, for instance); a wider SUM_W
// removes the wrap. Timing as in the static arbiter: tickets and requests are
// registered into the partial sums, and the grant follows one clock later.
module dynamic_lottery_arbiter
  import lottery_pkg::*;
#(
  parameter int unsigned SUM_W = 4
) (
  input  logic                               clk,
  input  logic                               rst,
  input  req_vec_t                           req,
  output req_vec_t                           gnt,
  output ticket_vec_t                        tickets,
  output rand_t                              num,
  output logic [NUM_MASTERS-1:0][SUM_W-1:0]  psum
);

  ticket_generator #(
    .N        (NUM_MASTERS),
    .TICKET_W (TICKET_W)
  ) u_tickets (
    .clk     (clk),
    .rst     (rst),
    .en      (1'b1),
    .tickets (tickets)
  );

  req_vec_t req_q;   // requests of the lottery now in the grant stage

  lfsr_rng u_rng (
    .clk (clk),
    .rst (rst),
    .en  (1'b1),
    .num (num)
  );

  lottery_manager #(
    .N        (NUM_MASTERS),
    .TICKET_W (TICKET_W),
    .SUM_W    (SUM_W)
  ) u_manager (
    .clk     (clk),
    .rst     (rst),
    .req     (req),
    .tickets (tickets),
    .psum    (psum),
    .req_q   (req_q)
  );

  lottery_grant #(
    .N      (NUM_MASTERS),
    .SUM_W  (SUM_W),
    .RAND_W (RAND_W)
  ) u_grant (
    .clk  (clk),
    .rst  (rst),
    .req  (req_q),
    .psum (psum),
    .num  (num),
    .gnt  (gnt)
  );

endmodule
