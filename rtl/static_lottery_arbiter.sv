// Static lottery bus arbiter for four masters.
//
// Each master holds a fixed number of lottery tickets (parameter TICKETS,
// default 1, 2, 3 and 4 tickets for masters 0..3 as in the source design's
// example). Every cycle the lottery manager forms the partial sums
// S_i = r_0 t_0 + ... + r_i t_i of the requesting masters' tickets, a 4-bit
// LFSR draws a number n in 1..15, and the master with S_{i-1} < n <= S_i is
// granted the bus for one cycle. A master therefore wins with a probability
// proportional to its tickets, but only while n <= T = S_3; draws above the
// ticket total grant nobody. A master that requests alone is granted in
// every cycle (trivial lottery).
//
// Timing: requests are sampled into the registered partial sums, and the
// grant register is loaded from them one clock later, so a request reaches
// the grant lines two clocks after it is raised. The LFSR steps every clock.
// 'num' and 'psum' are brought out for observation (n1 and h0..h3 of the
// source waveform). Sum width SUM_W = 4 follows the printed values; with the
// default tickets the total (10) never wraps.
module static_lottery_arbiter
  import lottery_pkg::*;
#(
  parameter ticket_vec_t TICKETS = {4'd4, 4'd3, 4'd2, 4'd1},
  parameter int unsigned SUM_W   = 4
) (
  input  logic                               clk,
  input  logic                               rst,
  input  req_vec_t                           req,
  output req_vec_t                           gnt,
  output rand_t                              num,
  output logic [NUM_MASTERS-1:0][SUM_W-1:0]  psum
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
    .tickets (TICKETS),
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
