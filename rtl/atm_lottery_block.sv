// Lottery block of the ATM switch arbiter: comparison, grant generation and
// priority inversion.
//
// Inputs are the partial sums F_i = f_0 + ... + f_i of the effective
// (adaptive) tickets of the requesting masters, the total V = sum r_j*t_j of
// their base tickets, and the drawn number n in 1..15.
//  * n <= V: the lowest master with n <= F_i wins, i.e. the master whose
//    slice of the effective ticket range holds n. Extra adaptive tickets
//    widen a master's slice and push the later masters' slices up.
//  * n > V: instead of leaving the bus idle, the bus goes to the master of
//    lowest priority by priority inversion. Here "lowest priority" is the
//    requesting master holding the fewest base tickets (lowest index on a
//    tie); with the example tickets 1,2,3,4 that is master 0, which is what
//    the source waveform shows for n = A, B, C, 9 with V = 7.
//  * no request: no grant.
// Testing n against V rather than against the effective total follows that
// waveform (n = A = 10 grants master 0 although F_3 = 11 there).
//
// Timing: 'req', 'tickets', 'psum' and 'total' must belong to the same cycle
// (the arbiter registers them together); the one-hot grant and the 'inverted'
// flag are registered and last one cycle. Reset clears them.
module atm_lottery_block
  import lottery_pkg::*;
#(
  parameter int unsigned SUM_W = 8
) (
  input  logic                               clk,
  input  logic                               rst,
  input  req_vec_t                           req,
  input  ticket_vec_t                        tickets,
  input  logic [NUM_MASTERS-1:0][SUM_W-1:0]  psum,
  input  logic [SUM_W-1:0]                   total,
  input  rand_t                              num,
  output req_vec_t                           gnt,
  output logic                               inverted
);

  localparam int unsigned CW = SUM_W + RAND_W;

  req_vec_t            in_range_win;   // winner of the ordinary lottery
  req_vec_t            low_prio;       // requesting master with fewest tickets
  logic                over;           // n above the base ticket total
  logic [TICKET_W-1:0] best_t;

  always_comb begin
    in_range_win = '0;
    for (int i = NUM_MASTERS - 1; i >= 0; i--)
      if (CW'(num) <= CW'(psum[i])) in_range_win = NUM_MASTERS'(1) << i;

    low_prio = '0;
    best_t   = '1;
    for (int i = 0; i < NUM_MASTERS; i++)
      if (req[i] && (low_prio == '0 || tickets[i] < best_t)) begin
        low_prio = NUM_MASTERS'(1) << i;
        best_t   = tickets[i];
      end

    over = CW'(num) > CW'(total);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt      <= '0;
      inverted <= 1'b0;
    end else if (req == '0) begin
      gnt      <= '0;
      inverted <= 1'b0;
    end else if (over) begin
      gnt      <= low_prio;
      inverted <= 1'b1;
    end else begin
      gnt      <= in_range_win;
      inverted <= 1'b0;
    end
  end

  a_onehot0: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));

endmodule
