// Comparison and grant generation of the static and dynamic lottery managers.
//
// The drawn number 'num' (1..15) is compared with every partial sum S_i. The
// winner is the lowest-numbered master whose partial sum is not below the
// number, i.e. the master with S_{i-1} < num <= S_i. When the number is larger
// than every partial sum (larger than the ticket total T) nobody wins and no
// grant is given in that cycle: the source design names this as the weakness
// of the plain lottery, and its static lottery waveform shows these empty
// cycles (for tickets 1,2,3,4 the numbers 11..15 grant nobody).
//
// A single requesting master is granted at once whatever the number: with
// only one contender the lottery is trivial. This follows the source
// design's description of the lottery manager; it lets a lone low-ticket
// master through in every cycle instead of only when the number is small.
//
// Timing: 'req' must be the request vector the partial sums were formed
// from (lottery_manager's 'req_q'). The grant is registered and lasts one
// cycle, as the source design grants one word per lottery. A master with no
// request has S_i = S_{i-1} and so can never be the lowest match. Reset
// clears the grants.
module lottery_grant #(
  parameter int unsigned N      = 4,
  parameter int unsigned SUM_W  = 4,
  parameter int unsigned RAND_W = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [N-1:0]             req,
  input  logic [N-1:0][SUM_W-1:0]  psum,
  input  logic [RAND_W-1:0]        num,
  output logic [N-1:0]             gnt
);

  logic [N-1:0] covers;   // num <= S_i
  logic [N-1:0] winner;   // lowest covering master, one-hot

  always_comb begin
    winner = '0;
    for (int i = 0; i < N; i++)
      covers[i] = (RAND_W + SUM_W)'(num) <= (RAND_W + SUM_W)'(psum[i]);
    for (int i = N - 1; i >= 0; i--)
      if (covers[i]) winner = N'(1) << i;
    if (req != '0 && (req & (req - 1'b1)) == '0) winner = req;  // lone request
  end

  always_ff @(posedge clk) begin
    if (rst) gnt <= '0;
    else     gnt <= winner;
  end

  a_onehot0: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));

endmodule
