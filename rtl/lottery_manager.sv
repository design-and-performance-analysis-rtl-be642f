// Lottery manager: the partial ticket sums of a lottery arbiter.
//
// For every master i it forms S_i = r_0*t_0 + r_1*t_1 + ... + r_i*t_i, where
// r_j is master j's request and t_j its ticket count. Each product r_j*t_j is
// a bitwise AND of the ticket value with the request bit, and the products are
// summed by a chain of adders, as in the source design. S_{N-1} is the total T
// of the tickets now in play; a drawn number n with S_{i-1} < n <= S_i picks
// master i.
//
// Timing: the sums are registered, so they reflect the requests and tickets of
// the previous clock, and 'req_q' is that clock's request vector, registered
// alongside so that later stages see requests and sums of the same lottery (the source waveforms show s0..s3 one cycle behind
// t0..t3). The sums are SUM_W bits wide and wrap around on overflow; the
// default of 4 bits reproduces the wrapped values printed for the dynamic
// lottery (e.g. 4+5+6+7 = 22 shown as 6). Reset clears the sums.
module lottery_manager #(
  parameter int unsigned N        = 4,
  parameter int unsigned TICKET_W = 4,
  parameter int unsigned SUM_W    = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N-1:0]                  req,
  input  logic [N-1:0][TICKET_W-1:0]    tickets,
  output logic [N-1:0][SUM_W-1:0]       psum,
  output logic [N-1:0]                  req_q
);

  logic [N-1:0][SUM_W-1:0] chain;  // outputs of the adder chain

  always_comb begin
    logic [SUM_W-1:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++) begin
      acc      = acc + SUM_W'(tickets[i] & {TICKET_W{req[i]}});  // r_i AND t_i
      chain[i] = acc;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      psum  <= '0;
      req_q <= '0;
    end else begin
      psum  <= chain;
      req_q <= req;
    end
  end

endmodule
