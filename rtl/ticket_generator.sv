// Ticket generator of the dynamic lottery arbiter.
//
// The dynamic lottery lets the ticket count of every master change from one
// lottery to the next. The source design shows the generated values but not
// how they are made: each cycle master 0 holds one ticket more than in the
// cycle before (1, 2, 3, ... wrapping at 4 bits) and master i holds i tickets
// more than master 0 (t1 = t0+1, t2 = t0+2, t3 = t0+3, all modulo 16). This
// module reproduces exactly that pattern with one counter and an adder per
// master; the counter and adders are this design's own construction.
//
// Interface: 'tickets[i]' is master i's current ticket value. After reset
// master 0 holds START tickets; 'en' steps the counter once per clock.
module ticket_generator #(
  parameter int unsigned          N        = 4,
  parameter int unsigned          TICKET_W = 4,
  parameter logic [TICKET_W-1:0]  START    = 1
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        en,
  output logic [N-1:0][TICKET_W-1:0]  tickets
);

  logic [TICKET_W-1:0] base;

  always_ff @(posedge clk) begin
    if (rst)     base <= START;
    else if (en) base <= base + 1'b1;
  end

  always_comb
    for (int i = 0; i < N; i++)
      tickets[i] = base + TICKET_W'(i);

endmodule
