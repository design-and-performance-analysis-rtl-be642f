// ATM cell buffer of one bus master, with request and adaptive signal.
//
// Each master of the ATM switch system queues the cells it must send in a
// FIFO. The master requests the bus while the FIFO holds a cell, and it
// counts the occupied buffer positions: when the count reaches ADAPT_LEVEL
// ("the data approaches the limited amount") it raises the adaptive signal,
// which earns it extra lottery tickets. Counting buffer positions and raising
// the adaptive signal near the limit follow the source design; the depth, the
// threshold, the word width and the FIFO itself are this design's choices.
// A cell is one bus word here: the source design grants one word per lottery
// and leaves the data length out of its evaluation.
//
// Interface: 'push' with 'din' writes a cell; a push into a full buffer is
// dropped and flagged on 'drop' for that cycle. 'pop' removes the head cell,
// which is always visible on 'dout'; a pop of an empty buffer is ignored.
// 'req' = not empty, 'adapt' = count >= ADAPT_LEVEL. Reset empties the FIFO.
module atm_cell_buffer #(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned ADAPT_LEVEL = 6
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [DATA_W-1:0]          din,
  input  logic                       pop,
  output logic [DATA_W-1:0]          dout,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       drop,
  output logic                       req,
  output logic                       adapt
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic              do_push, do_pop;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign req     = (count != '0);
  assign adapt   = (count >= ADAPT_LEVEL[$clog2(DEPTH+1)-1:0]);
  assign do_pop  = pop && req;
  assign do_push = push && (!full || do_pop);
  assign drop    = push && !do_push;
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_ptr] <= din;

  a_count_bound: assert property (@(posedge clk) disable iff (rst) count <= DEPTH[$clog2(DEPTH+1)-1:0]);

endmodule
