// Four-master shared bus with lottery arbitration: the three arbitration
// schemes side by side.
//
// 1. ATM switch system (the main scheme). Four masters each queue cells in an
//    atm_cell_buffer. A non-empty buffer requests the bus; a buffer filled to
//    ADAPT_LEVEL raises its adaptive signal. The atm_switch_arbiter draws a
//    lottery every cycle with the masters' fixed tickets plus the adaptive
//    extra tickets, and gives the bus to the low-priority master when the
//    drawn number exceeds the ticket total. The granted master's head cell is
//    moved over the shared_bus in that cycle and leaves its buffer.
// 2. Static lottery arbiter, fixed tickets 1,2,3,4, with its own request and
//    grant ports.
// 3. Dynamic lottery arbiter, tickets from its ticket generator, with its own
//    request and grant ports.
// The three share only the clock and reset; they are the schemes the source
// design builds and compares, and are kept independent so each can be
// observed.
//
// Timing (ATM path): a cell pushed in cycle k raises the request in k+1; the
// grant can appear in k+3 (two register stages in the arbiter), and the cell
// is on 'bus_data' with 'bus_valid' in the cycle its grant is high. The
// processors that feed the cells and consume the bus words are outside this
// design. Reset is synchronous, active high.
module lottery_bus_top
  import lottery_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned BUF_DEPTH   = 8,
  parameter int unsigned ADAPT_LEVEL = 6
) (
  input  logic                                clk,
  input  logic                                rst,
  // ATM switch system: cell inputs of the four masters
  input  req_vec_t                            cell_push,
  input  logic [NUM_MASTERS-1:0][DATA_W-1:0]  cell_data,
  output req_vec_t                            cell_full,
  output req_vec_t                            cell_drop,
  // ATM switch system: arbitration and shared bus
  output req_vec_t                            atm_req,
  output req_vec_t                            atm_adapt,
  output req_vec_t                            atm_gnt,
  output logic                                atm_inverted,
  output logic                                bus_valid,
  output logic [1:0]                          bus_owner,
  output logic [DATA_W-1:0]                   bus_data,
  // static lottery arbiter
  input  req_vec_t                            st_req,
  output req_vec_t                            st_gnt,
  // dynamic lottery arbiter
  input  req_vec_t                            dy_req,
  output req_vec_t                            dy_gnt,
  output ticket_vec_t                         dy_tickets
);

  // ---------------- ATM switch system ----------------
  logic [NUM_MASTERS-1:0][DATA_W-1:0] head;
  req_vec_t                           take;

  for (genvar i = 0; i < NUM_MASTERS; i++) begin : g_master
    atm_cell_buffer #(
      .DATA_W      (DATA_W),
      .DEPTH       (BUF_DEPTH),
      .ADAPT_LEVEL (ADAPT_LEVEL)
    ) u_buf (
      .clk   (clk),
      .rst   (rst),
      .push  (cell_push[i]),
      .din   (cell_data[i]),
      .pop   (take[i]),
      .dout  (head[i]),
      .count (),
      .full  (cell_full[i]),
      .drop  (cell_drop[i]),
      .req   (atm_req[i]),
      .adapt (atm_adapt[i])
    );
  end

  atm_switch_arbiter u_atm (
    .clk      (clk),
    .rst      (rst),
    .req      (atm_req),
    .adapt    (atm_adapt),
    .gnt      (atm_gnt),
    .inverted (atm_inverted),
    .boost    (),
    .extra    (),
    .num      (),
    .psum     (),
    .total    ()
  );

  shared_bus #(
    .N      (NUM_MASTERS),
    .DATA_W (DATA_W)
  ) u_bus (
    .gnt       (atm_gnt),
    .ready     (atm_req),
    .wdata     (head),
    .take      (take),
    .bus_valid (bus_valid),
    .bus_owner (bus_owner),
    .bus_data  (bus_data)
  );

  // ---------------- static lottery ----------------
  static_lottery_arbiter u_static (
    .clk  (clk),
    .rst  (rst),
    .req  (st_req),
    .gnt  (st_gnt),
    .num  (),
    .psum ()
  );

  // ---------------- dynamic lottery ----------------
  dynamic_lottery_arbiter u_dynamic (
    .clk     (clk),
    .rst     (rst),
    .req     (dy_req),
    .gnt     (dy_gnt),
    .tickets (dy_tickets),
    .num     (),
    .psum    ()
  );

endmodule
