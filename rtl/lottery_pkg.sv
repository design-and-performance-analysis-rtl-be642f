// Shared constants and types of the lottery bus arbiters.
//
// All three arbiters (static lottery, dynamic lottery, ATM switch) serve four
// bus masters, hold 4-bit ticket values and draw 4-bit pseudo random numbers
// in the range 1..15. The master count and the 4-bit widths follow the
// waveforms of the source design; everything else here is shared plumbing.
package lottery_pkg;

  localparam int unsigned NUM_MASTERS = 4;   // four masters M0..M3
  localparam int unsigned TICKET_W    = 4;   // ticket values 0..15
  localparam int unsigned RAND_W      = 4;   // random numbers 1..15

  typedef logic [NUM_MASTERS-1:0]                req_vec_t;
  typedef logic [NUM_MASTERS-1:0][TICKET_W-1:0]  ticket_vec_t;
  typedef logic [RAND_W-1:0]                     rand_t;


endpackage
