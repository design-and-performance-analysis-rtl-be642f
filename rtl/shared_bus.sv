// Shared bus of the multi-master system.
//
// All masters sit on one shared bus; the arbiter's one-hot grant decides
// whose word is driven onto it. This module is the bus multiplexer: in a
// cycle where master i is granted and has a word ready ('ready[i]'), the
// bus carries that word, 'bus_valid' is high, 'bus_owner' is i and 'take[i]'
// tells the master its word was transferred. A grant to a master that has
// nothing ready (its request was already served while the grant was in
// flight) leaves the bus idle for that cycle. The source design shows the
// shared bus and the masters' bus interfaces only as blocks; the multiplexer
// is this design's own minimal realisation. Purely combinational.
module shared_bus #(
  parameter int unsigned N      = 4,
  parameter int unsigned DATA_W = 32
) (
  input  logic [N-1:0]               gnt,
  input  logic [N-1:0]               ready,
  input  logic [N-1:0][DATA_W-1:0]   wdata,
  output logic [N-1:0]               take,
  output logic                       bus_valid,
  output logic [$clog2(N)-1:0]       bus_owner,
  output logic [DATA_W-1:0]          bus_data
);

  always_comb begin
    take      = gnt & ready;
    bus_valid = |take;
    bus_owner = '0;
    bus_data  = '0;
    for (int i = 0; i < N; i++)
      if (take[i]) begin
        bus_owner = $clog2(N)'(i);
        bus_data  = wdata[i];
      end
  end

endmodule
