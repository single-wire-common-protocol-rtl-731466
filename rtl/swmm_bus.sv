// swmm_bus: the single bidirectional wire that all nodes share.
//
// Every node reaches the wire through a dedicated write line and a dedicated
// read line. The wire is held low by a pull-down resistor; a node writes a 1
// by driving its write line high and writes a 0 by releasing it. The level on
// the wire is therefore the OR of all write lines: a 1 from any node
// dominates, and no two nodes can ever drive against each other, so no node
// can short the wire. That dominant level is what lets a transmitting master
// see that another master is on the wire (it sent 0 and reads 1).
//
// The pull-down and the separate read and write lines follow the protocol's
// bus drawing and its simulation set-up; that only the high level is driven
// is this design's reading of "no node should short the bus".
//
// Interface: wr[i] is node i's write line, rd is the wire level that every
// node's read line sees, n_high counts the nodes driving high (for
// observation and tests only). Purely combinational.
module swmm_bus #(
  parameter int unsigned N_NODES = 4
) (
  input  logic [N_NODES-1:0]           wr,
  output logic                         rd,
  output logic [$clog2(N_NODES+1)-1:0] n_high
);
  always_comb begin
    rd     = 1'b0;                 // pull-down: idle level
    n_high = '0;
    for (int i = 0; i < int'(N_NODES); i++) begin
      rd     = rd | wr[i];
      n_high = n_high + ($clog2(N_NODES+1))'(wr[i]);
    end
  end
endmodule
