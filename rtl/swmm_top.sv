// swmm_top: a single wire bus with N_NODES nodes, N_MASTERS of them masters.
//
// The nodes hang on one wire (swmm_bus) through their own read and write
// lines; a pull-down holds the wire low when nobody writes. Nodes
// 0..N_MASTERS-1 may act as masters: node i has priority rank i, priority
// number MPN = 1023 - i (larger wins, since a 1 dominates the wire) and a
// share computed from N_MASTERS and K. The other nodes are slaves only. Every
// node has slave ID i. A shared bit_timer gives the bit slots.
//
// The defaults - two masters and two slaves, K = 4, hence shares 4 and 2 -
// mirror the protocol's four-node demonstration set-up and the shares it
// reports. The bit slot length BIT_CLKS, the ID and MPN assignment and the
// fixed master/slave split are this design's choices.
//
// Ports: per-node application signals as packed arrays indexed by node
// (see swmm_node), plus the wire level `bus` and `bus_drivers`, the number of
// nodes writing a 1, for observation.
module swmm_top
  import swmm_pkg::*;
#(
  parameter int unsigned N_NODES   = 4,
  parameter int unsigned N_MASTERS = 2,
  parameter int unsigned K         = 4,
  parameter int unsigned BIT_CLKS  = 8,
  parameter int unsigned SHARE_W   = 12
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // master side, per node
  input  logic      [N_NODES-1:0]             tx_valid,
  input  tx_frame_t [N_NODES-1:0]             tx_frame,
  output logic      [N_NODES-1:0]             tx_done,
  output logic      [N_NODES-1:0]             won,
  output logic      [N_NODES-1:0]             lost,
  output logic      [N_NODES-1:0]             deferred,
  output logic      [N_NODES-1:0]             no_share,
  output logic      [N_NODES-1:0]             rd_valid,
  output data_t     [N_NODES-1:0]             rd_data,
  output logic      [N_NODES-1:0][SHARE_W-1:0] share_left,
  output logic      [N_NODES-1:0]             share_reload,
  // slave side, per node
  input  data_t     [N_NODES-1:0]             resp_data,
  output logic      [N_NODES-1:0]             rx_valid,
  output rx_frame_t [N_NODES-1:0]             rx_frame,
  output logic      [N_NODES-1:0]             cmd_served,
  output mpn_t      [N_NODES-1:0]             cmd_mpn,
  output logic      [N_NODES-1:0]             not_for_me,
  output logic      [N_NODES-1:0]             sof_error,
  // the wire
  output logic                                bus,
  output logic      [$clog2(N_NODES+1)-1:0]   bus_drivers
);

  logic               bit_tick;
  logic [N_NODES-1:0] wr;

  bit_timer #(.BIT_CLKS(BIT_CLKS)) u_timer (.clk, .rst_n, .tick(bit_tick));

  swmm_bus #(.N_NODES(N_NODES)) u_bus (.wr, .rd(bus), .n_high(bus_drivers));

  for (genvar i = 0; i < int'(N_NODES); i++) begin : g_node
    swmm_node #(
      .MY_SID    (i),
      .MY_MPN    (1023 - i),
      .N_MASTERS (N_MASTERS),
      .K         (K),
      .RANK      (i),
      .IS_MASTER (i < int'(N_MASTERS)),
      .SHARE_W   (SHARE_W)
    ) u_node (
      .clk, .rst_n, .bit_tick,
      .rd           (bus),
      .wr           (wr[i]),
      .tx_valid     (tx_valid[i]),
      .tx_frame     (tx_frame[i]),
      .tx_done      (tx_done[i]),
      .won          (won[i]),
      .lost         (lost[i]),
      .deferred     (deferred[i]),
      .no_share     (no_share[i]),
      .rd_valid     (rd_valid[i]),
      .rd_data      (rd_data[i]),
      .share_left   (share_left[i]),
      .share_reload (share_reload[i]),
      .resp_data    (resp_data[i]),
      .rx_valid     (rx_valid[i]),
      .rx_frame     (rx_frame[i]),
      .cmd_served   (cmd_served[i]),
      .cmd_mpn      (cmd_mpn[i]),
      .not_for_me   (not_for_me[i]),
      .sof_error    (sof_error[i])
    );
  end

endmodule
