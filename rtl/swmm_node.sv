// swmm_node: one node of the single wire multi-master bus.
//
// Every node is a slave all the time and a master whenever it has a frame to
// send and a share left. It holds a receiver (frame_rx, the slave
// procedure), a transmitter (master_tx, the master procedure with bitwise
// arbitration) and its share account (share_manager). The node's write line
// is the OR of what its master and its slave drive; only one of them drives
// at a time, because the slave answers only other masters' commands. A
// master that loses arbitration drops back and its receiver takes the rest of
// the winning frame, so a frame addressed to a losing master still reaches it.
//
// The split into a master and a slave procedure and the share account follow
// the protocol. The node's identity (MY_SID, MY_MPN), its priority rank for
// the share formula and whether it may act as master at all are parameters;
// in this design rank 0 is the highest priority and must carry the largest
// MPN, since a 1 dominates the wire.
//
// Interface: see master_tx and frame_rx for the application side. All state
// changes happen on `bit_tick`; the write line `wr` is registered.
module swmm_node
  import swmm_pkg::*;
#(
  parameter int unsigned MY_SID    = 0,
  parameter int unsigned MY_MPN    = 1023,
  parameter int unsigned N_MASTERS = 2,
  parameter int unsigned K         = 4,
  parameter int unsigned RANK      = 0,
  parameter bit          IS_MASTER = 1'b1,
  parameter int unsigned SHARE_W   = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bit_tick,
  input  logic               rd,          // read line
  output logic               wr,          // write line
  // master side
  input  logic               tx_valid,
  input  tx_frame_t          tx_frame,
  output logic               tx_done,
  output logic               won,
  output logic               lost,
  output logic               deferred,
  output logic               no_share,
  output logic               rd_valid,
  output data_t              rd_data,
  output logic [SHARE_W-1:0] share_left,
  output logic               share_reload,
  // slave side
  input  data_t              resp_data,
  output logic               rx_valid,
  output rx_frame_t          rx_frame,
  output logic               cmd_served,
  output mpn_t               cmd_mpn,
  output logic               not_for_me,
  output logic               sof_error
);

  logic               m_wr, s_wr;
  logic               bus_free, busy, frame_done, active, consume, can_send;
  slot_t              slot;

  frame_rx u_rx (
    .clk, .rst_n, .bit_tick, .rd,
    .wr        (s_wr),
    .my_sid    (sid_t'(MY_SID)),
    .my_mpn    (mpn_t'(MY_MPN)),
    .resp_data,
    .bus_free, .busy, .slot,
    .rx_valid, .rx_frame, .cmd_served, .cmd_mpn, .not_for_me, .sof_error,
    .frame_done
  );

  master_tx u_tx (
    .clk, .rst_n, .bit_tick, .rd,
    .wr        (m_wr),
    .my_mpn    (mpn_t'(MY_MPN)),
    .tx_valid  (tx_valid && IS_MASTER),
    .tx_frame,
    .can_send, .bus_free, .active,
    .tx_done, .won, .lost, .consume, .rd_valid, .rd_data, .deferred, .no_share
  );

  share_manager #(
    .N_MASTERS (N_MASTERS),
    .K         (K),
    .RANK      (RANK),
    .IS_MASTER (IS_MASTER),
    .SHARE_W   (SHARE_W)
  ) u_share (
    .clk, .rst_n, .bit_tick,
    .consume,
    .share_left,
    .can_send,
    .reload    (share_reload)
  );

  assign wr = m_wr | s_wr;

  // Master and slave of one node never drive the wire together.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) !(m_wr && s_wr));

endmodule
