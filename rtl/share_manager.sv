// share_manager: bus-access shares of one master node.
//
// Each master may win the bus only a limited number of times per cycle, so
// that a high-priority master cannot starve the others. With N masters and a
// constant K, a cycle lasts N*K frame times; N of those frame slots are
// reserved (one per master) and the residue R = N*(K-1) is shared out with a
// base share S = R/N = K-1. The master of priority rank j (0 = highest) then
// gets S + (N-1-2j): S+(N-1), S+(N-3), S+(N-5), ... so each master gives one
// slot to every master above it. With N = 2 and K = 4 this gives 4 and 2.
// That formula follows the protocol. This design's own choices: a share is
// never below 1, so the guaranteed slot survives when the formula goes to zero
// or below; the cycle is timed locally as N*K*(FRAME_BITS+IFS_BITS) bit slots
// from reset, after which the share is reloaded; a node built with
// IS_MASTER = 0 has no share and only ever acts as a slave.
//
// Interface: `consume` (one clock, with or without `bit_tick`) takes one share
// after a won frame; `share_left` is what remains, `can_send` is high while it
// is above zero, `reload` pulses for one clock at each cycle boundary.
// A reload and a consume in the same clock give the full share minus one.
module share_manager
  import swmm_pkg::*;
#(
  parameter int unsigned N_MASTERS = 2,   // N
  parameter int unsigned K         = 4,   // K
  parameter int unsigned RANK      = 0,   // 0 = highest priority
  parameter bit          IS_MASTER = 1'b1,
  parameter int unsigned SHARE_W   = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bit_tick,
  input  logic               consume,
  output logic [SHARE_W-1:0] share_left,
  output logic               can_send,
  output logic               reload
);

  // Share of the master of rank `rank`, at least 1.
  function automatic int share_of(int n, int k, int rank);
    int s;
    s = (k - 1) + (n - 1 - 2 * rank);
    return (s < 1) ? 1 : s;
  endfunction

  localparam int SHARE_INIT  = IS_MASTER ? share_of(N_MASTERS, K, RANK) : 0;
  localparam int CYCLE_SLOTS = N_MASTERS * K * (FRAME_BITS + IFS_BITS);
  localparam int CW          = $clog2(CYCLE_SLOTS + 1);

  logic [CW-1:0] cycle_cnt;

  assign reload     = bit_tick && (cycle_cnt == CW'(CYCLE_SLOTS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_cnt <= '0;
    end else if (bit_tick) begin
      cycle_cnt <= reload ? '0 : cycle_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      share_left <= SHARE_W'(SHARE_INIT);
    end else if (reload) begin
      share_left <= SHARE_W'(SHARE_INIT) - SHARE_W'(consume && SHARE_INIT > 0);
    end else if (consume && share_left != '0) begin
      share_left <= share_left - 1'b1;
    end
  end

  assign can_send = (share_left != '0);

  // A master may only consume a share it still has.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> (share_left != '0) || reload);

endmodule
