// tb_swmm_top: end-to-end test of the bus at its default size.
//
// Four nodes on one wire: nodes 0 and 1 are masters (MPN 1023 and 1022,
// shares 4 and 2), nodes 2 and 3 are slaves; every node answers commands
// with its own 64-bit reply word. The masters' applications send random data
// and command frames to random other nodes.
//
// Phase 1, three share cycles: both masters always have a frame ready. In
// each cycle master 0 must win exactly 4 frames and master 1 exactly 2 (the
// shares 4 and 2 of N = 2, K = 4), and master 1 must lose arbitration while
// master 0 still has shares. Phase 2, three cycles: frames arrive at random.
// A scoreboard checks every delivered data frame (payload, sender MPN,
// address) and every command reply against what was sent. The test counts
// each mechanism - arbitration loss, waiting on a busy wire, share used up,
// share reload, command reply, data delivery, discard of frames for other
// nodes - and fails if one never happened.
module tb_swmm_top;
  import swmm_pkg::*;
  int checks = 0, failures = 0;

  localparam int N  = 4;
  localparam int NM = 2;
  localparam int CYCLE_CLKS = NM * 4 * (FRAME_BITS + IFS_BITS) * 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      [N-1:0]        tx_valid = '0;
  tx_frame_t [N-1:0]        tx_frame;
  logic      [N-1:0]        tx_done, won, lost, deferred, no_share, rd_valid, share_reload;
  data_t     [N-1:0]        rd_data;
  logic      [N-1:0][11:0]  share_left;
  data_t     [N-1:0]        resp_data;
  logic      [N-1:0]        rx_valid, cmd_served, not_for_me, sof_error;
  rx_frame_t [N-1:0]        rx_frame;
  mpn_t      [N-1:0]        cmd_mpn;
  logic                     bus;
  logic      [2:0]          bus_drivers;

  swmm_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- application model ----------------
  bit phase1 = 1;
  initial begin
    for (int i = 0; i < N; i++) begin
      resp_data[i] = {$urandom, $urandom};
      tx_frame[i]  = '0;
    end
  end

  function automatic tx_frame_t new_frame(int me);
    tx_frame_t f;
    int t;
    t = $urandom % (N - 1);
    if (t >= me) t++;
    f.sid  = sid_t'(t);
    f.rw   = ($urandom % 3) == 0;
    f.data = {$urandom, $urandom};
    return f;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NM; i++) begin
      if (tx_done[i]) begin
        tx_valid[i] <= 1'b0;
      end else if (!tx_valid[i] && (phase1 || ($urandom % 700) == 0)) begin
        tx_frame[i] <= new_frame(i);
        tx_valid[i] <= 1'b1;
      end
    end
    for (int i = 0; i < N; i++)
      if (cmd_served[i]) resp_data[i] <= {$urandom, $urandom};
  end

  // ---------------- scoreboard ----------------
  int n_lost = 0, n_def = 0, n_nosh = 0, n_reload = 0, n_reply = 0, n_rx = 0,
      n_nfm = 0, n_won = 0, n_served = 0, n_sof = 0;
  int wins_in_cycle [NM];
  int losses_in_cycle [NM];
  int cycle_no = 0;
  rx_frame_t exp_q [N][$];

  always @(posedge clk) if (rst_n) begin
    // Frames that completed this clock, from the senders' side.
    for (int i = 0; i < NM; i++) begin
      if (won[i])      begin n_won++; wins_in_cycle[i]++; end
      if (lost[i])     begin n_lost++; losses_in_cycle[i]++; end
      if (deferred[i]) n_def++;
      if (no_share[i]) n_nosh++;
      if (tx_done[i] && !tx_frame[i].rw)
        exp_q[tx_frame[i].sid].push_back('{mpn: mpn_t'(1023 - i), sid: tx_frame[i].sid,
                                            data: tx_frame[i].data});
      if (rd_valid[i]) begin
        n_reply++;
        check(tx_frame[i].rw, "reply only for a command");
        check(rd_data[i] == resp_data[tx_frame[i].sid],
              $sformatf("master %0d reply from node %0d: %h exp %h", i, tx_frame[i].sid,
                        rd_data[i], resp_data[tx_frame[i].sid]));
        check(cmd_served[tx_frame[i].sid] && cmd_mpn[tx_frame[i].sid] == mpn_t'(1023 - i),
              "addressed slave reports the command served");
      end
    end
    for (int t = 0; t < N; t++) begin
      if (cmd_served[t]) n_served++;
      if (not_for_me[t]) n_nfm++;
      if (sof_error[t]) n_sof++;
      if (rx_valid[t]) begin
        n_rx++;
        if (exp_q[t].size() == 0) begin
          check(0, $sformatf("node %0d received an unexpected frame", t));
        end else begin
          rx_frame_t e;
          e = exp_q[t].pop_front();
          check(rx_frame[t] == e, $sformatf("node %0d frame %h exp %h", t, rx_frame[t], e));
        end
      end
    end
    if (share_reload[0]) begin
      n_reload++;
      if (phase1) begin
        check(wins_in_cycle[0] == 4 && wins_in_cycle[1] == 2,
              $sformatf("cycle %0d wins %0d/%0d, expected 4/2", cycle_no,
                        wins_in_cycle[0], wins_in_cycle[1]));
        check(losses_in_cycle[1] >= 1, "master 1 lost to master 0 in the cycle");
        check(losses_in_cycle[0] == 0, "master 0 never loses");
      end
      wins_in_cycle   = '{default: 0};
      losses_in_cycle = '{default: 0};
      cycle_no++;
    end
  end

  initial begin
    wins_in_cycle   = '{default: 0};
    losses_in_cycle = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * CYCLE_CLKS) @(posedge clk);
    phase1 = 0;
    repeat (3 * CYCLE_CLKS) @(posedge clk);
    // Let the last frames finish.
    tx_valid = '0;
    repeat (2 * 95 * 8) @(posedge clk);
    for (int t = 0; t < N; t++)
      check(exp_q[t].size() == 0, $sformatf("node %0d still waits for %0d frames", t, exp_q[t].size()));
    $display("mechanisms: won=%0d lost=%0d deferred=%0d no_share=%0d reload=%0d reply=%0d served=%0d rx=%0d discarded=%0d",
             n_won, n_lost, n_def, n_nosh, n_reload, n_reply, n_served, n_rx, n_nfm);
    check(n_lost > 0,   "arbitration loss happened");
    check(n_def > 0,    "waiting on a busy wire happened");
    check(n_nosh > 0,   "share exhaustion happened");
    check(n_reload > 0, "share reload happened");
    check(n_reply > 0,  "command reply happened");
    check(n_rx > 0,     "data delivery happened");
    check(n_nfm > 0,    "discard of foreign frames happened");
    check(n_sof == 0,   "no sync error on a clean wire");
    check(n_served == n_reply, "every served command reached its master");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (7 * CYCLE_CLKS + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
