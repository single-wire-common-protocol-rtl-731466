// tb_swmm_node: checks that a node is master and slave at once.
//
// Three nodes on a wire built here: A (MPN 1023, SID 0, rank 0) and
// B (MPN 1022, SID 1, rank 1) may be masters, C (SID 2) is a slave only.
// Checked: A sends a data frame to B; B sends a command to A and A's slave
// side answers; A and B start together with frames for each other - B loses,
// still receives A's frame as a slave, then sends its own frame, which A
// receives; C never drives the wire although its application asks it to;
// and B's two shares run out while A's four do not.
module tb_swmm_node;
  import swmm_pkg::*;
  int checks = 0, failures = 0;

  localparam int BT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tick;
  int   tcnt = 0;
  always @(posedge clk) tcnt <= (tcnt == BT - 1) ? 0 : tcnt + 1;
  assign tick = (tcnt == BT - 1);

  logic      [2:0]       wr;
  logic                  rd;
  logic      [2:0]       tx_valid = '0;
  tx_frame_t [2:0]       tx_frame;
  logic      [2:0]       tx_done, won, lost, deferred, no_share, rd_valid, share_reload;
  data_t     [2:0]       rd_data;
  logic      [2:0][11:0] share_left;
  data_t     [2:0]       resp_data;
  logic      [2:0]       rx_valid, cmd_served, not_for_me, sof_error;
  rx_frame_t [2:0]       rx_frame;
  mpn_t      [2:0]       cmd_mpn;

  assign rd = |wr;

  localparam int MPN [3] = '{1023, 1022, 1021};

  for (genvar i = 0; i < 3; i++) begin : g_n
    swmm_node #(.MY_SID(i), .MY_MPN(MPN[i]), .N_MASTERS(2), .K(4), .RANK(i),
                .IS_MASTER(i < 2)) u (
      .clk, .rst_n, .bit_tick(tick), .rd, .wr(wr[i]),
      .tx_valid(tx_valid[i]), .tx_frame(tx_frame[i]), .tx_done(tx_done[i]), .won(won[i]),
      .lost(lost[i]), .deferred(deferred[i]), .no_share(no_share[i]), .rd_valid(rd_valid[i]),
      .rd_data(rd_data[i]), .share_left(share_left[i]), .share_reload(share_reload[i]),
      .resp_data(resp_data[i]), .rx_valid(rx_valid[i]), .rx_frame(rx_frame[i]),
      .cmd_served(cmd_served[i]), .cmd_mpn(cmd_mpn[i]), .not_for_me(not_for_me[i]),
      .sof_error(sof_error[i]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int        n_rx [3], n_lost [3], n_done [3], n_c_wr;
  rx_frame_t last_rx [3];
  data_t     last_rd [3];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) begin
      if (rx_valid[i]) begin n_rx[i]++; last_rx[i] = rx_frame[i]; end
      if (lost[i])     n_lost[i]++;
      if (tx_done[i])  begin n_done[i]++; last_rd[i] = rd_data[i]; end
    end
    if (wr[2]) n_c_wr++;
  end

  // Wait until node i reports its frame done, at most `slots` slots.
  task automatic wait_done(int i, int slots);
    int n0 = n_done[i];
    for (int s = 0; s < slots && n_done[i] == n0; s++) @(posedge clk iff tick);
    @(posedge clk);
    #1 tx_valid[i] = 1'b0;
  endtask

  data_t d1, d2;

  initial begin
    n_rx = '{default: 0}; n_lost = '{default: 0}; n_done = '{default: 0}; n_c_wr = 0;
    resp_data[0] = 64'h0A0A_1111_2222_3333;
    resp_data[1] = 64'h0B0B_4444_5555_6666;
    resp_data[2] = 64'h0C0C_7777_8888_9999;
    tx_frame = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk iff tick);

    // A -> B data frame
    d1 = {$urandom, $urandom};
    #1 tx_frame[0] = '{sid: 10'd1, rw: 1'b0, data: d1};
    tx_valid[0] = 1;
    wait_done(0, 200);
    check(n_rx[1] == 1 && last_rx[1].data == d1 && last_rx[1].mpn == 10'd1023, "B got A's data");
    check(n_rx[2] == 0, "C did not take B's frame");
    repeat (4) @(posedge clk iff tick);

    // B asks A for data: A's slave side answers
    #1 tx_frame[1] = '{sid: 10'd0, rw: 1'b1, data: '0};
    tx_valid[1] = 1;
    wait_done(1, 200);
    check(last_rd[1] == resp_data[0], $sformatf("B read %h from A", last_rd[1]));
    repeat (4) @(posedge clk iff tick);

    // A and B start together, each addressing the other
    d1 = {$urandom, $urandom};
    d2 = {$urandom, $urandom};
    #1 tx_frame[0] = '{sid: 10'd1, rw: 1'b0, data: d1};
    tx_frame[1] = '{sid: 10'd0, rw: 1'b0, data: d2};
    tx_valid[1:0] = 2'b11;
    wait_done(0, 200);
    check(n_lost[1] == 1 && n_lost[0] == 0, "B lost to A");
    check(n_rx[1] == 2 && last_rx[1].data == d1, "loser B received A's frame as a slave");
    wait_done(1, 200);
    check(n_rx[0] == 1 && last_rx[0].data == d2 && last_rx[0].mpn == 10'd1022, "A got B's retried frame");

    // C asks to send but is a slave only
    #1 tx_frame[2] = '{sid: 10'd0, rw: 1'b0, data: '1};
    tx_valid[2] = 1;
    repeat (150) @(posedge clk iff tick);
    #1 tx_valid[2] = 0;
    check(n_done[2] == 0, "C never sent a frame");
    check(n_c_wr == 0, "C never drove the wire outside command replies");

    // Shares: A used 2 of 4, B used 2 of 2
    check(share_left[0] == 12'd2, $sformatf("A has %0d share left", share_left[0]));
    check(share_left[1] == 12'd0, $sformatf("B has %0d shares left", share_left[1]));
    #1 tx_frame[1] = '{sid: 10'd2, rw: 1'b0, data: '0};
    tx_valid[1] = 1;
    repeat (20) @(posedge clk iff tick);
    check(no_share[1] || n_done[1] == 2, "B holds back without a share");
    check(n_done[1] == 2, "B sent nothing more");
    #1 tx_valid[1] = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
