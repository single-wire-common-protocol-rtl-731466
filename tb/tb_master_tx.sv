// tb_master_tx: checks the master procedure and its bitwise arbitration.
//
// The testbench plays the rest of the wire: a competing master that starts
// in the same slot, a slave that answers commands, and the receiver's
// bus_free and the share flag. It records the wire level of every slot and
// compares it with frames built here. Checked: an uncontested data frame
// (all 93 slots, done after exactly 93 slots), loss against a higher MPN at
// the first differing MPN bit with the wire released from the next slot, a
// win against a lower MPN, waiting on a busy wire, holding back without a
// share, and a command frame whose 64-bit reply is read back.
module tb_master_tx;
  import swmm_pkg::*;
  int checks = 0, failures = 0;

  localparam int BT = 3;
  localparam mpn_t MY_MPN = 10'b10_1100_1010;   // 714

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tick;
  int   tcnt = 0;
  always @(posedge clk) tcnt <= (tcnt == BT - 1) ? 0 : tcnt + 1;
  assign tick = (tcnt == BT - 1);

  logic      comp = 0;          // other nodes' write lines
  logic      wr, rd;
  logic      tx_valid = 0, can_send = 1, bus_free = 1;
  tx_frame_t tx_frame;
  logic      active, tx_done, won, lost, consume, rd_valid, deferred, no_share;
  data_t     rd_data;

  assign rd = wr | comp;

  master_tx dut (
    .clk, .rst_n, .bit_tick(tick), .rd, .wr, .my_mpn(MY_MPN), .tx_valid, .tx_frame,
    .can_send, .bus_free, .active, .tx_done, .won, .lost, .consume, .rd_valid,
    .rd_data, .deferred, .no_share);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int n_done = 0, n_won = 0, n_lost = 0, n_cons = 0, n_rdv = 0, n_def = 0, n_nosh = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_done)  n_done++;
    if (won)      n_won++;
    if (lost)     n_lost++;
    if (consume)  n_cons++;
    if (rd_valid) n_rdv++;
    if (deferred) n_def++;
    if (no_share) n_nosh++;
  end

  logic [FRAME_BITS-1:0] seen;     // wire level per slot, slot 0 at the top
  logic [FRAME_BITS-1:0] wr_seen;  // dut write line per slot
  int                    done_slot;

  // Run one frame period from the slot in which the dut starts. `other` is
  // what the rest of the wire drives in each slot.
  task automatic run(logic [FRAME_BITS-1:0] other);
    seen = '0; wr_seen = '0; done_slot = -1;
    #1 tx_valid = 1;
    @(posedge clk iff tick);          // dut and competitor start here
    comp <= other[FRAME_BITS-1];
    bus_free <= 1'b0;                 // the receiver sees a frame running
    for (int s = 0; s < FRAME_BITS; s++) begin
      @(posedge clk iff tick);
      seen[FRAME_BITS-1-s]    = rd;
      wr_seen[FRAME_BITS-1-s] = wr;
      comp <= (s < FRAME_BITS - 1) ? other[FRAME_BITS-2-s] : 1'b0;
      #1;
      if (tx_done && done_slot < 0) begin
        done_slot = s;
        tx_valid  = 0;
      end
    end
    #1 tx_valid = 0;
    comp <= 1'b0;
    repeat (2) @(posedge clk iff tick);
    bus_free <= 1'b1;
  endtask

  logic [FRAME_BITS-1:0] mine, theirs;
  data_t d, reply;
  int    n0, first_diff;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk iff tick);

    // 1. uncontested data frame
    d = {$urandom, $urandom};
    tx_frame = '{sid: 10'd37, rw: 1'b0, data: d};
    mine = {SOF_PATTERN, MY_MPN, 10'd37, 1'b0, d};
    run('0);
    check(seen == mine, $sformatf("data frame on the wire\n  %b\n  %b", seen, mine));
    check(done_slot == FRAME_BITS - 1, $sformatf("done after slot %0d", done_slot));
    check(n_won == 1 && n_cons == 1 && n_lost == 0, "won once, one share taken");

    // 2. competitor with higher MPN: lose at the first differing MPN bit
    theirs = {SOF_PATTERN, 10'b10_1101_0000, 10'd3, 1'b0, 64'hFFFF_0000_AAAA_5555};
    mine   = {SOF_PATTERN, MY_MPN, 10'd37, 1'b0, d};
    first_diff = 0;
    for (int s = 0; s < FRAME_BITS; s++)
      if (mine[FRAME_BITS-1-s] != theirs[FRAME_BITS-1-s]) begin first_diff = s; break; end
    n0 = n_lost;
    run(theirs);
    check(n_lost == n0 + 1, "lost arbitration");
    check(seen == theirs, $sformatf("winner frame on the wire\n  %b\n  %b\n  %b", seen, theirs, wr_seen));
    begin
      automatic logic released = 1;
      for (int s = first_diff; s < FRAME_BITS; s++)
        if (wr_seen[FRAME_BITS-1-s]) released = 0;
      check(released, $sformatf("write line released from slot %0d", first_diff));
      check(first_diff >= SOF_BITS && first_diff < SOF_BITS + MPN_BITS, "difference in the MPN field");
    end
    check(n_cons == 1 && done_slot < 0, "no share taken, frame not done after a loss");

    // 3. competitor with lower MPN (10_1100_0111): it drives its common
    //    prefix and releases the wire where it loses; the dut wins
    theirs = {SOF_PATTERN, 10'b10_1100_0000, 10'd0, 1'b0, 64'h0};
    n0 = n_won;
    run(theirs);
    check(n_won == n0 + 1 && seen == mine, "won against a lower MPN");

    // 4. busy wire: the master waits
    #1 bus_free = 0;
    tx_valid = 1;
    n0 = n_def;
    repeat (10) @(posedge clk iff tick);
    #1 check(!active && n_def >= n0 + 9, "waits while the wire is busy");
    bus_free = 1;
    @(posedge clk iff tick);
    #1 check(active, "starts once the wire is free");
    tx_valid = 0;
    repeat (FRAME_BITS + 2) @(posedge clk iff tick);
    #1;

    // 5. no share: stays a slave
    can_send = 0;
    tx_valid = 1;
    n0 = n_nosh;
    repeat (5) @(posedge clk iff tick);
    #1 check(!active && n_nosh >= n0 + 4, "held back without a share");
    tx_valid = 0;
    can_send = 1;
    @(posedge clk iff tick);

    // 6. command frame, reply driven by "the slave"
    reply = {$urandom, $urandom};
    tx_frame = '{sid: 10'd9, rw: 1'b1, data: 64'hDEAD};
    n0 = n_rdv;
    run({29'b0, reply});
    mine = {SOF_PATTERN, MY_MPN, 10'd9, 1'b1, reply};
    check(seen == mine, "command header then reply on the wire");
    check(wr_seen[63:0] == '0, "master silent in the reply field");
    check(n_rdv == n0 + 1 && rd_data == reply, $sformatf("reply read back %h", rd_data));
    check(done_slot == FRAME_BITS - 1, "command done after the reply");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
