// tb_frame_rx: checks the slave procedure against frames built here.
//
// The testbench is a second node on the wire: it sends data frames, command
// frames and a frame with a corrupt sync field, bit by bit on the bit
// strobe, and reads the wire back during the data field of its commands.
// Checked: delivery of data frames addressed to the slave (payload, sender
// MPN, delivered exactly one clock after the 93rd slot), silence for frames
// to other IDs and for frames with the slave's own MPN, the 64-bit reply to a
// command, the dropped corrupt frame, and that the wire is reported busy
// through the frame and the two idle slots after it.
module tb_frame_rx;
  import swmm_pkg::*;
  int checks = 0, failures = 0;

  localparam int BT = 4;
  localparam sid_t MY_SID = 10'd5;
  localparam mpn_t MY_MPN = 10'd900;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tick;
  int   tcnt = 0;
  always @(posedge clk) tcnt <= (tcnt == BT - 1) ? 0 : tcnt + 1;
  assign tick = (tcnt == BT - 1);

  logic      tbw = 0;
  logic      wr, rd;
  data_t     resp_data;
  logic      bus_free, busy, rx_valid, cmd_served, not_for_me, sof_error, frame_done;
  slot_t     slot;
  rx_frame_t rx_frame;
  mpn_t      cmd_mpn;

  assign rd = tbw | wr;

  frame_rx dut (
    .clk, .rst_n, .bit_tick(tick), .rd, .wr, .my_sid(MY_SID), .my_mpn(MY_MPN),
    .resp_data, .bus_free, .busy, .slot, .rx_valid, .rx_frame, .cmd_served, .cmd_mpn,
    .not_for_me, .sof_error, .frame_done);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Pulse counters.
  int n_rx = 0, n_cmd = 0, n_nfm = 0, n_sof = 0, n_done = 0;
  rx_frame_t last_rx;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid)   begin n_rx++; last_rx = rx_frame; end
    if (cmd_served) n_cmd++;
    if (not_for_me) n_nfm++;
    if (sof_error)  n_sof++;
    if (frame_done) n_done++;
  end

  data_t got_reply;
  int    rx_at_tick;

  // Send one frame: `sof` lets a test corrupt the sync field.
  task automatic send(logic [7:0] sof, mpn_t mpn, sid_t sid, logic rw, data_t data);
    logic [FRAME_BITS-1:0] f;
    f = {sof, mpn, sid, rw, data};
    got_reply = '0;
    for (int s = 0; s < FRAME_BITS; s++) begin
      @(posedge clk iff tick);
      if (s > HDR_BITS) got_reply = {got_reply[62:0], rd};  // slot s-1 ended
      if (rw && s >= HDR_BITS) tbw <= 1'b0;
      else                     tbw <= f[FRAME_BITS-1-s];
    end
    @(posedge clk iff tick);
    if (rw) got_reply = {got_reply[62:0], rd};              // slot 92
    tbw <= 1'b0;
    rx_at_tick = 1;
    @(posedge clk);
    #1;
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk iff tick);
  endtask

  data_t d;
  int    rx0, nfm0, cmd0, sof0;

  initial begin
    resp_data = 64'hC0FF_EE00_1234_5678;
    repeat (3) @(posedge clk);
    rst_n = 1;
    idle(3);
    #1 check(bus_free && !busy, "wire free after reset");

    // 1. data frame for this slave
    d = {$urandom, $urandom};
    rx0 = n_rx;
    send(SOF_PATTERN, 10'd100, MY_SID, 1'b0, d);
    check(n_rx == rx0 + 1, "data frame delivered one clock after slot 92");
    check(last_rx.data == d && last_rx.mpn == 10'd100 && last_rx.sid == MY_SID,
          $sformatf("payload %h mpn %0d", last_rx.data, last_rx.mpn));
    check(busy, "busy in the inter-frame gap");
    idle(1);
    #1 check(busy && !bus_free, "still busy in the second gap slot");
    idle(1);
    #1 check(!busy, "free after two gap slots");

    // 2. data frame for another slave
    rx0 = n_rx; nfm0 = n_nfm;
    send(SOF_PATTERN, 10'd100, 10'd6, 1'b0, {$urandom, $urandom});
    check(n_rx == rx0 && n_nfm == nfm0 + 1, "frame for SID 6 discarded");
    idle(3);

    // 3. command frame for this slave: it must answer with resp_data
    cmd0 = n_cmd;
    send(SOF_PATTERN, 10'd321, MY_SID, 1'b1, '0);
    check(got_reply == resp_data, $sformatf("reply %h", got_reply));
    check(n_cmd == cmd0 + 1 && cmd_mpn == 10'd321, "command served, requester MPN kept");
    idle(3);

    // 4. command frame for another slave: no reply on the wire
    resp_data = {$urandom, $urandom};
    send(SOF_PATTERN, 10'd321, 10'd7, 1'b1, '0);
    check(got_reply == '0, "no reply to a command for SID 7");
    idle(3);

    // 5. a second command with new data
    send(SOF_PATTERN, 10'd11, MY_SID, 1'b1, '0);
    check(got_reply == resp_data, $sformatf("second reply %h", got_reply));
    idle(3);

    // 6. corrupt sync field: frame dropped after 8 slots
    rx0 = n_rx; sof0 = n_sof;
    for (int s = 0; s < 8; s++) begin
      @(posedge clk iff tick);
      tbw <= (8'b1011_1011 >> (7 - s)) & 1'b1;
    end
    @(posedge clk iff tick);
    tbw <= 1'b0;
    @(posedge clk);
    #1 check(n_sof == sof0 + 1, "corrupt SOF reported");
    idle(4);
    #1 check(!busy, "receiver hunting again after a bad SOF");

    // 7. own MPN addressed to own SID: ignored
    rx0 = n_rx;
    send(SOF_PATTERN, MY_MPN, MY_SID, 1'b0, {$urandom, $urandom});
    check(n_rx == rx0, "own frame not delivered");
    idle(3);

    // 8. back-to-back random data frames for this slave
    for (int i = 0; i < 5; i++) begin
      d = {$urandom, $urandom};
      rx0 = n_rx;
      send(SOF_PATTERN, mpn_t'($urandom % 800), MY_SID, 1'b0, d);
      check(n_rx == rx0 + 1 && last_rx.data == d, $sformatf("frame %0d delivered", i));
      idle(2);
    end

    check(n_done == 11, $sformatf("complete frames %0d", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
